// tb_da_array: end-to-end testbench of the 4x4 DA array at its default size.
//
// Maps two applications onto the array through the configuration bus and
// checks every output against a model computed here:
//  1. A 32-tap FIR filter: units 0..7 compute 4-tap inner products over a
//     delay line that runs through them (each forwards its oldest sample to
//     the next), units 8..14 add the eight partial sums in a tree, unit 15
//     sleeps. Run at 16-bit and then 8-bit input width, with random
//     back-pressure on the output.
//  2. A 4-point radix-2 decimation-in-frequency FFT: four butterflies of
//     three units each (complex add, complex subtract, complex multiply by a
//     twiddle factor held in the multiplier's LUT), two stages, forked
//     operands. Run with 16-bit and with 8-bit twiddle factors; outputs are
//     checked bit-exactly against a fixed-point model and to within a few
//     LSB against the exact DFT.
// The filter is also run shortened to 16 taps on 4 + 3 units, the rest asleep.
// Counted mechanisms, each of which must occur: output back-pressure stalls,
// sleeping units, forked transfers, delay-line forwarding, reduced bit width
// and reconfiguration from one application to the other.
module tb_da_array;
  import da_pkg::*;
  localparam int NDA = 16, NEXT = 4, NCH = 2 * NDA + NEXT, UNCONN = 63;

  logic clk = 0, rst_n = 0;
  logic cfg_we;
  logic [9:0] cfg_addr;
  logic [15:0] cfg_wdata;
  logic [NEXT-1:0] in_valid, in_ready, out_valid, out_ready;
  logic [NEXT-1:0][31:0] in_data, out_data;
  phase_e phases [NDA];

  da_array dut (
    .clk, .rst_n, .cfg_we_i(cfg_we), .cfg_addr_i(cfg_addr), .cfg_wdata_i(cfg_wdata),
    .ext_in_valid_i(in_valid), .ext_in_ready_o(in_ready), .ext_in_data_i(in_data),
    .ext_out_valid_o(out_valid), .ext_out_ready_i(out_ready), .ext_out_data_o(out_data),
    .da_phase_o(phases)
  );

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  int n_short = 0, n_stall = 0, n_sleep = 0, n_fork = 0, n_fwd = 0, n_narrow = 0, n_switch = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < NEXT; e++) if (out_valid[e] && !out_ready[e]) n_stall++;
    for (int c = 0; c < 2 * NDA; c++) if (dut.src_valid[c] && !dut.src_ready[c]) n_stall++;
    for (int d = 0; d < NDA; d++) if (phases[d] == PH_IDLE) n_sleep++;
    for (int d = 0; d < NDA; d++)
      if (dut.src_valid[2*d+1] && dut.src_ready[2*d+1]) n_fwd++;
  end

  // ---------------------------------------------------------------- bus
  task automatic bus(input int addr, input int data);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 10'(addr); cfg_wdata = 16'(data);
    @(negedge clk);
    cfg_we = 0;
  endtask
  task automatic unit_reg(input int d, input int r, input int v); bus((d << 5) | r, v); endtask
  task automatic route(input int sink, input int src); bus(512 | sink, src); endtask
  function automatic int cw(func_e f, int bw, bit cst, bit fwd, bit en);
    cfg_t c;
    c.en = en; c.cst_b = cst; c.blk = 0; c.fwd = fwd; c.bw_m1 = 4'(bw - 1); c.func = f;
    return int'(c);
  endfunction
  function automatic int src_da(int d, int c);  return 2 * d + c;   endfunction
  function automatic int src_ext(int e);        return 2 * NDA + e; endfunction
  function automatic int snk_da(int d, int c);  return 2 * d + c;   endfunction
  function automatic int snk_ext(int e);        return 2 * NDA + e; endfunction

  task automatic clear_routes();
    for (int t = 0; t < NCH; t++) route(t, UNCONN);
  endtask

  // ---------------------------------------------------------------- FIR
  localparam int TAPS = 32, NSAMP = 40;
  logic signed [15:0] h [TAPS];
  logic signed [15:0] xs [$];

  function automatic logic signed [15:0] trunc(logic signed [15:0] x, int bw);
    return (x >>> (16 - bw)) <<< (16 - bw);
  endfunction

  // ndot = 8: 32 taps on units 0-7, adders 8-14; ndot = 4: 16 taps on
  // units 0-3, adders 8, 9, 12, all other units asleep
  int ndot = 8;

  function automatic bit fir_adder(int d);
    return (ndot == 8) ? (d >= 8 && d < 15) : (d == 8 || d == 9 || d == 12);
  endfunction

  task automatic fir_config(input int bw);
    for (int d = 0; d < NDA; d++)
      if (d < ndot)         unit_reg(d, REG_CFG, cw(F_DOT, bw, 0, d < ndot - 1, 1));
      else if (fir_adder(d)) unit_reg(d, REG_CFG, cw(F_ADD, 16, 0, 0, 1));
      else                  unit_reg(d, REG_CFG, cw(F_DOT, 16, 0, 0, 0));   // asleep
  endtask

  task automatic fir_setup();
    clear_routes();
    for (int t = 0; t < TAPS; t++) h[t] = 16'($signed($urandom_range(0, 16000)) - 8000);
    for (int d = 0; d < ndot; d++)
      for (int a = 0; a < 16; a++) begin
        automatic int s = 0;
        for (int k = 0; k < 4; k++) if (a[k]) s += h[4 * d + k];
        unit_reg(d, a, s);
      end
    route(snk_da(0, 0), src_ext(0));
    for (int d = 1; d < ndot; d++) route(snk_da(d, 0), src_da(d - 1, 1));
    if (ndot == 4) begin
      route(snk_da(8, 0), src_da(0, 0)); route(snk_da(8, 1), src_da(1, 0));
      route(snk_da(9, 0), src_da(2, 0)); route(snk_da(9, 1), src_da(3, 0));
      route(snk_da(12, 0), src_da(8, 0)); route(snk_da(12, 1), src_da(9, 0));
      route(snk_ext(0), src_da(12, 0));
      return;
    end
    for (int i = 0; i < 4; i++) begin         // first adder level
      route(snk_da(8 + i, 0), src_da(2 * i, 0));
      route(snk_da(8 + i, 1), src_da(2 * i + 1, 0));
    end
    for (int i = 0; i < 2; i++) begin         // second level
      route(snk_da(12 + i, 0), src_da(8 + 2 * i, 0));
      route(snk_da(12 + i, 1), src_da(9 + 2 * i, 0));
    end
    route(snk_da(14, 0), src_da(12, 0));
    route(snk_da(14, 1), src_da(13, 0));
    route(snk_ext(0), src_da(14, 0));
  endtask

  task automatic fir_run(input int bw, input int nsamp, input bit bp = 1);
    int got = 0, t_first = 0, t_last = 0;
    int base = xs.size();
    fir_config(bw);
    if (bw < 16) n_narrow++;
    fork
      begin : feed
        for (int n = 0; n < nsamp; n++) begin
          automatic logic signed [15:0] x = 16'($signed($urandom_range(0, 8191)) - 4096);
          @(negedge clk);
          in_valid[0] = 1; in_data[0] = {16'h0, x};
          while (!in_ready[0]) @(negedge clk);
          xs.push_back(x);
          @(posedge clk);
          #1 in_valid[0] = 0;
        end
      end
      begin : collect
        while (got < nsamp) begin
          @(negedge clk);
          out_ready[0] = !bp || ($urandom_range(0, 3) != 0);
          #1;
          if (out_valid[0] && out_ready[0]) begin
            automatic int idx = base + got;
            automatic longint e = 0;
            for (int t = 0; t < 4 * ndot; t++)
              if (idx - t >= 0) e += longint'(h[t]) * longint'(trunc(xs[idx - t], bw));
            check(out_data[0] == 32'(e),
                  $sformatf("FIR bw=%0d y[%0d] got %0d exp %0d", bw, idx, $signed(out_data[0]), e));
            if (got == 0) t_first = cyc;
            t_last = cyc;
            got++;
          end
        end
        @(negedge clk);
        out_ready[0] = 1;
      end
    join
    $display("FIR %0d taps, bw=%0d: %0d outputs, %0d cycles per output", 4 * ndot, bw, nsamp,
             (t_last - t_first) / (nsamp - 1));
    // without back-pressure a DOT unit's period is IN + step into EXEC +
    // BW processing cycles + OUT
    if (!bp) check(t_last - t_first == (nsamp - 1) * (bw + 3),
                   $sformatf("FIR period %0d cycles for %0d outputs, expected %0d each",
                             t_last - t_first, nsamp - 1, bw + 3));
  endtask

  // ---------------------------------------------------------------- FFT
  typedef struct { int re; int im; } cplx_t;

  function automatic logic [31:0] pack(cplx_t c);
    return {16'(c.re), 16'(c.im)};
  endfunction
  function automatic cplx_t unpack(logic [31:0] v);
    cplx_t c;
    c.re = int'($signed(v[31:16])); c.im = int'($signed(v[15:0]));
    return c;
  endfunction
  function automatic cplx_t fx_add(cplx_t a, cplx_t b, bit sub);
    cplx_t c;
    c.re = int'($signed(16'(sub ? a.re - b.re : a.re + b.re)));
    c.im = int'($signed(16'(sub ? a.im - b.im : a.im + b.im)));
    return c;
  endfunction
  function automatic cplx_t fx_mul(cplx_t a, cplx_t w, int bw);
    cplx_t c;
    logic [31:0] re32, im32;
    longint wr_ = longint'(trunc(16'(w.re), bw)), wi_ = longint'(trunc(16'(w.im), bw));
    re32 = 32'(longint'(a.re) * wr_ - longint'(a.im) * wi_);
    im32 = 32'(longint'(a.re) * wi_ + longint'(a.im) * wr_);
    c.re = int'($signed(re32[30:15])); c.im = int'($signed(im32[30:15]));
    return c;
  endfunction

  cplx_t W0, W1;

  task automatic fft_setup();
    clear_routes();
    for (int d = 12; d < 16; d++) unit_reg(d, REG_CFG, cw(F_DOT, 16, 0, 0, 0));  // asleep
    // butterflies: {add unit, sub unit, mul unit, twiddle}
    // stage 1: (x0,x2) W^0 on units 0-2, (x1,x3) W^1 on units 3-5
    // stage 2: (A0,A1) W^0 on units 6-8, (M0,M1) W^0 on units 9-11
    for (int b = 0; b < 4; b++) begin
      automatic cplx_t w = (b == 1) ? W1 : W0;
      unit_reg(3 * b + 2, 0, w.re);
      unit_reg(3 * b + 2, 1, w.im);
    end
    route(snk_da(0, 0), src_ext(0)); route(snk_da(0, 1), src_ext(2));
    route(snk_da(1, 0), src_ext(0)); route(snk_da(1, 1), src_ext(2));
    route(snk_da(2, 0), src_da(1, 0));
    route(snk_da(3, 0), src_ext(1)); route(snk_da(3, 1), src_ext(3));
    route(snk_da(4, 0), src_ext(1)); route(snk_da(4, 1), src_ext(3));
    route(snk_da(5, 0), src_da(4, 0));
    route(snk_da(6, 0), src_da(0, 0)); route(snk_da(6, 1), src_da(3, 0));
    route(snk_da(7, 0), src_da(0, 0)); route(snk_da(7, 1), src_da(3, 0));
    route(snk_da(8, 0), src_da(7, 0));
    route(snk_da(9, 0), src_da(2, 0)); route(snk_da(9, 1), src_da(5, 0));
    route(snk_da(10, 0), src_da(2, 0)); route(snk_da(10, 1), src_da(5, 0));
    route(snk_da(11, 0), src_da(10, 0));
    route(snk_ext(0), src_da(6, 0));   // X0
    route(snk_ext(1), src_da(9, 0));   // X1
    route(snk_ext(2), src_da(8, 0));   // X2
    route(snk_ext(3), src_da(11, 0));  // X3
  endtask

  task automatic fft_config(input int bw);
    for (int b = 0; b < 4; b++) begin
      unit_reg(3 * b,     REG_CFG, cw(F_CADD, 16, 0, 0, 1));
      unit_reg(3 * b + 1, REG_CFG, cw(F_CSUB, 16, 0, 0, 1));
      unit_reg(3 * b + 2, REG_CFG, cw(F_CMUL, bw, 1, 0, 1));
    end
  endtask

  task automatic fft_run(input int bw, input int nblk);
    if (bw < 16) n_narrow++;
    fft_config(bw);
    for (int blk = 0; blk < nblk; blk++) begin
      cplx_t x [4], a0, a1, m0, m1, X [4];
      int got;
      bit [3:0] done, hs;
      for (int i = 0; i < 4; i++) begin
        x[i].re = $urandom_range(0, 16000) - 8000;
        x[i].im = $urandom_range(0, 16000) - 8000;
      end
      // fixed-point model of the mapped flow graph
      a0 = fx_add(x[0], x[2], 0);
      m0 = fx_mul(fx_add(x[0], x[2], 1), W0, bw);
      a1 = fx_add(x[1], x[3], 0);
      m1 = fx_mul(fx_add(x[1], x[3], 1), W1, bw);
      X[0] = fx_add(a0, a1, 0);
      X[2] = fx_mul(fx_add(a0, a1, 1), W0, bw);
      X[1] = fx_add(m0, m1, 0);
      X[3] = fx_mul(fx_add(m0, m1, 1), W0, bw);
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin in_valid[i] = 1; in_data[i] = pack(x[i]); end
      done = 0;
      got = 0;
      out_ready = 4'($urandom);
      while (got < 4 || in_valid != 0) begin
        #1;
        // forked inputs: each external word feeds an add and a subtract unit
        hs = in_valid & in_ready;
        for (int i = 0; i < 4; i++) if (hs[i]) n_fork++;
        for (int e = 0; e < 4; e++) if (out_valid[e] && out_ready[e]) begin
          check(!done[e] && out_data[e] == pack(X[e]),
                $sformatf("FFT bw=%0d X%0d got %h exp %h", bw, e, out_data[e], pack(X[e])));
          // against the exact 4-point DFT (W^1 = -j), a few LSB of rounding
          if (bw == 16) begin
            automatic cplx_t r = unpack(out_data[e]);
            automatic int dre, dim;
            case (e)
              0: begin dre = x[0].re + x[1].re + x[2].re + x[3].re; dim = x[0].im + x[1].im + x[2].im + x[3].im; end
              1: begin dre = x[0].re + x[1].im - x[2].re - x[3].im; dim = x[0].im - x[1].re - x[2].im + x[3].re; end
              2: begin dre = x[0].re - x[1].re + x[2].re - x[3].re; dim = x[0].im - x[1].im + x[2].im - x[3].im; end
              default: begin dre = x[0].re - x[1].im - x[2].re + x[3].im; dim = x[0].im + x[1].re - x[2].im - x[3].re; end
            endcase
            check((r.re - dre) <= 4 && (dre - r.re) <= 4 && (r.im - dim) <= 4 && (dim - r.im) <= 4,
                  $sformatf("FFT X%0d (%0d,%0d) vs DFT (%0d,%0d)", e, r.re, r.im, dre, dim));
          end
          done[e] = 1;
          got++;
        end
        @(posedge clk);
        #1;
        in_valid = in_valid & ~hs;
        @(negedge clk);
        out_ready = 4'($urandom);
      end
      out_ready = '1;
    end
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    in_valid = 0; in_data = '0; out_ready = '1;
    W0.re = 32767; W0.im = 0;
    W1.re = 0;     W1.im = -32768;
    repeat (3) @(negedge clk);
    rst_n = 1;

    fir_setup();
    fir_run(16, NSAMP);
    fir_run(8, NSAMP / 2);
    // shorter filter on fewer units, same sample history
    ndot = 4;
    n_short++;
    fir_setup();
    fir_run(16, 12);
    ndot = 8;

    n_switch++;
    fft_setup();
    fft_run(16, 8);
    fft_run(8, 4);

    // and back to the filter
    n_switch++;
    xs.delete();
    for (int d = 0; d < 8; d++) unit_reg(d, REG_CFG, cw(F_DOT, 16, 0, 0, 0));
    // the delay line kept its samples while the FFT ran; start from zero by
    // flushing four zero samples through a fresh filter set-up
    fir_setup();
    begin
      automatic logic signed [15:0] dummy;
      fir_config(16);
      for (int n = 0; n < 32; n++) begin
        @(negedge clk);
        in_valid[0] = 1; in_data[0] = 32'h0;
        while (!in_ready[0]) @(negedge clk);
        @(posedge clk);
        #1 in_valid[0] = 0;
        while (!out_valid[0]) @(negedge clk);
        @(negedge clk);
      end
      dummy = 0;
    end
    fir_run(16, 10, 0);
    fir_run(6, 10, 0);

    $display("cycles used: %0d", cyc);
    $display("mechanisms: short=%0d stall=%0d sleep=%0d fork=%0d forward=%0d narrow=%0d switch=%0d",
             n_short, n_stall, n_sleep, n_fork, n_fwd, n_narrow, n_switch);
    check(n_stall > 0, "back-pressure stall never happened");
    check(n_sleep > 0, "no unit ever slept");
    check(n_fork > 0, "no forked transfer");
    check(n_fwd > 0, "no delay-line forwarding");
    check(n_narrow > 0, "no reduced bit-width run");
    check(n_switch > 0, "no reconfiguration");
    check(n_short > 0, "no shortened filter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
