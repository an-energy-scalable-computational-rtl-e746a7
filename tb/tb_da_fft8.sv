// tb_da_fft8: an 8-point FFT computed on the 4x4 DA array by iteration.
//
// The testbench plays the host controller: it keeps partial results between
// passes, reprograms the array and reorders the data. Radix-2 decimation in
// frequency:
//   pass 1a, 1b: first-stage butterflies (x[i], x[i+4]) with twiddle W8^i,
//                two per pass (units 0-2 and 3-5), giving a[i] = x[i]+x[i+4]
//                and b[i] = (x[i]-x[i+4]) W8^i;
//   pass 2, 3:   the 4-point FFT mapping (12 units) on a[] for the even
//                outputs X[2k] and on b[] for the odd outputs X[2k+1].
// Every array output is checked bit-exactly against a fixed-point model of
// the same flow graph, and the final spectrum against the exact DFT
// (within 8 LSB).
module tb_da_fft8;
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
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus(input int addr, input int data);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 10'(addr); cfg_wdata = 16'(data);
    @(negedge clk);
    cfg_we = 0;
  endtask
  task automatic unit_reg(input int d, input int r, input int v); bus((d << 5) | r, v); endtask
  task automatic route(input int sink, input int src); bus(512 | sink, src); endtask
  function automatic int cw(func_e f, bit cst, bit en);
    cfg_t c;
    c.en = en; c.cst_b = cst; c.blk = 0; c.fwd = 0; c.bw_m1 = 4'd15; c.func = f;
    return int'(c);
  endfunction

  typedef struct { int re; int im; } cplx_t;
  function automatic logic [31:0] pack(cplx_t c); return {16'(c.re), 16'(c.im)}; endfunction
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
  function automatic cplx_t fx_mul(cplx_t a, cplx_t w);
    cplx_t c;
    logic [31:0] re32, im32;
    re32 = 32'(longint'(a.re) * w.re - longint'(a.im) * w.im);
    im32 = 32'(longint'(a.re) * w.im + longint'(a.im) * w.re);
    c.re = int'($signed(re32[30:15])); c.im = int'($signed(im32[30:15]));
    return c;
  endfunction

  cplx_t W8 [4];

  // one butterfly on units u..u+2: inputs from array inputs ia, ib,
  // sum to array output oa, twiddled difference to array output ob
  task automatic map_bfly(input int u, input int ia, input int ib, input int oa, input int ob, input cplx_t w);
    unit_reg(u,     REG_CFG, cw(F_CADD, 0, 1));
    unit_reg(u + 1, REG_CFG, cw(F_CSUB, 0, 1));
    unit_reg(u + 2, 0, w.re);
    unit_reg(u + 2, 1, w.im);
    unit_reg(u + 2, REG_CFG, cw(F_CMUL, 1, 1));
    route(2 * u, 32 + ia);       route(2 * u + 1, 32 + ib);
    route(2 * (u + 1), 32 + ia); route(2 * (u + 1) + 1, 32 + ib);
    route(2 * (u + 2), 2 * (u + 1));
    route(32 + oa, 2 * u);
    route(32 + ob, 2 * (u + 2));
  endtask

  task automatic reset_array();
    for (int d = 0; d < NDA; d++) unit_reg(d, REG_CFG, cw(F_ADD, 0, 0));
    for (int t = 0; t < NCH; t++) route(t, UNCONN);
  endtask

  task automatic map_fft4();
    reset_array();
    for (int b = 0; b < 4; b++) begin
      automatic cplx_t w = (b == 1) ? W8[2] : W8[0];
      unit_reg(3 * b,     REG_CFG, cw(F_CADD, 0, 1));
      unit_reg(3 * b + 1, REG_CFG, cw(F_CSUB, 0, 1));
      unit_reg(3 * b + 2, 0, w.re);
      unit_reg(3 * b + 2, 1, w.im);
      unit_reg(3 * b + 2, REG_CFG, cw(F_CMUL, 1, 1));
    end
    route(0, 32); route(1, 34); route(2, 32); route(3, 34); route(4, 2);
    route(6, 33); route(7, 35); route(8, 33); route(9, 35); route(10, 8);
    route(12, 0); route(13, 6); route(14, 0); route(15, 6); route(16, 14);
    route(18, 4); route(19, 10); route(20, 4); route(21, 10); route(22, 20);
    route(32, 12); route(33, 18); route(34, 16); route(35, 22);
  endtask

  // present four words, collect four results (in array-output order)
  task automatic pass(input cplx_t xin [4], output cplx_t yout [4]);
    bit [3:0] hs, done;
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin in_valid[i] = 1; in_data[i] = pack(xin[i]); end
    done = 0;
    while (done != 4'hF || in_valid != 0) begin
      #1;
      hs = in_valid & in_ready;
      for (int e = 0; e < 4; e++) if (out_valid[e] && out_ready[e]) begin
        yout[e] = unpack(out_data[e]);
        done[e] = 1;
      end
      @(posedge clk);
      #1;
      in_valid = in_valid & ~hs;
      @(negedge clk);
    end
  endtask

  cplx_t x [8], a [4], b [4], X [8], t_in [4], t_out [4];

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    in_valid = 0; in_data = '0; out_ready = '1;
    W8[0].re = 32767;  W8[0].im = 0;
    W8[1].re = 23170;  W8[1].im = -23170;
    W8[2].re = 0;      W8[2].im = -32768;
    W8[3].re = -23170; W8[3].im = -23170;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < 8; i++) begin
        x[i].re = $urandom_range(0, 8000) - 4000;
        x[i].im = $urandom_range(0, 8000) - 4000;
      end
      // passes 1a / 1b: first stage, two butterflies at a time
      for (int p = 0; p < 2; p++) begin
        reset_array();
        map_bfly(0, 0, 1, 0, 1, W8[2 * p]);
        map_bfly(3, 2, 3, 2, 3, W8[2 * p + 1]);
        t_in[0] = x[2 * p];     t_in[1] = x[2 * p + 4];
        t_in[2] = x[2 * p + 1]; t_in[3] = x[2 * p + 5];
        pass(t_in, t_out);
        for (int q = 0; q < 2; q++) begin
          automatic int i = 2 * p + q;
          automatic cplx_t ea = fx_add(x[i], x[i + 4], 0);
          automatic cplx_t eb = fx_mul(fx_add(x[i], x[i + 4], 1), W8[i]);
          a[i] = t_out[2 * q];
          b[i] = t_out[2 * q + 1];
          check(a[i] == ea && b[i] == eb, $sformatf("stage-1 butterfly %0d", i));
        end
      end
      // passes 2 and 3: 4-point FFTs of a[] and b[]
      map_fft4();
      for (int h = 0; h < 2; h++) begin
        automatic cplx_t A0, A1, M0, M1, E [4];
        t_in = (h == 0) ? a : b;
        A0 = fx_add(t_in[0], t_in[2], 0);
        M0 = fx_mul(fx_add(t_in[0], t_in[2], 1), W8[0]);
        A1 = fx_add(t_in[1], t_in[3], 0);
        M1 = fx_mul(fx_add(t_in[1], t_in[3], 1), W8[2]);
        E[0] = fx_add(A0, A1, 0);
        E[2] = fx_mul(fx_add(A0, A1, 1), W8[0]);
        E[1] = fx_add(M0, M1, 0);
        E[3] = fx_mul(fx_add(M0, M1, 1), W8[0]);
        pass(t_in, t_out);
        for (int k = 0; k < 4; k++) begin
          check(t_out[k] == E[k], $sformatf("4-point pass %0d output %0d", h, k));
          X[2 * k + h] = t_out[k];
        end
      end
      // against the exact DFT
      for (int k = 0; k < 8; k++) begin
        automatic real sr = 0.0, si = 0.0;
        for (int n = 0; n < 8; n++) begin
          automatic real ang = -2.0 * 3.14159265358979 * real'(n * k) / 8.0;
          sr += real'(x[n].re) * $cos(ang) - real'(x[n].im) * $sin(ang);
          si += real'(x[n].re) * $sin(ang) + real'(x[n].im) * $cos(ang);
        end
        check((real'(X[k].re) - sr) < 8.0 && (sr - real'(X[k].re)) < 8.0 &&
              (real'(X[k].im) - si) < 8.0 && (si - real'(X[k].im)) < 8.0,
              $sformatf("X[%0d] = (%0d,%0d), DFT (%0.1f,%0.1f)", k, X[k].re, X[k].im, sr, si));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
