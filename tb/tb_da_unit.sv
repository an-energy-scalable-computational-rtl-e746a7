// tb_da_unit: self-checking testbench of the enhanced DA unit.
//
// Configures the unit for each function in turn, feeds random operands,
// and compares every result with a model computed here from integer
// arithmetic (inner product, products, quotient, integer square root,
// complex sums and Q1.15 complex products). It also checks the processing
// latency of each function (edges from the last operand taken to the result
// appearing), the delay-line word forwarded on output b, reduced input bit
// widths, constant operands from the LUT, the idle phase and output
// back-pressure.
module tb_da_unit;
  import da_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cfg_we;
  logic [4:0] cfg_addr;
  logic [15:0] cfg_wdata;
  logic [1:0] in_valid, in_ready, out_valid, out_ready;
  logic [1:0][31:0] in_data, out_data;
  phase_e phase;

  da_unit dut (
    .clk, .rst_n, .cfg_we_i(cfg_we), .cfg_addr_i(cfg_addr), .cfg_wdata_i(cfg_wdata),
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_data_i(in_data),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_data_o(out_data),
    .phase_o(phase)
  );

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int addr, input int data);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 5'(addr); cfg_wdata = 16'(data);
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic logic [15:0] cfgw(func_e f, int bw, bit cst, bit blk, bit fwd);
    cfg_t c;
    c.en = 1; c.cst_b = cst; c.blk = blk; c.fwd = fwd; c.bw_m1 = 4'(bw - 1); c.func = f;
    return 16'(c);
  endfunction

  // send one word on channel ch; returns the edge that took it
  task automatic send(input int ch, input logic [31:0] d, output int t);
    @(negedge clk);
    in_valid[ch] = 1; in_data[ch] = d;
    while (!in_ready[ch]) @(negedge clk);
    t = cyc + 1;
    @(negedge clk);
    in_valid[ch] = 0;
  endtask

  // wait for the result on channel 0; returns the edge after which it was valid
  task automatic recv(output logic [31:0] d, output int t);
    while (!out_valid[0]) @(negedge clk);
    d = out_data[0];
    t = cyc;
    @(negedge clk);
  endtask

  task automatic op2(input logic [31:0] a, b, input bit use_b, output logic [31:0] r, output int lat);
    int ta, tb_, tr;
    send(0, a, ta);
    tb_ = ta;
    if (use_b) send(1, b, tb_);
    recv(r, tr);
    lat = tr - ((tb_ > ta) ? tb_ : ta);
  endtask

  function automatic logic signed [15:0] trunc(logic signed [15:0] x, int bw);
    return (x >>> (16 - bw)) <<< (16 - bw);
  endfunction

  int lat, t;
  logic [31:0] r, exp_r;
  logic signed [15:0] coef [4];
  logic signed [15:0] hist [8];

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    in_valid = 0; in_data = '0; out_ready = 2'b11;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------- idle: unit asleep, takes nothing
    wr(REG_CFG, 0);
    @(negedge clk); in_valid = 2'b11;
    repeat (4) @(negedge clk);
    check(phase == PH_IDLE && in_ready == 2'b00, "idle unit takes no input");
    in_valid = 0;

    // ---------------- DOT, delay line with forwarding, full and reduced width
    for (int bwsel = 0; bwsel < 2; bwsel++) begin
      automatic int bw = bwsel ? 8 : 16;
      for (int k = 0; k < 4; k++) coef[k] = 16'($signed($urandom_range(0, 16000)) - 8000);
      for (int adr = 0; adr < 16; adr++) begin
        automatic int s = 0;
        for (int k = 0; k < 4; k++) if (adr[k]) s += coef[k];
        wr(adr, s);
      end
      wr(REG_CFG, cfgw(F_DOT, bw, 0, 0, 1));
      for (int k = 0; k < 8; k++) hist[k] = 0;
      for (int n = 0; n < 10; n++) begin
        automatic logic signed [15:0] x = 16'($urandom);
        automatic longint e = 0;
        automatic logic [31:0] ev_seen = 0;
        automatic bit ev_ok = 0;
        // rows keep the last 4 samples; after reconfiguration the first row
        // contents are those left by the previous run
        for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = x;
        send(0, {16'h0, x}, t);
        // capture the forwarded word while the result is pending
        while (!out_valid[0]) begin
          if (out_valid[1]) begin ev_seen = out_data[1]; ev_ok = 1; end
          @(negedge clk);
        end
        if (out_valid[1]) begin ev_seen = out_data[1]; ev_ok = 1; end
        r = out_data[0];
        lat = cyc - t;
        @(negedge clk);
        if (bwsel == 0 || n >= 4) begin
          for (int k = 0; k < 4; k++) e += longint'(coef[k]) * longint'(trunc(hist[k], bw));
          check(r == 32'(e), $sformatf("DOT bw=%0d n=%0d got %0d exp %0d", bw, n, $signed(r), e));
          check(ev_ok && ev_seen == 32'($signed(hist[4])), $sformatf("DOT forward n=%0d", n));
        end
        check(lat == bw + 1, $sformatf("DOT latency %0d (bw %0d)", lat, bw));
      end
    end

    // ---------------- DOT, block load of 4 words
    wr(REG_CFG, cfgw(F_DOT, 16, 0, 1, 0));
    for (int rep = 0; rep < 3; rep++) begin
      automatic longint e = 0;
      logic signed [15:0] xs [4];
      for (int k = 0; k < 4; k++) begin
        xs[k] = 16'($urandom);
        send(0, {16'h0, xs[k]}, t);
        e += longint'(coef[k]) * longint'(xs[k]);
      end
      recv(r, lat);
      check(r == 32'(e), $sformatf("DOT block got %0d exp %0d", $signed(r), e));
    end

    // ---------------- MUL
    for (int bwsel = 0; bwsel < 2; bwsel++) begin
      automatic int bw = bwsel ? 5 : 16;
      wr(REG_CFG, cfgw(F_MUL, bw, 0, 0, 0));
      for (int n = 0; n < 8; n++) begin
        automatic logic signed [15:0] a = 16'($urandom), b = 16'($urandom);
        if (n == 0) begin a = -16'sd32768; b = -16'sd32768; end
        op2({16'h0, a}, {16'h0, b}, 1, r, lat);
        exp_r = 32'(longint'(a) * longint'(trunc(b, bw)));
        check(r == exp_r, $sformatf("MUL bw=%0d %0d*%0d got %0d", bw, a, b, $signed(r)));
        check(lat == bw + 1, $sformatf("MUL latency %0d", lat));
      end
    end
    // MUL by a LUT constant
    wr(0, -1234);
    wr(REG_CFG, cfgw(F_MUL, 16, 1, 0, 0));
    begin
      automatic logic signed [15:0] a = 16'($urandom);
      op2({16'h0, a}, 0, 0, r, lat);
      check(r == 32'(longint'(a) * -1234), "MUL constant operand");
    end

    // ---------------- DIV
    wr(REG_CFG, cfgw(F_DIV, 16, 0, 0, 0));
    for (int n = 0; n < 10; n++) begin
      automatic logic [15:0] a = 16'($urandom), b = 16'($urandom_range(1, 65535));
      if (n < 3) b = 16'($urandom_range(1, 40));
      op2({16'h0, a}, {16'h0, b}, 1, r, lat);
      check(r == {a % b, a / b}, $sformatf("DIV %0d/%0d got q=%0d r=%0d", a, b, r[15:0], r[31:16]));
      check(lat == 17, $sformatf("DIV latency %0d", lat));
    end

    // ---------------- SQRT
    wr(REG_CFG, cfgw(F_SQRT, 16, 0, 0, 0));
    for (int n = 0; n < 10; n++) begin
      automatic logic [31:0] a = $urandom;
      automatic longint lo = 0, hi = 65536;
      if (n == 0) a = 32'hFFFF_FFFF;
      if (n == 1) a = 0;
      if (n == 2) a = 32'd144;
      while (hi - lo > 1) begin
        automatic longint m = (lo + hi) / 2;
        if (m * m <= longint'(a)) lo = m; else hi = m;
      end
      op2(a, 0, 0, r, lat);
      check(r == 32'(lo), $sformatf("SQRT %0d got %0d exp %0d", a, r, lo));
      check(lat == 17, $sformatf("SQRT latency %0d", lat));
    end

    // ---------------- ADD, CADD, CSUB
    for (int f = 0; f < 3; f++) begin
      wr(REG_CFG, cfgw(f == 0 ? F_ADD : f == 1 ? F_CADD : F_CSUB, 16, 0, 0, 0));
      for (int n = 0; n < 6; n++) begin
        automatic logic [31:0] a = $urandom, b = $urandom;
        op2(a, b, 1, r, lat);
        case (f)
          0: exp_r = a + b;
          1: exp_r = {a[31:16] + b[31:16], a[15:0] + b[15:0]};
          default: exp_r = {a[31:16] - b[31:16], a[15:0] - b[15:0]};
        endcase
        check(r == exp_r, $sformatf("ADD-type f=%0d got %h exp %h", f, r, exp_r));
        check(lat == 2, $sformatf("ADD-type latency %0d", lat));
      end
    end

    // ---------------- CMUL (Q1.15), channel and LUT twiddle, reduced width
    for (int mode = 0; mode < 3; mode++) begin
      automatic int bw = (mode == 1) ? 6 : 16;
      automatic bit cst = (mode == 2);
      automatic logic signed [15:0] wr_ = 16'($urandom), wi_ = 16'($urandom);
      if (cst) begin wr(0, wr_); wr(1, wi_); end
      wr(REG_CFG, cfgw(F_CMUL, bw, cst, 0, 0));
      for (int n = 0; n < 5; n++) begin
        automatic logic signed [15:0] ar = 16'($urandom), ai = 16'($urandom);
        automatic logic [31:0] re32, im32;
        if (!cst) begin wr_ = 16'($urandom); wi_ = 16'($urandom); end
        op2({ar, ai}, {wr_, wi_}, !cst, r, lat);
        re32 = 32'(longint'(ar) * trunc(wr_, bw) - longint'(ai) * trunc(wi_, bw));
        im32 = 32'(longint'(ar) * trunc(wi_, bw) + longint'(ai) * trunc(wr_, bw));
        exp_r = {re32[30:15], im32[30:15]};
        check(r == exp_r, $sformatf("CMUL bw=%0d got %h exp %h", bw, r, exp_r));
        check(lat == 4 * bw + 1, $sformatf("CMUL latency %0d", lat));
      end
    end

    // ---------------- POLY (Horner), degrees 1..4
    for (int deg = 1; deg <= 4; deg++) begin
      logic signed [15:0] c [5];
      for (int i = 0; i <= deg; i++) begin
        c[i] = 16'($signed($urandom_range(0, 16000)) - 8000);
        wr(i, c[i]);
      end
      wr(REG_CFG, cfgw(F_POLY, deg + 1, 0, 0, 0));   // bit-width field = degree
      for (int n = 0; n < 4; n++) begin
        automatic logic signed [15:0] x = 16'($urandom), hh = c[deg];
        for (int i = deg - 1; i >= 0; i--) begin
          automatic logic [31:0] p32 = 32'(longint'(hh) * longint'(x));
          hh = p32[30:15] + c[i];
        end
        op2({16'h0, x}, 0, 0, r, lat);
        check(r == 32'(hh), $sformatf("POLY deg %0d x=%0d got %0d exp %0d", deg, x, $signed(r), hh));
        check(lat == 16 * deg + 1, $sformatf("POLY latency %0d", lat));
      end
    end

    // ---------------- output back-pressure
    wr(REG_CFG, cfgw(F_ADD, 16, 0, 0, 0));
    out_ready = 2'b00;
    send(0, 32'd100, t);
    send(1, 32'd23, t);
    while (!out_valid[0]) @(negedge clk);
    repeat (5) @(negedge clk);
    check(out_valid[0] && out_data[0] == 32'd123 && in_ready == 2'b00, "result held under back-pressure");
    out_ready = 2'b11;
    @(negedge clk);
    @(negedge clk);
    check(!out_valid[0] && phase == PH_IN, "result released after back-pressure");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
