// tb_da_accum: self-checking testbench of the split DA accumulator.
//
// Applies random operations with random half enables and checks the
// registered value and the next-value output after every edge against a
// reference model; then runs a full MSB-first serial multiplication through
// ACC_SHADD and checks the product.
module tb_da_accum;
  import da_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en_hi, en_lo;
  acc_op_e op;
  logic [31:0] d, q, nxt;

  da_accum #(.HW(16)) dut (.clk, .rst_n, .en_hi_i(en_hi), .en_lo_i(en_lo), .op_i(op), .d_i(d), .q_o(q), .nxt_o(nxt));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] m, e;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en_hi = 1; en_lo = 1; op = ACC_HOLD; d = 0; m = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      op = acc_op_e'($urandom_range(0, 5));
      d = $urandom;
      en_hi = ($urandom_range(0, 3) != 0);
      en_lo = ($urandom_range(0, 3) != 0);
      case (op)
        ACC_LOAD:  e = d;
        ACC_SHADD: e = (m << 1) + d;
        ACC_ADD:   e = m + d;
        ACC_SADD:  e = {m[31:16] + d[31:16], m[15:0] + d[15:0]};
        ACC_SSUB:  e = {m[31:16] - d[31:16], m[15:0] - d[15:0]};
        default:   e = m;
      endcase
      #1;
      checks++;
      if (nxt !== e) begin failures++; $display("FAIL nxt op %0d", op); end
      @(negedge clk);
      if (en_hi) m[31:16] = e[31:16];
      if (en_lo) m[15:0] = e[15:0];
      op = ACC_HOLD;
      checks++;
      if (q !== m) begin failures++; $display("FAIL q op %0d got %h exp %h", op, q, m); end
    end
    // serial multiply 16x16 MSB first: -x for the sign bit
    en_hi = 1; en_lo = 1;
    for (int n = 0; n < 20; n++) begin
      automatic logic signed [15:0] a = 16'($urandom), b = 16'($urandom);
      for (int j = 15; j >= 0; j--) begin
        @(negedge clk);
        op = (j == 15) ? ACC_LOAD : ACC_SHADD;
        d = b[j] ? ((j == 15) ? -32'($signed(a)) : 32'($signed(a))) : 32'h0;
      end
      @(negedge clk);
      op = ACC_HOLD;
      checks++;
      if ($signed(q) !== 32'(a * b)) begin failures++; $display("FAIL serial multiply %0d*%0d got %0d", a, b, $signed(q)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
