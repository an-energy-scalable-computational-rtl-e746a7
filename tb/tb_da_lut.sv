// tb_da_lut: self-checking testbench of the DA look-up table.
//
// Fills the table with the coefficient sums of a random 4-coefficient
// vector, as a host would for an inner product, reads every address back
// and checks the two constant-operand outputs, then overwrites random words
// and checks again against a reference copy.
module tb_da_lut;
  logic clk = 0;
  logic we;
  logic [3:0] waddr, raddr;
  logic [15:0] wdata, rdata, w0, w1;

  da_lut #(.DEPTH(16), .WIDTH(16)) dut (
    .clk, .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
    .raddr_i(raddr), .rdata_o(rdata), .word0_o(w0), .word1_o(w1)
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [15:0] ref_m [16];
  logic signed [15:0] a [4];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic readback();
    for (int i = 0; i < 16; i++) begin
      raddr = 4'(i);
      #1;
      checks++;
      if (rdata !== ref_m[i]) begin failures++; $display("FAIL word %0d %h exp %h", i, rdata, ref_m[i]); end
    end
    checks += 2;
    if (w0 !== ref_m[0]) begin failures++; $display("FAIL word0"); end
    if (w1 !== ref_m[1]) begin failures++; $display("FAIL word1"); end
  endtask

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int k = 0; k < 4; k++) a[k] = 16'($signed($urandom_range(0, 16000)) - 8000);
    for (int i = 0; i < 16; i++) begin
      automatic int s = 0;
      for (int k = 0; k < 4; k++) if (i[k]) s += a[k];
      ref_m[i] = 16'(s);
      @(negedge clk);
      we = 1; waddr = 4'(i); wdata = 16'(s);
    end
    @(negedge clk);
    we = 0;
    readback();
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); waddr = 4'($urandom); wdata = 16'($urandom);
      if (we) ref_m[waddr] = wdata;
      @(negedge clk);
      we = 0;
      readback();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
