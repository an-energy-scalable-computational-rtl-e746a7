// tb_da_shift_mem: self-checking testbench of the DA shift memory.
//
// Keeps a reference copy of the rows, applies random pushes (delay line),
// row loads and idle cycles with the clock gate off, and after every edge
// compares all parallel row outputs, the evicted word and the bit-column
// (LUT address) output for every column.
module tb_da_shift_mem;
  localparam int ROWS = 4, W = 16;
  logic clk = 0, rst_n = 0;
  logic mem_en, push, load;
  logic [1:0] load_row;
  logic [W-1:0] din;
  logic [3:0] col;
  logic [ROWS-1:0] ydo;
  logic [W-1:0] xdo [ROWS];
  logic [W-1:0] evict;

  da_shift_mem #(.ROWS(ROWS), .WIDTH(W)) dut (
    .clk, .rst_n, .mem_en, .push_i(push), .load_i(load), .load_row_i(load_row),
    .din_i(din), .col_i(col), .ydo_o(ydo), .xdo_o(xdo), .evict_o(evict)
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [W-1:0] ref_m [ROWS];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int r = 0; r < ROWS; r++) begin
      checks++;
      if (xdo[r] !== ref_m[r]) begin failures++; $display("FAIL row %0d %h exp %h", r, xdo[r], ref_m[r]); end
    end
    checks++;
    if (evict !== ref_m[ROWS-1]) begin failures++; $display("FAIL evict"); end
    for (int c = 0; c < W; c++) begin
      col = 4'(c);
      #1;
      for (int r = 0; r < ROWS; r++) begin
        checks++;
        if (ydo[r] !== ref_m[r][c]) begin failures++; $display("FAIL ydo col %0d row %0d", c, r); end
      end
    end
  endtask

  initial begin
    mem_en = 1; push = 0; load = 0; load_row = 0; din = 0; col = 0;
    for (int r = 0; r < ROWS; r++) ref_m[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare();
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      mem_en = ($urandom_range(0, 4) != 0);
      push = $urandom_range(0, 1);
      load = $urandom_range(0, 1);
      load_row = 2'($urandom);
      din = 16'($urandom);
      @(posedge clk);
      if (mem_en) begin
        if (push) begin
          for (int r = ROWS - 1; r > 0; r--) ref_m[r] = ref_m[r-1];
          ref_m[0] = din;
        end else if (load) ref_m[load_row] = din;
      end
      @(negedge clk);
      push = 0; load = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
