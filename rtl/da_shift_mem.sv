// da_shift_mem: the DA input shift memory, a ROWS x WIDTH multiport register
// file.
//
// Each row holds one input word x_k. It is written in parallel along the X
// direction, either into a chosen row (block load) or by pushing a new word
// into row 0 while every row moves down by one (a tapped delay line for FIR
// filtering; the word leaving the last row is visible on evict_o before the
// push). Along the Y direction one bit column is read at a time: bit col_i of
// every row forms the ROWS-bit LUT address (the YDO port). All rows are also
// readable in parallel (the XDO port).
//
// The architecture builds this as a 6T-SRAM array with two write and three
// read ports; here it is an array of flip-flops with the same ports and the
// same row/column organisation. mem_en stands for the clock gate of the idle
// phase: nothing is written while it is low.
//
// Timing: writes take effect at the rising clock edge; reads are
// combinational. Reset clears all rows (the delay line starts at zero).
module da_shift_mem #(
  parameter int unsigned ROWS  = 4,
  parameter int unsigned WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     mem_en,                 // clock-gate enable
  input  logic                     push_i,                 // delay-line push of din_i
  input  logic                     load_i,                 // write din_i into row load_row_i
  input  logic [$clog2(ROWS)-1:0]  load_row_i,
  input  logic [WIDTH-1:0]         din_i,
  input  logic [$clog2(WIDTH)-1:0] col_i,                  // Y-port bit column
  output logic [ROWS-1:0]          ydo_o,                  // LUT address
  output logic [WIDTH-1:0]         xdo_o [ROWS],           // all rows, parallel
  output logic [WIDTH-1:0]         evict_o                 // last row
);

  logic [WIDTH-1:0] mem [ROWS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) mem[r] <= '0;
    end else if (mem_en) begin
      if (push_i) begin
        mem[0] <= din_i;
        for (int r = 1; r < ROWS; r++) mem[r] <= mem[r-1];
      end else if (load_i) begin
        mem[load_row_i] <= din_i;
      end
    end
  end

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      ydo_o[r] = mem[r][col_i];
      xdo_o[r] = mem[r];
    end
  end

  assign evict_o = mem[ROWS-1];

endmodule
