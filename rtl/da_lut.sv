// da_lut: the distributed-arithmetic look-up table.
//
// DEPTH (= 2^M) words, each the precomputed sum of the constant coefficients
// a_k selected by the bits of its address: word[addr] = sum_k addr[k] * a_k.
// The host writes the words at configuration time through the write port; the
// unit reads one word per cycle, addressed by a bit column of the shift
// memory. Functions other than the inner product use words 0 and 1 as
// constant operands (a multiplier constant or a twiddle factor).
//
// Timing: synchronous write, combinational read. The table is not reset; the
// host must write every word it uses.
module da_lut #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     we_i,
  input  logic [$clog2(DEPTH)-1:0] waddr_i,
  input  logic [WIDTH-1:0]         wdata_i,
  input  logic [$clog2(DEPTH)-1:0] raddr_i,
  output logic [WIDTH-1:0]         rdata_o,
  output logic [WIDTH-1:0]         word0_o,   // constant operand, real part
  output logic [WIDTH-1:0]         word1_o    // constant operand, imaginary part
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
  end

  assign rdata_o = mem[raddr_i];
  assign word0_o = mem[0];
  assign word1_o = mem[1];

endmodule
