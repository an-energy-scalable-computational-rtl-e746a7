// da_accum: the DA shift-and-accumulate register, 32 bits split into two
// 16-bit halves.
//
// Operations (op_i):
//   ACC_HOLD   keep the value
//   ACC_LOAD   q <= d
//   ACC_SHADD  q <= 2*q + d            (one bit step of MSB-first serial DA
//                                       or multiplication; d sign-extended)
//   ACC_ADD    q <= q + d              (32-bit parallel addition)
//   ACC_SADD   hi <= hi + d.hi, lo <= lo + d.lo   (two independent 16-bit
//   ACC_SSUB   hi <= hi - d.hi, lo <= lo - d.lo    additions in one cycle)
// en_hi_i / en_lo_i enable the upper and lower halves separately; they stand
// for the per-half clock gates that save power when fewer bits are needed.
// A disabled half keeps its value.
//
// nxt_o is the value the register will take at the next edge (with both
// halves enabled), so the unit can use a finished product in the cycle it
// completes. The split and the per-half enables follow the architecture; the
// operation set is this design's own.
//
// Timing: one operation per clock; synchronous update, asynchronous reset.
module da_accum
  import da_pkg::*;
#(
  parameter int unsigned HW = 16      // width of one half
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en_hi_i,
  input  logic            en_lo_i,
  input  acc_op_e         op_i,
  input  logic [2*HW-1:0] d_i,
  output logic [2*HW-1:0] q_o,
  output logic [2*HW-1:0] nxt_o
);

  logic [HW-1:0] hi_q, lo_q;

  always_comb begin
    unique case (op_i)
      ACC_LOAD:  nxt_o = d_i;
      ACC_SHADD: nxt_o = {hi_q, lo_q} + {hi_q, lo_q} + d_i;
      ACC_ADD:   nxt_o = {hi_q, lo_q} + d_i;
      ACC_SADD:  nxt_o = {hi_q + d_i[2*HW-1:HW], lo_q + d_i[HW-1:0]};
      ACC_SSUB:  nxt_o = {hi_q - d_i[2*HW-1:HW], lo_q - d_i[HW-1:0]};
      default:   nxt_o = {hi_q, lo_q};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi_q <= '0;
      lo_q <= '0;
    end else begin
      if (en_hi_i) hi_q <= nxt_o[2*HW-1:HW];
      if (en_lo_i) lo_q <= nxt_o[HW-1:0];
    end
  end

  assign q_o = {hi_q, lo_q};

endmodule
