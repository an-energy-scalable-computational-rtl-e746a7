// da_interconnect: configurable routing between the DA units' channels and
// the array's external channels.
//
// Every sink (a DA input channel or an array output) holds a configuration
// register naming the source (a DA output channel or an array input) it
// listens to; a value of NSRC or more leaves the sink unconnected. A source
// may feed several sinks (fork): its word moves only on an edge where every
// sink that listens to it is ready. A listening sink sees the word valid
// while all the other listeners are ready, so its own valid does not depend
// on its own ready. A sink such as a DA unit waiting for two producers (join) simply
// waits until both of its channels have delivered. A source no sink listens
// to is always ready, so its words are dropped.
//
// Source numbering: DA d output c -> 2*d + c, array input e -> 2*NDA + e.
// Sink numbering:   DA d input  c -> 2*d + c, array output e -> 2*NDA + e.
//
// The architecture embeds the units in an island-style fabric of segmented
// tracks, connection boxes and Wilton switch boxes with transmission-gate
// switches, wired by handshaking. This module gives the same logical
// connectivity (any source to any sink) as one word-wide multiplexer per
// sink; the track-level topology and the switch circuits are not modelled.
// The valid/ready protocol is this design's own choice.
//
// Timing: routing is combinational; configuration registers are written on
// the clock edge and reset to "unconnected".
module da_interconnect
  import da_pkg::*;
#(
  parameter  int unsigned NDA  = 16,
  parameter  int unsigned NEXT = 4,
  localparam int unsigned NSRC = 2 * NDA + NEXT,
  localparam int unsigned NSNK = 2 * NDA + NEXT,
  localparam int unsigned SELW = $clog2(NSRC + 1),
  localparam int unsigned SNKW = $clog2(NSNK)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cfg_we_i,
  input  logic [SNKW-1:0]        cfg_sink_i,
  input  logic [SELW-1:0]        cfg_src_i,
  input  logic [NSRC-1:0]        src_valid_i,
  output logic [NSRC-1:0]        src_ready_o,
  input  logic [NSRC-1:0][AW-1:0] src_data_i,
  output logic [NSNK-1:0]        snk_valid_o,
  input  logic [NSNK-1:0]        snk_ready_i,
  output logic [NSNK-1:0][AW-1:0] snk_data_o
);

  logic [SELW-1:0] sel [NSNK];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NSNK; t++) sel[t] <= '1;
    end else if (cfg_we_i && 32'(cfg_sink_i) < NSNK) begin
      sel[cfg_sink_i] <= cfg_src_i;
    end
  end

  // a source is ready when all its listeners are
  always_comb begin
    src_ready_o = '1;
    for (int t = 0; t < NSNK; t++)
      for (int s = 0; s < NSRC; s++)
        if (32'(sel[t]) == s && !snk_ready_i[t]) src_ready_o[s] = 1'b0;
  end

  // a sink sees the word valid when every other listener of its source is
  // ready, so that its own valid never depends on its own ready
  always_comb begin
    for (int t = 0; t < NSNK; t++) begin
      logic others_ready;
      others_ready   = 1'b1;
      for (int u = 0; u < NSNK; u++)
        if (u != t && sel[u] == sel[t] && !snk_ready_i[u]) others_ready = 1'b0;
      snk_valid_o[t] = 1'b0;
      snk_data_o[t]  = '0;
      for (int s = 0; s < NSRC; s++)
        if (32'(sel[t]) == s) begin
          snk_valid_o[t] = src_valid_i[s] && others_ready;
          snk_data_o[t]  = src_data_i[s];
        end
    end
  end

  // a source may not withdraw a word before it has been taken
  for (genvar s = 0; s < NSRC; s++) begin : g_chk
    a_src_hold: assert property (@(posedge clk) disable iff (!rst_n || cfg_we_i)
      src_valid_i[s] && !src_ready_o[s] |=> src_valid_i[s]);
  end

endmodule
