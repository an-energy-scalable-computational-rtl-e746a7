// da_array: the energy-scalable computational array, NROW x NCOL enhanced
// DA units embedded in a configurable interconnect.
//
// A signal-flow graph (FIR filter, FFT butterflies, ...) is mapped by giving
// each unit a function through its configuration word and LUT and by routing
// unit channels to each other and to the array's NEXT input and output
// channels. Units synchronise only through the valid/ready handshake, so a
// unit whose function takes a data-dependent number of cycles simply delays
// its consumers. Unused units stay idle (asleep). Input bit width, and so
// throughput, power and precision, is chosen per unit in its configuration.
//
// Configuration bus (written by a host controller, one word per clock):
//   cfg_addr_i[MSB] = 0: unit write, cfg_addr_i[IDXW+4:5] = unit index,
//                        cfg_addr_i[4:0] = 0..15 LUT word, 16 config word
//   cfg_addr_i[MSB] = 1: routing write, cfg_addr_i[5:0]-range = sink index,
//                        cfg_wdata_i = source index (see da_interconnect)
// External channels are 32-bit valid/ready channels like the units' own.
//
// The 4x4 size, the unit and the use of a host controller that loads the
// LUTs follow the architecture; the bus format and the channel count are
// this design's own choices.
module da_array
  import da_pkg::*;
#(
  parameter  int unsigned NROW  = 4,
  parameter  int unsigned NCOL  = 4,
  parameter  int unsigned NEXT  = 4,
  localparam int unsigned NDA   = NROW * NCOL,
  localparam int unsigned IDXW  = (NDA > 1) ? $clog2(NDA) : 1,
  localparam int unsigned CAW   = IDXW + 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_we_i,
  input  logic [CAW-1:0]          cfg_addr_i,
  input  logic [DW-1:0]           cfg_wdata_i,
  input  logic [NEXT-1:0]         ext_in_valid_i,
  output logic [NEXT-1:0]         ext_in_ready_o,
  input  logic [NEXT-1:0][AW-1:0] ext_in_data_i,
  output logic [NEXT-1:0]         ext_out_valid_o,
  input  logic [NEXT-1:0]         ext_out_ready_i,
  output logic [NEXT-1:0][AW-1:0] ext_out_data_o,
  output phase_e                  da_phase_o [NDA]
);

  localparam int unsigned NCH  = 2 * NDA + NEXT;
  localparam int unsigned SELW = $clog2(NCH + 1);
  localparam int unsigned SNKW = $clog2(NCH);

  logic [NCH-1:0]         src_valid, src_ready, snk_valid, snk_ready;
  logic [NCH-1:0][AW-1:0] src_data, snk_data;
  logic                   route_we;

  assign route_we = cfg_we_i && cfg_addr_i[CAW-1];

  da_interconnect #(.NDA(NDA), .NEXT(NEXT)) u_ic (
    .clk, .rst_n,
    .cfg_we_i(route_we), .cfg_sink_i(cfg_addr_i[SNKW-1:0]), .cfg_src_i(cfg_wdata_i[SELW-1:0]),
    .src_valid_i(src_valid), .src_ready_o(src_ready), .src_data_i(src_data),
    .snk_valid_o(snk_valid), .snk_ready_i(snk_ready), .snk_data_o(snk_data)
  );

  for (genvar d = 0; d < NDA; d++) begin : g_da
    logic unit_we;
    assign unit_we = cfg_we_i && !cfg_addr_i[CAW-1] && cfg_addr_i[CAW-2:5] == IDXW'(d);
    da_unit u_da (
      .clk, .rst_n,
      .cfg_we_i(unit_we), .cfg_addr_i(cfg_addr_i[4:0]), .cfg_wdata_i(cfg_wdata_i),
      .in_valid_i(snk_valid[2*d +: 2]), .in_ready_o(snk_ready[2*d +: 2]),
      .in_data_i(snk_data[2*d +: 2]),
      .out_valid_o(src_valid[2*d +: 2]), .out_ready_i(src_ready[2*d +: 2]),
      .out_data_o(src_data[2*d +: 2]),
      .phase_o(da_phase_o[d])
    );
  end

  assign src_valid[NCH-1 -: NEXT] = ext_in_valid_i;
  assign src_data[NCH-1 -: NEXT]  = ext_in_data_i;
  assign ext_in_ready_o           = src_ready[NCH-1 -: NEXT];
  assign ext_out_valid_o          = snk_valid[NCH-1 -: NEXT];
  assign ext_out_data_o           = snk_data[NCH-1 -: NEXT];
  assign snk_ready[NCH-1 -: NEXT] = ext_out_ready_i;

endmodule
