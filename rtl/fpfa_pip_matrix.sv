// fpfa_pip_matrix: switch matrix of an ALU-block with programmable
// interconnect points (PIPs).
//
// NTRK bus tracks run through the block. Each track is driven by at most one
// source (an ALU port, a LUT output, an address-generator fraction or a lane
// coming in from a neighbouring block), chosen by its driver PIP setting;
// every sink (an ALU input port, a LUT address or data input, an
// address-generator coordinate, a lane going out to a neighbour) reads one
// track, chosen by its sink PIP setting. A setting at or beyond the number of
// sources or tracks leaves the track undriven or the sink unconnected, which
// reads as zero. This is the ALU-to-ALU and ALU-to-LUT communication of the
// block; a track may feed any number of sinks (fan-out).
//
// The PIP settings are registers written one at a time (cfg_trk_* for a
// track's driver, cfg_sink_* for a sink); after reset everything is
// disconnected. The path from source to sink is combinational. All sources
// in the block are registers, so no combinational loop can be configured.
//
// The switch matrix with PIPs follows the described ALU-block; modelling each
// bus track as a multiplexer (rather than shared wires with several possible
// drivers) and letting every port reach every track are this implementation's
// choices.
module fpfa_pip_matrix
  import fpfa_pkg::*;
#(
  parameter int NSRC  = 85,
  parameter int NSINK = 93,
  parameter int NTRK  = 32,
  localparam int SSW = $clog2(NSRC + 1),
  localparam int TSW = $clog2(NTRK + 1),
  localparam int TIW = (NTRK > 1) ? $clog2(NTRK) : 1,
  localparam int SIW = (NSRC > 1) ? $clog2(NSRC) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cfg_trk_we,
  input  logic [TSW-1:0]      cfg_trk_idx,
  input  logic [SSW-1:0]      cfg_trk_val,
  input  logic                cfg_sink_we,
  input  logic [$clog2(NSINK)-1:0] cfg_sink_idx,
  input  logic [TSW-1:0]      cfg_sink_val,
  input  word_t               src  [NSRC],
  output word_t               trk  [NTRK],
  output word_t               sink [NSINK]
);

  logic [SSW-1:0] drv_sel [NTRK];
  logic [TSW-1:0] rd_sel  [NSINK];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NTRK; t++)  drv_sel[t] <= '1;
      for (int s = 0; s < NSINK; s++) rd_sel[s]  <= '1;
    end else begin
      if (cfg_trk_we && int'(cfg_trk_idx) < NTRK)     drv_sel[TIW'(cfg_trk_idx)] <= cfg_trk_val;
      if (cfg_sink_we && int'(cfg_sink_idx) < NSINK) rd_sel[cfg_sink_idx] <= cfg_sink_val;
    end
  end

  always_comb begin
    for (int t = 0; t < NTRK; t++)
      trk[t] = (int'(drv_sel[t]) < NSRC) ? src[SIW'(drv_sel[t])] : '0;
  end

  always_comb begin
    for (int s = 0; s < NSINK; s++)
      sink[s] = (int'(rd_sel[s]) < NTRK) ? trk[TIW'(rd_sel[s])] : '0;
  end

endmodule
