// fpfa_alu_block: an ALU-block, the tile of the function array.
//
// NALU ALUs (a 4 x 4 arrangement by default) and NLUT look-up tables share a
// switch matrix of NTRK bus tracks with programmable interconnect points.
// The programmed graph of ALUs runs every clock cycle; there is no
// instruction stream and no central controller: "control" is part of the
// graph, e.g. an ALU counting addresses for a LUT whose output feeds other
// ALUs. An interpolation address generator serves the LUTs in 1D, 2D and 3D
// table mode. NLANE bi-directional switch lanes at the bottom connect to the
// block below; NLANE lanes at the top come from the block above.
//
// Sources on the tracks (in this order, NSRC in all): the 4 corner ports of
// every ALU (zero unless the port is an output), the LUT read data, the three
// interpolation fractions, the lanes from above, the lanes from below.
// Sinks (NSINK): the 4 corner ports of every ALU, the LUT addresses, the LUT
// write data, the three interpolation coordinates, the lanes going up, the
// lanes going down. Every source is a register, so the block has no
// combinational loop whatever the configuration; one graph node costs one
// clock cycle, a LUT read one cycle, a block boundary one cycle.
//
// LUT modes: off, read at the address on its address sink, read at the
// address from the address generator (LUT n takes corner n mod 8), or write
// its data sink at its address sink every cycle. The global IO-bus port
// (io_*) reaches every LUT of the block; read data returns one cycle later.
//
// Configuration bus: cfg_we with cfg_unit selects ALU 0..15 (cfg_data is an
// alu_cfg_t), LUT 16..23 (mode in cfg_data[1:0]), the address generator 24
// (mode), a track driver 25 or a sink 26 (cfg_idx, setting in cfg_data) or
// the lane switches 27 (2 bits per lane). It may be used while the array runs.
//
// The block contents and the LUT / ALU / PIP arrangement follow the described
// ALU-block; counts other than the 16 ALUs and 5 switches, the full track
// reach and the configuration bus are this implementation's choices.
module fpfa_alu_block
  import fpfa_pkg::*;
#(
  parameter int NALU  = 16,
  parameter int NLUT  = 8,
  parameter int NTRK  = 32,
  parameter int NLANE = 5,
  localparam int NSRC  = 4 * NALU + NLUT + 3 + 2 * NLANE,
  localparam int NSINK = 4 * NALU + 2 * NLUT + 3 + 2 * NLANE
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration bus
  input  logic        cfg_we,
  input  logic [4:0]  cfg_unit,
  input  logic [6:0]  cfg_idx,
  input  cfg_word_t   cfg_data,
  // global IO-bus
  input  logic        io_we,
  input  logic        io_re,
  input  logic [2:0]  io_lut,
  input  logic [LUT_AW-1:0] io_addr,
  input  word_t       io_wdata,
  output word_t       io_rdata,
  // lanes to and from the block above (its switches are in that block)
  input  word_t       up_lane_in  [NLANE],
  output word_t       up_lane_out [NLANE],
  // lanes to and from the block below (through this block's switches)
  input  word_t       dn_lane_in  [NLANE],
  output word_t       dn_lane_out [NLANE]
);

  localparam int SRC_LUT = 4 * NALU;
  localparam int SRC_FR  = SRC_LUT + NLUT;
  localparam int SRC_UP  = SRC_FR + 3;
  localparam int SRC_DN  = SRC_UP + NLANE;
  localparam int SNK_LA  = 4 * NALU;
  localparam int SNK_LD  = SNK_LA + NLUT;
  localparam int SNK_CO  = SNK_LD + NLUT;
  localparam int SNK_UP  = SNK_CO + 3;
  localparam int SNK_DN  = SNK_UP + NLANE;
  localparam int SSW = $clog2(NSRC + 1);
  localparam int TSW = $clog2(NTRK + 1);

  word_t src  [NSRC];
  word_t trk  [NTRK];
  word_t sink [NSINK];

  // ---------------------------------------------------------------- ALUs
  word_t [3:0] alu_out [NALU];
  logic  [3:0] alu_oe  [NALU];

  for (genvar a = 0; a < NALU; a++) begin : g_alu
    word_t [3:0] pin;
    for (genvar p = 0; p < 4; p++) begin : g_port
      assign pin[p] = sink[4*a + p];
      assign src[4*a + p] = alu_oe[a][p] ? alu_out[a][p] : '0;
    end
    fpfa_alu u_alu (
      .clk(clk), .rst_n(rst_n),
      .cfg_we(cfg_we && int'(cfg_unit) == U_ALU0 + a),
      .cfg_in(alu_cfg_t'(cfg_data)),
      .port_in(pin), .port_out(alu_out[a]), .port_oe(alu_oe[a])
    );
  end

  // ------------------------------------------------ address generator
  ag_mode_e ag_mode;
  logic [7:0][LUT_AW-1:0] ag_addr;
  word_t fx, fy, fz;

  fpfa_addrgen u_agen (
    .clk(clk), .rst_n(rst_n), .mode(ag_mode),
    .cx(sink[SNK_CO]), .cy(sink[SNK_CO+1]), .cz(sink[SNK_CO+2]),
    .addr(ag_addr), .frac_x(fx), .frac_y(fy), .frac_z(fz)
  );

  assign src[SRC_FR]   = fx;
  assign src[SRC_FR+1] = fy;
  assign src[SRC_FR+2] = fz;

  // -------------------------------------------------------------- LUTs
  lut_mode_e lut_mode [NLUT];
  word_t     lut_io_rd [NLUT];
  logic [2:0] io_lut_q;

  for (genvar l = 0; l < NLUT; l++) begin : g_lut
    logic [LUT_AW-1:0] ra;
    assign ra = (lut_mode[l] == LM_RD_AGEN) ? ag_addr[l % 8] : sink[SNK_LA + l][LUT_AW-1:0];
    fpfa_lut #(.DEPTH(1 << LUT_AW)) u_lut (
      .clk(clk),
      .rd_addr(ra), .rd_data(src[SRC_LUT + l]),
      .dp_we(lut_mode[l] == LM_WR_TRK),
      .dp_waddr(sink[SNK_LA + l][LUT_AW-1:0]), .dp_wdata(sink[SNK_LD + l]),
      .io_we(io_we && int'(io_lut) == l), .io_re(io_re && int'(io_lut) == l),
      .io_addr(io_addr), .io_wdata(io_wdata), .io_rdata(lut_io_rd[l])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) io_lut_q <= '0;
    else if (io_re) io_lut_q <= io_lut;
  end
  assign io_rdata = lut_io_rd[io_lut_q];

  // ------------------------------------------------- unit configuration
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ag_mode <= AG_OFF;
      for (int l = 0; l < NLUT; l++) lut_mode[l] <= LM_OFF;
    end else if (cfg_we) begin
      if (int'(cfg_unit) == U_AGEN) ag_mode <= ag_mode_e'(cfg_data[1:0]);
      for (int l = 0; l < NLUT; l++)
        if (int'(cfg_unit) == U_LUT0 + l) lut_mode[l] <= lut_mode_e'(cfg_data[1:0]);
    end
  end

  // ----------------------------------------------------- switch matrix
  for (genvar i = 0; i < NLANE; i++) begin : g_lane
    assign src[SRC_UP + i]  = up_lane_in[i];
    assign up_lane_out[i]   = sink[SNK_UP + i];
  end

  fpfa_pip_matrix #(.NSRC(NSRC), .NSINK(NSINK), .NTRK(NTRK)) u_pip (
    .clk(clk), .rst_n(rst_n),
    .cfg_trk_we(cfg_we && int'(cfg_unit) == U_TRK),
    .cfg_trk_idx(TSW'(cfg_idx)), .cfg_trk_val(cfg_data[SSW-1:0]),
    .cfg_sink_we(cfg_we && int'(cfg_unit) == U_SINK),
    .cfg_sink_idx(cfg_idx), .cfg_sink_val(cfg_data[TSW-1:0]),
    .src(src), .trk(trk), .sink(sink)
  );

  // ------------------------------------------ switches to the block below
  word_t sw_up_in [NLANE];
  word_t sw_up_out [NLANE];
  sw_dir_e [NLANE-1:0] sw_cfg;

  for (genvar i = 0; i < NLANE; i++) begin : g_sw
    assign sw_up_in[i] = sink[SNK_DN + i];
    assign src[SRC_DN + i] = sw_up_out[i];
    assign sw_cfg[i] = sw_dir_e'(cfg_data[2*i +: 2]);
  end

  fpfa_switch #(.NLANE(NLANE)) u_switch (
    .clk(clk), .rst_n(rst_n),
    .cfg_we(cfg_we && int'(cfg_unit) == U_SWITCH), .cfg_dir(sw_cfg),
    .up_in(sw_up_in), .up_out(sw_up_out), .dn_in(dn_lane_in), .dn_out(dn_lane_out)
  );

endmodule
