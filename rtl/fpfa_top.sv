// fpfa_top: a field programmable function array (FPFA) of NBLK ALU-blocks.
//
// The array is programmed with a data-flow graph of arithmetic expressions
// that executes one step every clock cycle: each ALU is one graph node with a
// one-cycle pipeline register, the look-up tables hold tables and state, and
// the programmable switch matrix of each block wires them together. There is
// no instruction fetch and no central controller.
//
// The blocks form a column: the switch lanes at the bottom of block b connect
// to the top of block b+1 (one register per crossing). The top lanes of block
// 0 (n_lane_*) and the switch lanes of the last block (s_lane_*) are brought
// out, for streams entering and leaving the array. The global IO-bus
// (io_*) reaches every LUT in the array for loading tables and reading
// results; read data comes one cycle after the request with io_rvalid. The
// configuration bus (cfg_*) writes one unit setting per cycle into block
// cfg_blk (see fpfa_alu_block for the unit numbers) and may be used while the
// array runs, so that parts of it are reprogrammed on the fly.
//
// Default size: 4 blocks of 16 ALUs = 64 ALUs and 32 LUTs of 64 x 16 bits.
// The 64-ALU size follows the described design; the column arrangement of the
// blocks, the edge lanes and the two host buses are this implementation's
// choices.
module fpfa_top
  import fpfa_pkg::*;
#(
  parameter int NBLK  = 4,
  parameter int NALU  = 16,
  parameter int NLUT  = 8,
  parameter int NTRK  = 32,
  parameter int NLANE = 5,
  localparam int BW = (NBLK > 1) ? $clog2(NBLK) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration bus
  input  logic              cfg_we,
  input  logic [BW-1:0]     cfg_blk,
  input  logic [4:0]        cfg_unit,
  input  logic [6:0]        cfg_idx,
  input  cfg_word_t         cfg_data,
  // global IO-bus
  input  logic              io_we,
  input  logic              io_re,
  input  logic [BW-1:0]     io_blk,
  input  logic [2:0]        io_lut,
  input  logic [LUT_AW-1:0] io_addr,
  input  word_t             io_wdata,
  output word_t             io_rdata,
  output logic              io_rvalid,
  // lanes at the top of the first block and below the last block
  input  word_t             n_lane_in  [NLANE],
  output word_t             n_lane_out [NLANE],
  input  word_t             s_lane_in  [NLANE],
  output word_t             s_lane_out [NLANE]
);

  logic [NBLK-1:0] blk_we, blk_re;
  word_t blk_rdata [NBLK];

  // lane bundles between the blocks: down[b] enters block b from above,
  // up[b] leaves block b upwards
  word_t down [NBLK+1][NLANE];
  word_t up   [NBLK+1][NLANE];

  fpfa_iobus #(.NBLK(NBLK)) u_iobus (
    .clk(clk), .rst_n(rst_n),
    .io_we(io_we), .io_re(io_re), .io_blk(io_blk),
    .io_rdata(io_rdata), .io_rvalid(io_rvalid),
    .blk_we(blk_we), .blk_re(blk_re), .blk_rdata(blk_rdata)
  );

  for (genvar i = 0; i < NLANE; i++) begin : g_edge
    assign down[0][i]  = n_lane_in[i];
    assign n_lane_out[i] = up[0][i];
    assign up[NBLK][i] = s_lane_in[i];
    assign s_lane_out[i] = down[NBLK][i];
  end

  for (genvar b = 0; b < NBLK; b++) begin : g_blk
    fpfa_alu_block #(.NALU(NALU), .NLUT(NLUT), .NTRK(NTRK), .NLANE(NLANE)) u_blk (
      .clk(clk), .rst_n(rst_n),
      .cfg_we(cfg_we && int'(cfg_blk) == b), .cfg_unit(cfg_unit), .cfg_idx(cfg_idx),
      .cfg_data(cfg_data),
      .io_we(blk_we[b]), .io_re(blk_re[b]), .io_lut(io_lut), .io_addr(io_addr),
      .io_wdata(io_wdata), .io_rdata(blk_rdata[b]),
      .up_lane_in(down[b]), .up_lane_out(up[b]),
      .dn_lane_in(up[b+1]), .dn_lane_out(down[b+1])
    );
  end

endmodule
