// fpfa_iobus: the global IO-bus that connects the LUTs of all ALU-blocks with
// each other's users outside the array, such as a burst-mode peripheral
// processor that loads tables and fetches results.
//
// One access per cycle: a write (io_we) or a read (io_re) of one 16-bit entry,
// addressed by block, LUT within the block and entry. The bus decodes the
// block number into per-block strobes and returns read data one cycle after
// the request, with io_rvalid high in that cycle. A request for a block
// number beyond NBLK is ignored (a read then returns zero).
//
// A global IO-bus reaching the LUTs follows the described design; the
// address split, single-cycle access and read latency are this
// implementation's choices.
module fpfa_iobus
  import fpfa_pkg::*;
#(
  parameter int NBLK = 4,
  localparam int BW = (NBLK > 1) ? $clog2(NBLK) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // host side
  input  logic            io_we,
  input  logic            io_re,
  input  logic [BW-1:0]   io_blk,
  output word_t           io_rdata,
  output logic            io_rvalid,
  // block side
  output logic [NBLK-1:0] blk_we,
  output logic [NBLK-1:0] blk_re,
  input  word_t           blk_rdata [NBLK]
);

  logic [BW-1:0] blk_q;
  logic          hit_q;

  always_comb begin
    for (int b = 0; b < NBLK; b++) begin
      blk_we[b] = io_we && int'(io_blk) == b;
      blk_re[b] = io_re && int'(io_blk) == b;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_q     <= '0;
      hit_q     <= 1'b0;
      io_rvalid <= 1'b0;
    end else begin
      io_rvalid <= io_re;
      hit_q     <= io_re && int'(io_blk) < NBLK;
      if (io_re) blk_q <= io_blk;
    end
  end

  assign io_rdata = hit_q ? blk_rdata[blk_q] : '0;

endmodule
