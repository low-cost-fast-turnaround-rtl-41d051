// fpfa_lut: one look-up table (LUT) of an ALU-block, a small 16-bit wide
// memory with DEPTH entries (64 by default).
//
// Two users share it. The data path reads it every cycle at rd_addr, or
// writes dp_wdata at dp_waddr when dp_we is high, so that tables of
// function values can be looked up and the state of a computation can be kept
// in it. The global IO-bus (io_*) writes and reads it for loading tables and
// fetching results. A write from the IO-bus wins over a data-path write in the
// same cycle (the data-path write is then lost).
//
// Timing: both reads are synchronous; rd_data and io_rdata show the entry one
// clock after the address. A read of an entry written in the same cycle
// returns the old contents. The contents are not reset.
//
// The 16-bit x 64-entry size follows the described design; the port
// arrangement and priority are this implementation's choices.
module fpfa_lut
  import fpfa_pkg::*;
#(
  parameter int DEPTH = 64,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          clk,
  // data path
  input  logic [AW-1:0] rd_addr,
  output word_t         rd_data,
  input  logic          dp_we,
  input  logic [AW-1:0] dp_waddr,
  input  word_t         dp_wdata,
  // global IO-bus
  input  logic          io_we,
  input  logic          io_re,
  input  logic [AW-1:0] io_addr,
  input  word_t         io_wdata,
  output word_t         io_rdata
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (io_we)      mem[io_addr]  <= io_wdata;
    else if (dp_we) mem[dp_waddr] <= dp_wdata;
  end

  always_ff @(posedge clk) begin
    rd_data <= mem[rd_addr];
    if (io_re) io_rdata <= mem[io_addr];
  end

endmodule
