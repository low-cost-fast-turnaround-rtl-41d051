// fpfa_switch: the bi-directional switches that connect an ALU-block with the
// block below it.
//
// There are NLANE lanes. Each lane is programmed to carry a word downwards
// (from the upper block's lane sink to the lower block's lane source),
// upwards, or nothing. Without tri-state wires, a lane is modelled as two
// one-way paths of which the direction setting enables one; the disabled
// direction delivers zero.
//
// Timing: each lane has a register, so a word crosses a block boundary in one
// clock cycle; this also keeps the interconnect of neighbouring blocks free of
// combinational loops. The direction settings load from cfg_dir when cfg_we
// is high and reset to off, as do the lane registers.
//
// Switches between ALU-blocks follow the described design; their number per
// block (5, as drawn below a block), the register on each lane and the
// direction encoding are this implementation's choices.
module fpfa_switch
  import fpfa_pkg::*;
#(
  parameter int NLANE = 5
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we,
  input  sw_dir_e [NLANE-1:0]   cfg_dir,
  input  word_t                 up_in  [NLANE],
  output word_t                 up_out [NLANE],
  input  word_t                 dn_in  [NLANE],
  output word_t                 dn_out [NLANE]
);

  sw_dir_e [NLANE-1:0] dir;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dir <= '0;
      for (int i = 0; i < NLANE; i++) begin
        up_out[i] <= '0;
        dn_out[i] <= '0;
      end
    end else begin
      if (cfg_we) dir <= cfg_dir;
      for (int i = 0; i < NLANE; i++) begin
        dn_out[i] <= (dir[i] == SW_DOWN) ? up_in[i] : '0;
        up_out[i] <= (dir[i] == SW_UP)   ? dn_in[i] : '0;
      end
    end
  end

endmodule
