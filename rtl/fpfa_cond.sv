// fpfa_cond: condition logic of an ALU, a tiny FPGA section that turns the
// condition codes computed on the datapath into multiplexer controls.
//
// It holds NCOND programmable 4-input look-up tables. Each LUT input is taken
// from one of the NFLAG condition codes (3-bit select per input) and the LUT
// output is tt[{in3,in2,in1,in0}]. Any Boolean function of up to four
// condition codes can so steer a multiplexer, which is how conditionals are
// executed inside an ALU. Purely combinational; the configuration is held by
// the ALU's configuration register.
//
// That the control signals come from a small programmable logic section fed by
// condition codes follows the described design; the LUT4 structure, the
// number of outputs and the selection of inputs are this implementation's
// choices.
module fpfa_cond
  import fpfa_pkg::*;
(
  input  logic [NFLAG-1:0] flags,
  input  cond_cfg_t        cfg,
  output logic [NCOND-1:0] cond
);

  always_comb begin
    for (int n = 0; n < NCOND; n++) begin
      logic [3:0] idx;
      for (int k = 0; k < 4; k++) idx[k] = flags[cfg[n].in_sel[k]];
      cond[n] = cfg[n].tt[idx];
    end
  end

endmodule
