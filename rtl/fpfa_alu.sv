// fpfa_alu: one ALU of the field programmable function array.
//
// The ALU evaluates one node of a data-flow graph every clock cycle. It has
// three adder/subtractors, one 16x16 multiplier-adder, three bitwise Boolean
// units, a scaling shifter and multiplexers, and four corner I/O ports
// (NW, NE, SE, SW), each configured as input or output. Dataflow:
//
//   input stage   A1 = a +/- b   L1 = a op1 b       (a, b, c, d, y, w are
//                 A2 = c +/- d   L2 = c op2 d        picked from the ports,
//   multiply-add  P  = X * Y + Z  with X in {A1, L1}, the constants C0/C1,
//                                 Z in {A2, L2, 0}    zero and out1 fed back)
//   scaling       S  = P >>> shift (arithmetic), low 16 bits
//   output stage  R in {S, A1, L1, A2, L2}
//                 A3 = R +/- w   L3 = R op3 w
//   outputs       out1 = cond[0] ? o1_t : o1_f   out2 = cond[1] ? o2_t : o2_f
//                 each chosen from {A3, L3, R, w}
//
// Condition codes (sign and zero of the adders, carry of A1, sign of P) feed the
// condition logic (fpfa_cond), whose outputs steer the two output
// multiplexers; this is how conditionals run inside the ALU. A linear
// interpolation F = (B - A) * h + A fits one ALU: A1 = B - A, P = A1 * h,
// S = P >>> fraction bits, out1 = A3 = S + A.
//
// Timing: out1 and out2 are registered, so a result appears on the driving
// ports one clock after its operands are on the input ports. The registers
// clear on reset. The configuration register (with the programmable constants
// C0, C1) loads when cfg_we is high and may be rewritten at any time; the new
// configuration acts from the next clock edge. port_oe[p] tells the
// interconnect that port p drives.
//
// Unit counts, the 16x16 multiplier-adder, the four corner ports, constants
// and mux-based conditionals follow the described ALU; the exact operand
// multiplexing, the single pipeline register and all encodings are this
// implementation's choices.
module fpfa_alu
  import fpfa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  alu_cfg_t    cfg_in,
  input  word_t [3:0] port_in,
  output word_t [3:0] port_out,
  output logic  [3:0] port_oe
);

  alu_cfg_t cfg;
  word_t    out1_q, out2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cfg <= '0;
    else if (cfg_we) cfg <= cfg_in;
  end

  function automatic word_t pick(src_e s, word_t [3:0] pin, word_t c0, word_t c1, word_t fb);
    case (s)
      S_NW:    return pin[P_NW];
      S_NE:    return pin[P_NE];
      S_SE:    return pin[P_SE];
      S_SW:    return pin[P_SW];
      S_C0:    return c0;
      S_C1:    return c1;
      S_FB:    return fb;
      default: return '0;
    endcase
  endfunction

  word_t a, b, c, d, y, w;
  word_t a1, a2, a3, l1, l2, l3, xop, zop, s, r, out1_d, out2_d;
  logic  a1_c;
  logic [PW-1:0]    p;
  logic [NFLAG-1:0] flags;
  logic [NCOND-1:0] cond;

  assign a = pick(cfg.sa, port_in, cfg.c0, cfg.c1, out1_q);
  assign b = pick(cfg.sb, port_in, cfg.c0, cfg.c1, out1_q);
  assign c = pick(cfg.sc, port_in, cfg.c0, cfg.c1, out1_q);
  assign d = pick(cfg.sd, port_in, cfg.c0, cfg.c1, out1_q);
  assign y = pick(cfg.sy, port_in, cfg.c0, cfg.c1, out1_q);
  assign w = pick(cfg.sw, port_in, cfg.c0, cfg.c1, out1_q);

  // input stage; the carry flag of a subtraction is "no borrow"
  assign {a1_c, a1} = cfg.a1_sub ? {1'b0, a} + {1'b0, ~b} + 17'd1 : {1'b0, a} + {1'b0, b};
  assign a2 = cfg.a2_sub ? c - d : c + d;
  assign l1 = bool_op(cfg.l1_op, a, b);
  assign l2 = bool_op(cfg.l2_op, c, d);

  always_comb begin
    case (cfg.xsel)
      M_ADD:   xop = a1;
      M_BOOL:  xop = l1;
      default: xop = '0;
    endcase
    case (cfg.zsel)
      M_ADD:   zop = a2;
      M_BOOL:  zop = l2;
      default: zop = '0;
    endcase
  end

  fpfa_mac u_mac (
    .x(xop), .y(y), .z(zop), .x_signed(cfg.x_signed), .y_signed(cfg.y_signed), .p(p)
  );

  // scaling
  assign s = W'($signed(p) >>> cfg.shift);

  always_comb begin
    case (cfg.rsel)
      R_A1:    r = a1;
      R_L1:    r = l1;
      R_A2:    r = a2;
      R_L2:    r = l2;
      default: r = s;
    endcase
  end

  // output stage
  assign a3 = cfg.a3_sub ? r - w : r + w;
  assign l3 = bool_op(cfg.l3_op, r, w);

  always_comb begin
    flags        = '0;
    flags[F_A1N] = a1[W-1];
    flags[F_A1Z] = (a1 == '0);
    flags[F_A1C] = a1_c;
    flags[F_A2N] = a2[W-1];
    flags[F_A2Z] = (a2 == '0);
    flags[F_A3N] = a3[W-1];
    flags[F_A3Z] = (a3 == '0);
    flags[F_PN]  = p[PW-1];
  end

  fpfa_cond u_cond (.flags(flags), .cfg(cfg.cond), .cond(cond));

  function automatic word_t osel(osel_e o, word_t va3, word_t vl3, word_t vr, word_t vw);
    case (o)
      O_A3:    return va3;
      O_L3:    return vl3;
      O_R:     return vr;
      default: return vw;
    endcase
  endfunction

  assign out1_d = osel(cond[0] ? cfg.o1_t : cfg.o1_f, a3, l3, r, w);
  assign out2_d = osel(cond[1] ? cfg.o2_t : cfg.o2_f, a3, l3, r, w);

  // pipeline register of the node
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out1_q <= '0;
      out2_q <= '0;
    end else begin
      out1_q <= out1_d;
      out2_q <= out2_d;
    end
  end

  always_comb begin
    for (int i = 0; i < 4; i++) port_out[i] = cfg.port_src[i] ? out2_q : out1_q;
  end
  assign port_oe = cfg.port_out;

endmodule
