// fpfa_pkg: types, constants and small datapath functions shared by the
// field programmable function array (FPFA).
//
// The FPFA executes an arithmetic expression as a graph of ALUs that is
// active every clock cycle. All words are 16 bits. An ALU has four corner
// ports (NW, NE, SE, SW), each of which is configured as input or output.
// The ALU configuration (alu_cfg_t) selects operands, operations and the
// conditional output multiplexers; the condition logic is a pair of 4-input
// look-up tables (cond_cfg_t), i.e. a very small FPGA section.
//
// Word width, the 64-entry LUT depth and the unit counts of an ALU follow the
// described design; encodings, operand source lists and the configuration
// bus layout are this implementation's own choices.
package fpfa_pkg;

  localparam int W        = 16;   // data word width
  localparam int LUT_AW   = 6;    // 64-entry look-up tables
  localparam int PW       = 34;   // multiplier-adder result width
  localparam int NFLAG    = 8;    // condition codes per ALU
  localparam int NCOND    = 2;    // condition outputs of the FPGA section
  localparam int FRAC_W   = 8;    // fraction bits of an interpolation coordinate

  typedef logic [W-1:0] word_t;

  // ALU corner ports
  typedef enum logic [1:0] {P_NW = 2'd0, P_NE = 2'd1, P_SE = 2'd2, P_SW = 2'd3} port_e;

  // operand sources inside an ALU
  typedef enum logic [2:0] {
    S_NW = 3'd0, S_NE = 3'd1, S_SE = 3'd2, S_SW = 3'd3,
    S_C0 = 3'd4, S_C1 = 3'd5, S_ZERO = 3'd6, S_FB = 3'd7
  } src_e;

  // bitwise boolean operations
  typedef enum logic [1:0] {B_AND = 2'd0, B_OR = 2'd1, B_XOR = 2'd2, B_ANDN = 2'd3} bop_e;

  // multiplier X / Z operand: adder or boolean unit of the input stage
  typedef enum logic [1:0] {M_ADD = 2'd0, M_BOOL = 2'd1, M_ZERO = 2'd2} msel_e;

  // operand R of the output stage
  typedef enum logic [2:0] {
    R_SCALED = 3'd0, R_A1 = 3'd1, R_L1 = 3'd2, R_A2 = 3'd3, R_L2 = 3'd4
  } rsel_e;

  // output values
  typedef enum logic [1:0] {O_A3 = 2'd0, O_L3 = 2'd1, O_R = 2'd2, O_W = 2'd3} osel_e;

  // condition code positions
  localparam int F_A1N = 0, F_A1Z = 1, F_A1C = 2, F_A2N = 3,
                 F_A2Z = 4, F_A3N = 5, F_A3Z = 6, F_PN  = 7;

  // one 4-input LUT of the condition logic
  typedef struct packed {
    logic [3:0][2:0] in_sel;   // which condition code feeds LUT input k
    logic [15:0]     tt;       // truth table, indexed by the 4 inputs
  } cond_lut_t;

  typedef cond_lut_t [NCOND-1:0] cond_cfg_t;

  typedef struct packed {
    logic [3:0]      port_out;  // 1: corner port drives, 0: corner port reads
    logic [3:0]      port_src;  // driving port carries out2 (1) or out1 (0)
    src_e            sa, sb;    // operands of adder A1 / boolean L1
    src_e            sc, sd;    // operands of adder A2 / boolean L2
    src_e            sy;        // multiplier Y operand
    src_e            sw;        // second operand of adder A3 / boolean L3
    logic            a1_sub, a2_sub, a3_sub;
    bop_e            l1_op, l2_op, l3_op;
    msel_e           xsel;      // multiplier X: A1 or L1
    msel_e           zsel;      // multiplier-adder Z: A2, L2 or zero
    logic            x_signed, y_signed;
    logic [4:0]      shift;     // scaling: arithmetic right shift of X*Y+Z
    rsel_e           rsel;
    osel_e           o1_t, o1_f;  // out1 = cond[0] ? o1_t : o1_f
    osel_e           o2_t, o2_f;  // out2 = cond[1] ? o2_t : o2_f
    word_t           c0, c1;      // programmable constants
    cond_cfg_t       cond;
  } alu_cfg_t;

  // LUT datapath modes
  typedef enum logic [1:0] {
    LM_OFF = 2'd0, LM_RD_TRK = 2'd1, LM_RD_AGEN = 2'd2, LM_WR_TRK = 2'd3
  } lut_mode_e;

  // addressing modes of the interpolation address generator
  typedef enum logic [1:0] {AG_OFF = 2'd0, AG_1D = 2'd1, AG_2D = 2'd2, AG_3D = 2'd3} ag_mode_e;

  // switch lane direction between two ALU-blocks
  typedef enum logic [1:0] {SW_OFF = 2'd0, SW_DOWN = 2'd1, SW_UP = 2'd2} sw_dir_e;

  // configuration bus: one word wide enough for the largest unit configuration
  localparam int CFG_W = $bits(alu_cfg_t);
  typedef logic [CFG_W-1:0] cfg_word_t;

  // units of an ALU-block on the configuration bus
  localparam int U_ALU0   = 0;    // 0..15: ALUs
  localparam int U_LUT0   = 16;   // 16..23: LUTs (cfg: {trk_data[4:0], trk_addr[4:0], mode[1:0]})
  localparam int U_AGEN   = 24;   // address generator (cfg: mode[1:0])
  localparam int U_TRK    = 25;   // track driver select, index = track
  localparam int U_SINK   = 26;   // sink track select, index = sink
  localparam int U_SWITCH = 27;   // switch lanes below the block (cfg: 2 bits per lane)

  function automatic word_t bool_op(bop_e op, word_t a, word_t b);
    case (op)
      B_AND:   return a & b;
      B_OR:    return a | b;
      B_XOR:   return a ^ b;
      default: return a & ~b;
    endcase
  endfunction

endpackage
