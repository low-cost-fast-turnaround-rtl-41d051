// tb_fpfa_alu_block: self-checking test of one ALU-block running three small
// graphs at once.
//  1. Table interpolation: ALU0 counts a coordinate (step in its constant),
//     the address generator (1D mode) addresses LUT0/LUT1, ALU1 interpolates
//     linearly with the fraction, and the result leaves through switch lane 0
//     downwards. Checked against the table and fixed-point formula, with the
//     latency of 3 cycles (LUT read, ALU, switch) from coordinate to lane.
//  2. State kept in a LUT: a stream entering on lane 1 from above is clamped
//     by ALU2 (max with a constant, via the condition logic) and written into
//     LUT2 at an address counted by ALU3; the host then reads LUT2 back.
//  3. A word entering on lane 2 from below passes up through the switch and
//     the matrix to the upper lane, one cycle later.
module tb_fpfa_alu_block;
  import fpfa_pkg::*;

  localparam int NLANE = 5;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [4:0] cfg_unit;
  logic [6:0] cfg_idx;
  cfg_word_t cfg_data;
  logic io_we = 0, io_re = 0;
  logic [2:0] io_lut;
  logic [5:0] io_addr;
  word_t io_wdata, io_rdata;
  word_t up_lane_in [NLANE], up_lane_out [NLANE], dn_lane_in [NLANE], dn_lane_out [NLANE];
  int checks = 0, failures = 0;

  fpfa_alu_block dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source and sink numbers of the default block
  localparam int SRC_LUT = 64, SRC_FR = 72, SRC_UP = 75, SRC_DN = 80;
  localparam int SNK_LA = 64, SNK_LD = 72, SNK_CO = 80, SNK_UP = 83, SNK_DN = 88;

  task automatic cfg(int unit, int idx, cfg_word_t data);
    @(negedge clk);
    cfg_we = 1; cfg_unit = 5'(unit); cfg_idx = 7'(idx); cfg_data = data;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic route(int src, int trk, int snk);
    cfg(U_TRK, trk, cfg_word_t'(src));
    cfg(U_SINK, snk, cfg_word_t'(trk));
  endtask

  function automatic alu_cfg_t base();
    alu_cfg_t c;
    c = '0;
    c.sa = S_ZERO; c.sb = S_ZERO; c.sc = S_ZERO; c.sd = S_ZERO; c.sy = S_ZERO; c.sw = S_ZERO;
    c.zsel = M_ZERO;
    return c;
  endfunction

  function automatic int f(int i);
    return (i * i * 7) % 9000 - 3000;
  endfunction

  function automatic word_t lerp_ref(word_t cpos);
    int i, h, a, b;
    i = (cpos / 256) % 64; h = cpos % 256;
    a = f(i); b = f((i + 1) % 64);
    return word_t'((((b - a) * h) >>> 8) + a);
  endfunction

  word_t coord_hist [$];
  word_t shadow [64];
  logic  written [64];
  word_t lane1_prev, lane2_prev;
  logic  run = 0;
  int    n_interp = 0, n_store = 0, n_pass = 0;

  // monitors
  always @(negedge clk) if (run) begin
    lane1_prev = up_lane_in[1];   // the values the last rising edge took in
    lane2_prev = dn_lane_in[2];
    coord_hist.push_back(up_lane_out[0]);
    if (coord_hist.size() > 3) begin
      checks++;
      n_interp++;
      if (dn_lane_out[0] !== lerp_ref(coord_hist[$-3])) begin
        failures++;
        $display("FAIL interp coord %h got %h exp %h", coord_hist[$-3], dn_lane_out[0], lerp_ref(coord_hist[$-3]));
      end
      // stored value: written at the next edge, at the counter's present value
      if (dut.lut_mode[2] == LM_WR_TRK) begin
        shadow[up_lane_out[1][5:0]] = ($signed(lane1_prev) > 100) ? lane1_prev : 16'd100;
        written[up_lane_out[1][5:0]] = 1;
      end
      checks++;
      n_pass++;
      if (up_lane_out[2] !== lane2_prev) begin
        failures++;
        $display("FAIL upward lane got %h exp %h", up_lane_out[2], lane2_prev);
      end
    end
    up_lane_in[1] = word_t'(int'($urandom_range(0, 400)) - 200);
    dn_lane_in[2] = word_t'($urandom);
  end

  initial begin
    alu_cfg_t c;
    cfg_unit = 0; cfg_idx = 0; cfg_data = '0; io_lut = 0; io_addr = 0; io_wdata = 0;
    for (int i = 0; i < NLANE; i++) begin up_lane_in[i] = 0; dn_lane_in[i] = 0; end
    for (int i = 0; i < 64; i++) written[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // tables over the IO-bus
    for (int l = 0; l < 2; l++)
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        io_we = 1; io_lut = 3'(l); io_addr = 6'(i); io_wdata = word_t'(f(i));
      end
    @(negedge clk);
    io_we = 0;

    // ALU0: coordinate counter, out1 = out1 + C0 on SE
    c = base(); c.port_out = 4'b0100; c.c0 = 16'h0053;
    c.sc = S_FB; c.sd = S_C0; c.rsel = R_A2; c.o1_t = O_R; c.o1_f = O_R;
    cfg(0, 0, cfg_word_t'(c));
    // ALU1: lerp, A on NW, B on NE, h on SW, result on SE
    c = base(); c.port_out = 4'b0100;
    c.sa = S_NE; c.sb = S_NW; c.a1_sub = 1; c.xsel = M_ADD; c.x_signed = 1;
    c.sy = S_SW; c.shift = 5'd8; c.sw = S_NW; c.o1_t = O_A3; c.o1_f = O_A3;
    cfg(1, 0, cfg_word_t'(c));
    // ALU2: max(NW, C0 = 100) on SE
    c = base(); c.port_out = 4'b0100; c.c0 = 16'd100;
    c.sa = S_NW; c.sb = S_C0; c.a1_sub = 1; c.sc = S_NW; c.rsel = R_A2; c.sw = S_C0;
    c.cond[0].in_sel = '{3'(F_A1N), 3'(F_A1N), 3'(F_A1N), 3'(F_A1N)};
    c.cond[0].tt = 16'h8000; c.o1_t = O_W; c.o1_f = O_R;
    cfg(2, 0, cfg_word_t'(c));
    // ALU3: write address counter on SE
    c = base(); c.port_out = 4'b0100; c.c0 = 16'd1;
    c.sc = S_FB; c.sd = S_C0; c.rsel = R_A2; c.o1_t = O_R; c.o1_f = O_R;
    cfg(3, 0, cfg_word_t'(c));

    route(2, 0, SNK_CO);            // counter -> coordinate x
    cfg(U_SINK, SNK_UP, 0);         //          -> lane up 0 (observation)
    route(SRC_LUT, 1, 4 + 0);       // LUT0 -> ALU1 NW
    route(SRC_LUT + 1, 2, 4 + 1);   // LUT1 -> ALU1 NE
    route(SRC_FR, 3, 4 + 3);        // frac x -> ALU1 SW
    route(6, 4, SNK_DN);            // ALU1 SE -> lane down 0
    route(SRC_UP + 1, 5, 8 + 0);    // lane 1 from above -> ALU2 NW
    route(10, 6, SNK_LD + 2);       // ALU2 SE -> LUT2 data
    route(14, 7, SNK_LA + 2);       // ALU3 SE -> LUT2 address
    cfg(U_SINK, SNK_UP + 1, 7);     //          -> lane up 1 (observation)
    route(SRC_DN + 2, 8, SNK_UP + 2); // lane 2 from below -> lane up 2
    cfg(U_SWITCH, 0, cfg_word_t'({SW_OFF, SW_OFF, SW_UP, SW_OFF, SW_DOWN}));
    cfg(U_LUT0, 0, cfg_word_t'(LM_RD_AGEN));
    cfg(U_LUT0 + 1, 0, cfg_word_t'(LM_RD_AGEN));
    cfg(U_AGEN, 0, cfg_word_t'(AG_1D));
    repeat (6) @(negedge clk);
    cfg(U_LUT0 + 2, 0, cfg_word_t'(LM_WR_TRK));
    run = 1;
    repeat (300) @(negedge clk);
    cfg(U_LUT0 + 2, 0, cfg_word_t'(LM_OFF));
    run = 0;

    // read LUT2 back over the IO-bus
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      io_re = 1; io_lut = 3'd2; io_addr = 6'(i);
      @(negedge clk);
      io_re = 0;
      if (written[i]) begin
        checks++;
        n_store++;
        if (io_rdata !== shadow[i]) begin
          failures++;
          $display("FAIL LUT2[%0d] got %h exp %h", i, io_rdata, shadow[i]);
        end
      end
    end
    if (n_interp == 0 || n_store == 0 || n_pass == 0) failures++;
    $display("interpolations %0d, stored words %0d, upward transfers %0d", n_interp, n_store, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
