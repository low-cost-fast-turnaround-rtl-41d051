// tb_fpfa_top: end-to-end test of the function array at its default size
// (4 ALU-blocks, 64 ALUs, 32 LUTs). Four graphs run at the same time:
//
//  block 0  8-tap FIR filter, one output per clock: ALU0 counts addresses
//           into LUT0 (the input samples, loaded over the IO-bus), LUT0 feeds
//           x to the taps ALU1..8 (transposed form, Q15 coefficients in the
//           ALU constants, y chained tap to tap). The output goes down lane 0
//           through blocks 1..3 to the south edge; block 3 also stores it in
//           its LUT0, which the host reads back at the end.
//  block 1  3D table interpolation (8 LUTs, 7 ALUs): three coordinate
//           counters, the address generator in 3D mode, four x-, two y- and
//           one z-interpolation; result down lane 4, coordinates up lanes
//           1..3 through block 0's switches to the north edge.
//  block 2  2D table interpolation (4 LUTs, 3 ALUs) followed by a clamp
//           max(v, -500) made with the condition logic; result down lane 1,
//           coordinates down lanes 2 and 3.
//  block 3  pass-through and storage of the FIR output.
// Halfway, the FIR coefficients are reprogrammed while everything runs.
// Every output is compared cycle by cycle with a fixed-point model of the
// graph computed here, including the latencies (one cycle per ALU, per LUT
// read and per block crossing). The test counts how often each mechanism
// happened and fails if one never did.
module tb_fpfa_top;
  import fpfa_pkg::*;

  localparam int NLANE = 5;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [1:0] cfg_blk;
  logic [4:0] cfg_unit;
  logic [6:0] cfg_idx;
  cfg_word_t cfg_data;
  logic io_we = 0, io_re = 0, io_rvalid;
  logic [1:0] io_blk;
  logic [2:0] io_lut;
  logic [5:0] io_addr;
  word_t io_wdata, io_rdata;
  word_t n_lane_in [NLANE], n_lane_out [NLANE], s_lane_in [NLANE], s_lane_out [NLANE];
  int checks = 0, failures = 0;

  fpfa_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source / sink numbers inside a default block
  localparam int SRC_LUT = 64, SRC_FR = 72, SRC_UP = 75, SRC_DN = 80;
  localparam int SNK_LA = 64, SNK_LD = 72, SNK_CO = 80, SNK_UP = 83, SNK_DN = 88;
  function automatic int aport(int alu, port_e p); return 4 * alu + int'(p); endfunction

  // ------------------------------------------------------------ helpers
  int next_trk [4] = '{0, 0, 0, 0};

  task automatic cfg(int blk, int unit, int idx, cfg_word_t data);
    @(negedge clk);
    cfg_we = 1; cfg_blk = 2'(blk); cfg_unit = 5'(unit); cfg_idx = 7'(idx); cfg_data = data;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // new track in block blk driven by src; returns the track
  task automatic drive(int blk, int src, output int trk);
    trk = next_trk[blk]++;
    cfg(blk, U_TRK, trk, cfg_word_t'(src));
  endtask

  task automatic listen(int blk, int trk, int snk);
    cfg(blk, U_SINK, snk, cfg_word_t'(trk));
  endtask

  task automatic route(int blk, int src, int snk);
    int t;
    drive(blk, src, t);
    listen(blk, t, snk);
  endtask

  task automatic io_write(int blk, int lut, int addr, word_t d);
    @(negedge clk);
    io_we = 1; io_blk = 2'(blk); io_lut = 3'(lut); io_addr = 6'(addr); io_wdata = d;
    @(negedge clk);
    io_we = 0;
  endtask

  function automatic alu_cfg_t base();
    alu_cfg_t c;
    c = '0;
    c.sa = S_ZERO; c.sb = S_ZERO; c.sc = S_ZERO; c.sd = S_ZERO; c.sy = S_ZERO; c.sw = S_ZERO;
    c.zsel = M_ZERO;
    return c;
  endfunction

  function automatic alu_cfg_t counter_cfg(word_t step);
    alu_cfg_t c;
    c = base(); c.port_out = 4'b0100; c.c0 = step;
    c.sc = S_FB; c.sd = S_C0; c.rsel = R_A2; c.o1_t = O_R; c.o1_f = O_R;
    return c;
  endfunction

  // F = (B - A) * h / 256 + A; A on NW, B on NE, h on SW, F on SE
  function automatic alu_cfg_t lerp_cfg();
    alu_cfg_t c;
    c = base(); c.port_out = 4'b0100;
    c.sa = S_NE; c.sb = S_NW; c.a1_sub = 1; c.xsel = M_ADD; c.x_signed = 1;
    c.sy = S_SW; c.shift = 5'd8; c.sw = S_NW; c.o1_t = O_A3; c.o1_f = O_A3;
    return c;
  endfunction

  // y_out = y_in + (x * c >>> 15); x on NW, y_in on NE, y_out on SE
  function automatic alu_cfg_t tap_cfg(word_t coef);
    alu_cfg_t c;
    c = base(); c.port_out = 4'b0100; c.c0 = coef;
    c.sa = S_NW; c.xsel = M_ADD; c.x_signed = 1; c.sy = S_C0; c.y_signed = 1;
    c.shift = 5'd15; c.sw = S_NE; c.o1_t = O_A3; c.o1_f = O_A3;
    return c;
  endfunction

  // ------------------------------------------------------- reference model
  localparam int THR = -500;
  word_t samples [64];
  word_t t2 [64];      // 8 x 8 table, entry j*8+i
  word_t t3 [64];      // 4 x 4 x 4 table, entry k*16+j*4+i
  int coef [8];

  function automatic int lerp(int a, int b, int h);
    return 32'($signed(16'(((((b - a) * h) >>> 8) + a))));
  endfunction

  function automatic int bilerp(word_t x, word_t y);
    int i, j, i1, j1, hx, hy, r0, r1;
    i = (x / 256) % 8; j = (y / 256) % 8; i1 = (i + 1) % 8; j1 = (j + 1) % 8;
    hx = x % 256; hy = y % 256;
    r0 = lerp($signed(t2[j*8+i]), $signed(t2[j*8+i1]), hx);
    r1 = lerp($signed(t2[j1*8+i]), $signed(t2[j1*8+i1]), hx);
    return lerp(r0, r1, hy);
  endfunction

  function automatic int trilerp(word_t x, word_t y, word_t z);
    int ii [2], jj [2], kk [2], hx, hy, hz, vx [4], vy [2];
    ii[0] = (x / 256) % 4; jj[0] = (y / 256) % 4; kk[0] = (z / 256) % 4;
    ii[1] = (ii[0] + 1) % 4; jj[1] = (jj[0] + 1) % 4; kk[1] = (kk[0] + 1) % 4;
    hx = x % 256; hy = y % 256; hz = z % 256;
    for (int n = 0; n < 4; n++)   // n = 2*dz + dy
      vx[n] = lerp($signed(t3[kk[n/2]*16 + jj[n%2]*4 + ii[0]]),
                   $signed(t3[kk[n/2]*16 + jj[n%2]*4 + ii[1]]), hx);
    vy[0] = lerp(vx[0], vx[1], hy);
    vy[1] = lerp(vx[2], vx[3], hy);
    return lerp(vy[0], vy[1], hz);
  endfunction

  // ------------------------------------------------------------ monitors
  word_t cnt_h [$], x2_h [$], y2_h [$], x3_h [$], y3_h [$], z3_h [$];
  word_t stored_h [$];
  logic run = 0, fir_on = 0;
  int n_fir = 0, n_2d = 0, n_3d = 0, n_clamp = 0, n_reconf = 0, n_store = 0,
      n_up = 0, n_io = 0;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (16'(got) !== 16'(exp)) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h at %0t", what, 16'(got), 16'(exp), $time);
    end
  endtask

  always @(negedge clk) if (run) begin
    cnt_h.push_back(n_lane_out[0]);
    x2_h.push_back(s_lane_out[2]); y2_h.push_back(s_lane_out[3]);
    x3_h.push_back(n_lane_out[1]); y3_h.push_back(n_lane_out[2]); z3_h.push_back(n_lane_out[3]);
    // FIR: s_lane_out[0](t) = sum_k f(c_k, samples[cnt(t-13+k)])
    if (fir_on && cnt_h.size() > 14) begin
      int acc;
      acc = 0;
      for (int k = 0; k < 8; k++) begin
        int xv;
        xv = $signed(samples[cnt_h[cnt_h.size() - 14 + k] % 64]);
        acc += (xv * coef[k]) >>> 15;
      end
      chk(s_lane_out[0], acc, "fir");
      n_fir++;
    end
    // 2D: result 4 cycles after the coordinates show on the south lanes
    if (x2_h.size() > 5) begin
      int v;
      v = bilerp(x2_h[$-4], y2_h[$-4]);
      if (v < THR) begin v = THR; n_clamp++; end
      chk(s_lane_out[1], v, "2d");
      n_2d++;
    end
    // 3D: result 6 cycles after the coordinates show on the north lanes
    if (x3_h.size() > 7) begin
      chk(s_lane_out[4], trilerp(x3_h[$-6], y3_h[$-6], z3_h[$-6]), "3d");
      n_3d++;
      n_up++;
    end
    // block 3 LUT0 takes the FIR output of this cycle at the next edge
    if (dut.g_blk[3].u_blk.lut_mode[0] == LM_WR_TRK) stored_h.push_back(dut.down[3][0]);
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    int t, tx, ty, tz, ta, tb, tc, l3 [8], fr [3], lx [4], ly [2], lz;
    int tcnt, tx0, prev;
    word_t mem3 [64];
    cfg_blk = 0; cfg_unit = 0; cfg_idx = 0; cfg_data = '0;
    io_blk = 0; io_lut = 0; io_addr = 0; io_wdata = 0;
    for (int i = 0; i < NLANE; i++) begin n_lane_in[i] = 0; s_lane_in[i] = 0; end
    for (int i = 0; i < 64; i++) begin
      samples[i] = word_t'(int'($urandom_range(0, 16000)) - 8000);
      t2[i] = word_t'(int'($urandom_range(0, 6000)) - 3000);
      t3[i] = word_t'(int'($urandom_range(0, 6000)) - 3000);
    end
    coef = '{16'sd1200, -16'sd2500, 16'sd4100, 16'sd9000, 16'sd9000, 16'sd4100, -16'sd2500, 16'sd1200};
    repeat (3) @(negedge clk);
    rst_n = 1;

    // tables over the IO-bus
    for (int i = 0; i < 64; i++) io_write(0, 0, i, samples[i]);
    for (int l = 0; l < 4; l++) for (int i = 0; i < 64; i++) io_write(2, l, i, t2[i]);
    for (int l = 0; l < 8; l++) for (int i = 0; i < 64; i++) io_write(1, l, i, t3[i]);

    // ---- block 0: FIR
    cfg(0, U_ALU0, 0, cfg_word_t'(counter_cfg(16'd1)));
    drive(0, aport(0, P_SE), t);
    listen(0, t, SNK_LA + 0);          // sample address
    listen(0, t, SNK_UP + 0);          // observed on the north edge
    cfg(0, U_LUT0, 0, cfg_word_t'(LM_RD_TRK));
    drive(0, SRC_LUT + 0, tx0);        // x broadcast
    prev = -1;
    for (int k = 0; k < 8; k++) begin
      cfg(0, U_ALU0 + 1 + k, 0, cfg_word_t'(tap_cfg(word_t'(coef[k]))));
      listen(0, tx0, aport(1 + k, P_NW));
      if (prev >= 0) listen(0, prev, aport(1 + k, P_NE));
      drive(0, aport(1 + k, P_SE), prev);
    end
    listen(0, prev, SNK_DN + 0);
    // block 0 switches: lane 0 down, lanes 1..3 up
    cfg(0, U_SWITCH, 0, cfg_word_t'({SW_OFF, SW_UP, SW_UP, SW_UP, SW_DOWN}));
    for (int i = 1; i <= 3; i++) route(0, SRC_DN + i, SNK_UP + i);

    // ---- block 1: 3D interpolation, FIR pass-through on lane 0
    route(1, SRC_UP + 0, SNK_DN + 0);
    cfg(1, U_ALU0 + 0, 0, cfg_word_t'(counter_cfg(16'h00b5)));
    cfg(1, U_ALU0 + 1, 0, cfg_word_t'(counter_cfg(16'h0061)));
    cfg(1, U_ALU0 + 2, 0, cfg_word_t'(counter_cfg(16'h0029)));
    for (int d = 0; d < 3; d++) begin
      drive(1, aport(d, P_SE), t);
      listen(1, t, SNK_CO + d);
      listen(1, t, SNK_UP + 1 + d);
    end
    for (int l = 0; l < 8; l++) begin
      cfg(1, U_LUT0 + l, 0, cfg_word_t'(LM_RD_AGEN));
      drive(1, SRC_LUT + l, l3[l]);
    end
    for (int d = 0; d < 3; d++) drive(1, SRC_FR + d, fr[d]);
    for (int a = 3; a <= 9; a++) cfg(1, U_ALU0 + a, 0, cfg_word_t'(lerp_cfg()));
    for (int n = 0; n < 4; n++) begin       // ALUs 3..6: along x
      listen(1, l3[2*n], aport(3 + n, P_NW));
      listen(1, l3[2*n+1], aport(3 + n, P_NE));
      listen(1, fr[0], aport(3 + n, P_SW));
      drive(1, aport(3 + n, P_SE), lx[n]);
    end
    for (int n = 0; n < 2; n++) begin       // ALUs 7, 8: along y
      listen(1, lx[2*n], aport(7 + n, P_NW));
      listen(1, lx[2*n+1], aport(7 + n, P_NE));
      listen(1, fr[1], aport(7 + n, P_SW));
      drive(1, aport(7 + n, P_SE), ly[n]);
    end
    listen(1, ly[0], aport(9, P_NW));       // ALU 9: along z
    listen(1, ly[1], aport(9, P_NE));
    listen(1, fr[2], aport(9, P_SW));
    drive(1, aport(9, P_SE), lz);
    listen(1, lz, SNK_DN + 4);
    cfg(1, U_AGEN, 0, cfg_word_t'(AG_3D));
    cfg(1, U_SWITCH, 0, cfg_word_t'({SW_DOWN, SW_OFF, SW_OFF, SW_OFF, SW_DOWN}));

    // ---- block 2: 2D interpolation + clamp, pass-through on lanes 0 and 4
    route(2, SRC_UP + 0, SNK_DN + 0);
    route(2, SRC_UP + 4, SNK_DN + 4);
    cfg(2, U_ALU0 + 0, 0, cfg_word_t'(counter_cfg(16'h0123)));
    cfg(2, U_ALU0 + 1, 0, cfg_word_t'(counter_cfg(16'h0047)));
    drive(2, aport(0, P_SE), tx); listen(2, tx, SNK_CO + 0); listen(2, tx, SNK_DN + 2);
    drive(2, aport(1, P_SE), ty); listen(2, ty, SNK_CO + 1); listen(2, ty, SNK_DN + 3);
    for (int l = 0; l < 4; l++) begin
      cfg(2, U_LUT0 + l, 0, cfg_word_t'(LM_RD_AGEN));
      drive(2, SRC_LUT + l, l3[l]);
    end
    drive(2, SRC_FR + 0, fr[0]);
    drive(2, SRC_FR + 1, fr[1]);
    for (int a = 2; a <= 4; a++) cfg(2, U_ALU0 + a, 0, cfg_word_t'(lerp_cfg()));
    for (int n = 0; n < 2; n++) begin
      listen(2, l3[2*n], aport(2 + n, P_NW));
      listen(2, l3[2*n+1], aport(2 + n, P_NE));
      listen(2, fr[0], aport(2 + n, P_SW));
      drive(2, aport(2 + n, P_SE), lx[n]);
    end
    listen(2, lx[0], aport(4, P_NW));
    listen(2, lx[1], aport(4, P_NE));
    listen(2, fr[1], aport(4, P_SW));
    drive(2, aport(4, P_SE), ta);
    begin   // ALU5: max(v, THR): A1 = v - THR, negative -> THR
      alu_cfg_t c;
      c = base(); c.port_out = 4'b0100; c.c0 = word_t'(THR);
      c.sa = S_NW; c.sb = S_C0; c.a1_sub = 1; c.sc = S_NW; c.rsel = R_A2; c.sw = S_C0;
      c.cond[0].in_sel = '{3'(F_A1N), 3'(F_A1N), 3'(F_A1N), 3'(F_A1N)};
      c.cond[0].tt = 16'h8000; c.o1_t = O_W; c.o1_f = O_R;
      cfg(2, U_ALU0 + 5, 0, cfg_word_t'(c));
    end
    listen(2, ta, aport(5, P_NW));
    drive(2, aport(5, P_SE), tb);
    listen(2, tb, SNK_DN + 1);
    cfg(2, U_AGEN, 0, cfg_word_t'(AG_2D));
    cfg(2, U_SWITCH, 0, cfg_word_t'({SW_DOWN, SW_DOWN, SW_DOWN, SW_DOWN, SW_DOWN}));

    // ---- block 3: lanes through to the south edge, FIR output stored
    for (int i = 0; i < NLANE; i++) route(3, SRC_UP + i, SNK_DN + i);
    cfg(3, U_ALU0 + 0, 0, cfg_word_t'(counter_cfg(16'd1)));
    drive(3, aport(0, P_SE), tcnt);
    listen(3, tcnt, SNK_LA + 0);
    listen(3, 0, SNK_LD + 0);          // track 0 carries lane 0 from above
    cfg(3, U_SWITCH, 0, cfg_word_t'({SW_DOWN, SW_DOWN, SW_DOWN, SW_DOWN, SW_DOWN}));

    // ---- run
    repeat (20) @(negedge clk);
    run = 1;
    fir_on = 1;
    repeat (150) @(negedge clk);

    // reprogram the FIR taps while the array runs
    fir_on = 0;
    coef = '{16'sd300, 16'sd1500, -16'sd3000, 16'sd12000, -16'sd7000, 16'sd2000, 16'sd800, -16'sd100};
    for (int k = 0; k < 8; k++) cfg(0, U_ALU0 + 1 + k, 0, cfg_word_t'(tap_cfg(word_t'(coef[k]))));
    n_reconf++;
    repeat (16) @(negedge clk);
    fir_on = 1;
    cfg(3, U_LUT0 + 0, 0, cfg_word_t'(LM_WR_TRK));
    repeat (150) @(negedge clk);
    cfg(3, U_LUT0 + 0, 0, cfg_word_t'(LM_OFF));
    run = 0;

    // read back the stored FIR output: the last 64 writes, in address order
    // starting anywhere (the address counter runs freely)
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      io_re = 1; io_blk = 2'd3; io_lut = 3'd0; io_addr = 6'(i);
      @(negedge clk);
      io_re = 0;
      checks++;
      if (!io_rvalid) failures++;
      mem3[i] = io_rdata;
      n_io++;
    end
    begin
      int rot, last;
      rot = -1;
      last = stored_h.size() - 1;
      for (int r = 0; r < 64; r++) if (mem3[r] == stored_h[last]) rot = r;
      checks++;
      if (rot < 0 || stored_h.size() < 64) begin
        failures++;
        $display("FAIL stored FIR output not found");
      end else
        for (int j = 0; j < 64; j++) begin
          chk(mem3[(rot + 64 - j) % 64], stored_h[last - j], "stored");
          n_store++;
        end
    end

    $display("fir outputs %0d, 2d %0d (clamped %0d), 3d %0d, reconfigurations %0d, stored %0d, io reads %0d, upward lane words %0d",
             n_fir, n_2d, n_clamp, n_3d, n_reconf, n_store, n_io, n_up);
    if (n_fir == 0 || n_2d == 0 || n_clamp == 0 || n_3d == 0 || n_reconf == 0 ||
        n_store == 0 || n_io == 0 || n_up == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
