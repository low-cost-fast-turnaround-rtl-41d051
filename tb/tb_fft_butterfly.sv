// tb_fft_butterfly: a radix-2 FFT butterfly mapped on one ALU-block and
// checked cycle by cycle.
//
// The butterfly (decimation in frequency) takes two complex samples A and B
// and a twiddle factor W, and produces X = A + B and Y = (A - B) * W. It is a
// subtraction followed by a complex multiplication and an addition. With
// 4-port ALUs it takes 8 ALUs, one graph node each:
//   ALU0  Xr = Ar + Br                 ALU1  Xi = Ai + Bi
//   ALU2  (Ar - Br) * Wr               ALU3  (Ai - Bi) * -Wi
//   ALU4  (Ar - Br) * Wi               ALU5  (Ai - Bi) * Wr
//   ALU6  Yr = ALU2 + ALU3             ALU7  Yi = ALU4 + ALU5
// The twiddle parts are Q15 constants in the multiplying ALUs (shift 15).
// ALU8 counts the sample index. LUT0..3 hold Ar, Br, Ai and Bi, loaded over
// the IO-bus. The counter addresses all four LUTs. X leaves on lanes 0 and 1
// and Y on lanes 2 and 3, through the switches to the block below.
// Latency from the index to the lane: 3 cycles for X (LUT, ALU, switch) and
// 4 cycles for Y (one more ALU). One butterfly completes per clock.
// Four twiddles (k = 0..3 of a 16-point FFT) are programmed in turn while the
// graph runs. Each result is compared both with an exact fixed-point model
// of the graph and with the real-valued butterfly, within 2 LSB.
module tb_fft_butterfly;
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

  localparam int SRC_LUT = 64, SNK_LA = 64, SNK_UP = 83, SNK_DN = 88;
  function automatic int aport(int alu, port_e p); return 4 * alu + int'(p); endfunction

  // twiddles W = exp(-j*2*pi*k/16), k = 0..3, in Q15
  localparam int WR [4] = '{32767, 30274, 23170, 12540};
  localparam int WI [4] = '{0, -12540, -23170, -30274};

  int trk_next = 0;

  task automatic cfg(int unit, int idx, cfg_word_t data);
    @(negedge clk);
    cfg_we = 1; cfg_unit = 5'(unit); cfg_idx = 7'(idx); cfg_data = data;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // a new track driven by src and read by the sinks in snk
  task automatic net(int src, int snk [$]);
    cfg(U_TRK, trk_next, cfg_word_t'(src));
    foreach (snk[i]) cfg(U_SINK, snk[i], cfg_word_t'(trk_next));
    trk_next++;
  endtask

  function automatic alu_cfg_t base();
    alu_cfg_t c;
    c = '0;
    c.sa = S_ZERO; c.sb = S_ZERO; c.sc = S_ZERO; c.sd = S_ZERO; c.sy = S_ZERO; c.sw = S_ZERO;
    c.zsel = M_ZERO; c.port_out = 4'b0100; c.o1_t = O_R; c.o1_f = O_R;
    return c;
  endfunction

  // NW + NE on SE
  function automatic alu_cfg_t add_cfg();
    alu_cfg_t c;
    c = base();
    c.sa = S_NW; c.sb = S_NE; c.rsel = R_A1;
    return c;
  endfunction

  // (NW - NE) * coef >>> 15 on SE
  function automatic alu_cfg_t mul_cfg(int coef);
    alu_cfg_t c;
    c = base();
    c.sa = S_NW; c.sb = S_NE; c.a1_sub = 1; c.xsel = M_ADD; c.x_signed = 1;
    c.sy = S_C0; c.y_signed = 1; c.c0 = word_t'(coef); c.shift = 5'd15; c.rsel = R_SCALED;
    return c;
  endfunction

  task automatic set_twiddle(int k);
    cfg(U_ALU0 + 2, 0, cfg_word_t'(mul_cfg(WR[k])));
    cfg(U_ALU0 + 3, 0, cfg_word_t'(mul_cfg(-WI[k])));
    cfg(U_ALU0 + 4, 0, cfg_word_t'(mul_cfg(WI[k])));
    cfg(U_ALU0 + 5, 0, cfg_word_t'(mul_cfg(WR[k])));
  endtask

  // sample memories (shadow of LUT0..3)
  word_t ar [64], br [64], ai [64], bi [64];

  function automatic int s16(int v); return int'($signed(word_t'(v))); endfunction
  function automatic int prod(int d, int coef); return (s16(d) * coef) >>> 15; endfunction

  word_t idx_hist [$];
  logic  run = 0;
  int    tw = 0;
  int    n_x = 0, n_y = 0, n_tw = 0;

  task automatic expect_eq(string what, word_t got, int exp_v);
    checks++;
    if (got !== word_t'(exp_v)) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, $signed(got), s16(exp_v));
    end
  endtask

  task automatic expect_near(string what, word_t got, real exp_v);
    real e;
    e = real'($signed(got)) - exp_v;
    checks++;
    if (e > 2.0 || e < -2.0) begin
      failures++;
      $display("FAIL %s got %0d, real butterfly %f", what, $signed(got), exp_v);
    end
  endtask

  always @(negedge clk) if (run) begin
    int i, dr, di;
    real wr, wi;
    idx_hist.push_back(up_lane_out[0]);
    if (idx_hist.size() > 3) begin
      i = int'(idx_hist[idx_hist.size() - 4][5:0]);
      expect_eq("Xr", dn_lane_out[0], s16(ar[i]) + s16(br[i]));
      expect_eq("Xi", dn_lane_out[1], s16(ai[i]) + s16(bi[i]));
      n_x++;
    end
    if (idx_hist.size() > 4) begin
      i = int'(idx_hist[idx_hist.size() - 5][5:0]);
      dr = s16(ar[i]) - s16(br[i]);
      di = s16(ai[i]) - s16(bi[i]);
      expect_eq("Yr", dn_lane_out[2], prod(dr, WR[tw]) + prod(di, -WI[tw]));
      expect_eq("Yi", dn_lane_out[3], prod(dr, WI[tw]) + prod(di, WR[tw]));
      wr = real'(WR[tw]) / 32768.0;
      wi = real'(WI[tw]) / 32768.0;
      expect_near("Yr", dn_lane_out[2], real'(dr) * wr - real'(di) * wi);
      expect_near("Yi", dn_lane_out[3], real'(dr) * wi + real'(di) * wr);
      n_y++;
    end
  end

  initial begin
    alu_cfg_t c;
    cfg_unit = 0; cfg_idx = 0; cfg_data = '0; io_lut = 0; io_addr = 0; io_wdata = 0;
    for (int i = 0; i < NLANE; i++) begin up_lane_in[i] = 0; dn_lane_in[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // samples in [-8000, 8000], so no result overflows 16 bits
    for (int i = 0; i < 64; i++) begin
      ar[i] = word_t'(int'($urandom_range(0, 16000)) - 8000);
      br[i] = word_t'(int'($urandom_range(0, 16000)) - 8000);
      ai[i] = word_t'(int'($urandom_range(0, 16000)) - 8000);
      bi[i] = word_t'(int'($urandom_range(0, 16000)) - 8000);
    end
    for (int l = 0; l < 4; l++)
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        io_we = 1; io_lut = 3'(l); io_addr = 6'(i);
        io_wdata = (l == 0) ? ar[i] : (l == 1) ? br[i] : (l == 2) ? ai[i] : bi[i];
      end
    @(negedge clk);
    io_we = 0;

    // the graph
    cfg(U_ALU0 + 0, 0, cfg_word_t'(add_cfg()));
    cfg(U_ALU0 + 1, 0, cfg_word_t'(add_cfg()));
    set_twiddle(0);
    cfg(U_ALU0 + 6, 0, cfg_word_t'(add_cfg()));
    cfg(U_ALU0 + 7, 0, cfg_word_t'(add_cfg()));
    c = base(); c.c0 = 16'd1; c.sc = S_FB; c.sd = S_C0; c.rsel = R_A2;
    cfg(U_ALU0 + 8, 0, cfg_word_t'(c));

    net(aport(8, P_SE), '{SNK_LA, SNK_LA + 1, SNK_LA + 2, SNK_LA + 3, SNK_UP});
    net(SRC_LUT + 0, '{aport(0, P_NW), aport(2, P_NW), aport(4, P_NW)});      // Ar
    net(SRC_LUT + 1, '{aport(0, P_NE), aport(2, P_NE), aport(4, P_NE)});      // Br
    net(SRC_LUT + 2, '{aport(1, P_NW), aport(3, P_NW), aport(5, P_NW)});      // Ai
    net(SRC_LUT + 3, '{aport(1, P_NE), aport(3, P_NE), aport(5, P_NE)});      // Bi
    net(aport(2, P_SE), '{aport(6, P_NW)});
    net(aport(3, P_SE), '{aport(6, P_NE)});
    net(aport(4, P_SE), '{aport(7, P_NW)});
    net(aport(5, P_SE), '{aport(7, P_NE)});
    net(aport(0, P_SE), '{SNK_DN + 0});
    net(aport(1, P_SE), '{SNK_DN + 1});
    net(aport(6, P_SE), '{SNK_DN + 2});
    net(aport(7, P_SE), '{SNK_DN + 3});
    cfg(U_SWITCH, 0, cfg_word_t'({SW_OFF, SW_DOWN, SW_DOWN, SW_DOWN, SW_DOWN}));
    for (int l = 0; l < 4; l++) cfg(U_LUT0 + l, 0, cfg_word_t'(LM_RD_TRK));

    for (int k = 0; k < 4; k++) begin
      if (k > 0) set_twiddle(k);
      tw = k;
      repeat (6) @(negedge clk);   // let the new twiddle pass the pipeline
      idx_hist.delete();
      run = 1;
      repeat (80) @(negedge clk);
      run = 0;
      n_tw++;
    end

    if (n_x == 0 || n_y == 0 || n_tw != 4) failures++;
    $display("sums %0d, products %0d, twiddles %0d", n_x, n_y, n_tw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
