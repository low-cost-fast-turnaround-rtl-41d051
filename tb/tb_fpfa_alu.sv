// tb_fpfa_alu: self-checking test of one ALU.
// Directed graph nodes: linear interpolation F = (B-A)*h + A with an 8-bit
// fraction, a FIR tap y + (c*x >>> 15) with the coefficient in constant C0,
// max(a, b) through the condition logic, and an accumulator using the
// feedback of out1. Then random configurations against a behavioural model
// written here with plain integer arithmetic. Checks the one-cycle latency.
module tb_fpfa_alu;
  import fpfa_pkg::*;

  logic        clk = 0, rst_n = 0, cfg_we = 0;
  alu_cfg_t    cfg_in;
  word_t [3:0] port_in, port_out;
  logic  [3:0] port_oe;
  int checks = 0, failures = 0;

  fpfa_alu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(alu_cfg_t c);
    @(negedge clk);
    cfg_in = c; cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // apply inputs after a falling edge, sample the registered result one
  // rising edge later
  task automatic step_check(word_t [3:0] pin, port_e op, word_t exp, string what);
    @(negedge clk);
    port_in = pin;
    @(negedge clk);
    checks++;
    if (port_out[op] !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, port_out[op], exp);
    end
  endtask

  function automatic alu_cfg_t base();
    alu_cfg_t c;
    c = '0;
    c.sa = S_ZERO; c.sb = S_ZERO; c.sc = S_ZERO; c.sd = S_ZERO; c.sy = S_ZERO; c.sw = S_ZERO;
    c.zsel = M_ZERO;
    return c;
  endfunction

  // behavioural reference for random configurations
  function automatic word_t ref_src(src_e s, word_t [3:0] pin, alu_cfg_t c, word_t fb);
    case (s)
      S_NW: return pin[0]; S_NE: return pin[1]; S_SE: return pin[2]; S_SW: return pin[3];
      S_C0: return c.c0;   S_C1: return c.c1;   S_FB: return fb;      default: return 0;
    endcase
  endfunction

  function automatic word_t ref_bool(bop_e o, word_t x, word_t y);
    case (o) B_AND: return x & y; B_OR: return x | y; B_XOR: return x ^ y; default: return x & ~y; endcase
  endfunction

  function automatic void ref_alu(alu_cfg_t c, word_t [3:0] pin, word_t fb,
                                  output word_t o1, output word_t o2);
    word_t a, b, cc, d, y, w, a1, a2, a3, l1, l2, l3, xo, zo, r, sc;
    int ia1, ia2, ia3;
    longint px, py, pp;
    logic [7:0] fl;
    logic [1:0] cd;
    word_t v [4];
    a = ref_src(c.sa, pin, c, fb); b = ref_src(c.sb, pin, c, fb);
    cc = ref_src(c.sc, pin, c, fb); d = ref_src(c.sd, pin, c, fb);
    y = ref_src(c.sy, pin, c, fb); w = ref_src(c.sw, pin, c, fb);
    ia1 = c.a1_sub ? int'(a) + 65536 - int'(b) : int'(a) + int'(b);
    ia2 = c.a2_sub ? int'(cc) + 65536 - int'(d) : int'(cc) + int'(d);
    a1 = word_t'(ia1); a2 = word_t'(ia2);
    l1 = ref_bool(c.l1_op, a, b); l2 = ref_bool(c.l2_op, cc, d);
    xo = (c.xsel == M_ADD) ? a1 : (c.xsel == M_BOOL) ? l1 : 0;
    zo = (c.zsel == M_ADD) ? a2 : (c.zsel == M_BOOL) ? l2 : 0;
    px = c.x_signed ? longint'($signed(xo)) : longint'(xo);
    py = c.y_signed ? longint'($signed(y)) : longint'(y);
    pp = px * py + longint'($signed(zo));
    sc = word_t'(pp >>> c.shift);
    case (c.rsel) R_A1: r = a1; R_L1: r = l1; R_A2: r = a2; R_L2: r = l2; default: r = sc; endcase
    ia3 = c.a3_sub ? int'(r) + 65536 - int'(w) : int'(r) + int'(w);
    a3 = word_t'(ia3); l3 = ref_bool(c.l3_op, r, w);
    fl = {pp < 0, a3 == 0, a3[15], a2 == 0, a2[15], ia1 > 65535, a1 == 0, a1[15]};
    for (int n = 0; n < 2; n++) begin
      int idx;
      idx = 0;
      for (int k = 0; k < 4; k++) if (fl[c.cond[n].in_sel[k]]) idx += 1 << k;
      cd[n] = c.cond[n].tt[idx];
    end
    v[0] = a3; v[1] = l3; v[2] = r; v[3] = w;
    o1 = v[cd[0] ? c.o1_t : c.o1_f];
    o2 = v[cd[1] ? c.o2_t : c.o2_f];
  endfunction

  initial begin
    alu_cfg_t c;
    word_t [3:0] pin;
    cfg_in = '0; port_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // linear interpolation: A on NW, B on NE, h on SW, F on SE
    c = base();
    c.port_out = 4'b0100;
    c.sa = S_NE; c.sb = S_NW; c.a1_sub = 1; c.xsel = M_ADD; c.x_signed = 1;
    c.sy = S_SW; c.y_signed = 0; c.shift = 5'd8; c.rsel = R_SCALED;
    c.sw = S_NW; c.o1_t = O_A3; c.o1_f = O_A3;
    load(c);
    for (int k = 0; k < 200; k++) begin
      int ia, ib, ih, f;
      ia = int'($urandom_range(0, 8000)) - 4000; ib = int'($urandom_range(0, 8000)) - 4000;
      ih = int'($urandom_range(0, 255));
      f = (((ib - ia) * ih) >>> 8) + ia;
      pin = '0; pin[P_NW] = word_t'(ia); pin[P_NE] = word_t'(ib); pin[P_SW] = word_t'(ih);
      step_check(pin, P_SE, word_t'(f), "lerp");
    end

    // FIR tap (Q15 coefficient in C0): x on NW, y_in on NE, y_out on SE
    c = base();
    c.port_out = 4'b0100; c.c0 = 16'h4000;  // 0.5
    c.sa = S_NW; c.xsel = M_ADD; c.x_signed = 1; c.sy = S_C0; c.y_signed = 1;
    c.shift = 5'd15; c.sw = S_NE; c.o1_t = O_A3; c.o1_f = O_A3;
    load(c);
    for (int k = 0; k < 100; k++) begin
      int ix, iy;
      ix = int'($urandom_range(0, 20000)) - 10000; iy = int'($urandom_range(0, 20000)) - 10000;
      pin = '0; pin[P_NW] = word_t'(ix); pin[P_NE] = word_t'(iy);
      step_check(pin, P_SE, word_t'(((ix * 16384) >>> 15) + iy), "fir tap");
    end

    // max(a, b): A1 = a - b sets the sign flag; out1 = sign ? b : a
    c = base();
    c.port_out = 4'b0010;
    c.sa = S_NW; c.sb = S_SW; c.a1_sub = 1;
    c.sc = S_NW; c.sd = S_ZERO; c.rsel = R_A2; c.sw = S_SW;
    c.cond[0].in_sel = '{3'(F_A1N), 3'(F_A1N), 3'(F_A1N), 3'(F_A1N)};
    c.cond[0].tt = 16'h8000;
    c.o1_t = O_W; c.o1_f = O_R;
    load(c);
    for (int k = 0; k < 100; k++) begin
      int ia, ib;
      ia = int'($urandom_range(0, 30000)) - 15000; ib = int'($urandom_range(0, 30000)) - 15000;
      pin = '0; pin[P_NW] = word_t'(ia); pin[P_SW] = word_t'(ib);
      step_check(pin, P_NE, word_t'(ia > ib ? ia : ib), "max");
    end

    // accumulator: out1 <= out1 + NW, shown on out2 port NE too
    c = base();
    c.port_out = 4'b0110; c.port_src = 4'b0010;
    c.sc = S_FB; c.sd = S_NW; c.rsel = R_A2; c.o1_t = O_R; c.o1_f = O_R;
    c.o2_t = O_R; c.o2_f = O_R;
    port_in = '0;
    load(c);
    begin
      int acc;
      acc = int'(port_out[P_SE]);
      for (int k = 0; k < 50; k++) begin
        int v;
        v = int'($urandom_range(0, 1000));
        acc = (acc + v) & 16'hffff;
        pin = '0; pin[P_NW] = word_t'(v);
        step_check(pin, P_NE, word_t'(acc), "accumulate");
        port_in = '0;   // hold the sum while idle
      end
    end

    // random configurations against the reference model
    for (int k = 0; k < 3000; k++) begin
      word_t e1, e2, fb;
      c = alu_cfg_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      if (c.xsel == 2'd3) c.xsel = M_ZERO;
      if (c.zsel == 2'd3) c.zsel = M_ZERO;
      if (c.rsel > 3'd4) c.rsel = R_SCALED;
      c.port_src[0] = 0;  // port 0 shows out1, the feedback value
      load(c);
      pin = {word_t'($urandom), word_t'($urandom), word_t'($urandom), word_t'($urandom)};
      @(negedge clk);
      port_in = pin;
      fb = port_out[0];
      ref_alu(c, pin, fb, e1, e2);
      @(negedge clk);
      checks++;
      if (port_out[0] !== e1 || port_oe !== c.port_out) begin
        failures++;
        $display("FAIL random %0d out1 %h exp %h", k, port_out[0], e1);
      end
      checks++;
      if (port_out[1] !== (c.port_src[1] ? e2 : e1)) begin
        failures++;
        $display("FAIL random %0d port1 %h exp %h", k, port_out[1], c.port_src[1] ? e2 : e1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
