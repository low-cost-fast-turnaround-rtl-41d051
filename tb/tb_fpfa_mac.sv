// tb_fpfa_mac: self-checking test of the Booth/Wallace multiplier-adder.
// Drives corner values and random operands in all four signed/unsigned
// combinations and compares p with x*y+z computed by 64-bit integer
// arithmetic in the testbench.
module tb_fpfa_mac;
  import fpfa_pkg::*;

  word_t x, y, z;
  logic xs, ys;
  logic [PW-1:0] p;
  int checks = 0, failures = 0;

  fpfa_mac dut (.x(x), .y(y), .z(z), .x_signed(xs), .y_signed(ys), .p(p));

  function automatic longint ext(word_t v, logic s);
    return s ? longint'($signed(v)) : longint'(v);
  endfunction

  task automatic check_one(word_t a, word_t b, word_t c, logic sa, logic sb);
    longint exp;
    x = a; y = b; z = c; xs = sa; ys = sb;
    #1;
    exp = ext(a, sa) * ext(b, sb) + longint'($signed(c));
    checks++;
    if (p !== PW'(exp)) begin
      failures++;
      $display("FAIL x=%h(%0d) y=%h(%0d) z=%h p=%h exp=%h", a, sa, b, sb, c, p, PW'(exp));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t corner [6] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'h5555};
    for (int m = 0; m < 4; m++)
      foreach (corner[i]) foreach (corner[j])
        check_one(corner[i], corner[j], corner[(i + j) % 6], m[0], m[1]);
    for (int k = 0; k < 4000; k++)
      check_one(word_t'($urandom), word_t'($urandom), word_t'($urandom), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
