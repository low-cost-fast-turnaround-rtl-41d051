// tb_fpfa_addrgen: self-checking test of the interpolation address generator.
// Random coordinates in every mode; corner addresses are computed from the
// integer parts with explicit modulo arithmetic, and the fractions are
// checked 1, 2 and 3 cycles after their coordinate.
module tb_fpfa_addrgen;
  import fpfa_pkg::*;

  logic clk = 0, rst_n = 0;
  ag_mode_e mode;
  word_t cx, cy, cz, frac_x, frac_y, frac_z;
  logic [7:0][5:0] addr;
  word_t hx [$], hy [$], hz [$];
  int checks = 0, failures = 0;

  fpfa_addrgen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int corner(ag_mode_e m, word_t x, word_t y, word_t z, int n);
    int i, j, k, dx, dy, dz;
    i = x / 256; j = y / 256; k = z / 256;
    dx = n % 2; dy = (n / 2) % 2; dz = n / 4;
    case (m)
      AG_1D: return (i + dx) % 64;
      AG_2D: return ((j + dy) % 8) * 8 + (i + dx) % 8;
      AG_3D: return ((k + dz) % 4) * 16 + ((j + dy) % 4) * 4 + (i + dx) % 4;
      default: return 0;
    endcase
  endfunction

  initial begin
    mode = AG_OFF; cx = 0; cy = 0; cz = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // fractions of earlier coordinates
      if (hx.size() >= 1) begin
        checks++;
        if (frac_x !== hx[$]) begin failures++; $display("FAIL frac_x %h exp %h", frac_x, hx[$]); end
      end
      if (hy.size() >= 2) begin
        checks++;
        if (frac_y !== hy[$-1]) begin failures++; $display("FAIL frac_y"); end
      end
      if (hz.size() >= 3) begin
        checks++;
        if (frac_z !== hz[$-2]) begin failures++; $display("FAIL frac_z"); end
      end
      mode = ag_mode_e'(t % 4);
      cx = word_t'($urandom); cy = word_t'($urandom); cz = word_t'($urandom);
      hx.push_back(cx % 256); hy.push_back(cy % 256); hz.push_back(cz % 256);
      #1;
      for (int n = 0; n < 8; n++) begin
        checks++;
        if (int'(addr[n]) != corner(mode, cx, cy, cz, n)) begin
          failures++;
          $display("FAIL mode %0d corner %0d addr %0d exp %0d", mode, n, addr[n], corner(mode, cx, cy, cz, n));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
