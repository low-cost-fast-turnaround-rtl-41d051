// tb_fpfa_switch: self-checking test of the block-to-block switches. Random
// direction settings and lane values; each lane must pass its value in the
// programmed direction only, one clock later, and deliver zero otherwise.
module tb_fpfa_switch;
  import fpfa_pkg::*;

  localparam int NLANE = 5;
  logic clk = 0, rst_n = 0, cfg_we = 0;
  sw_dir_e [NLANE-1:0] cfg_dir;
  word_t up_in [NLANE], up_out [NLANE], dn_in [NLANE], dn_out [NLANE];
  int checks = 0, failures = 0;

  fpfa_switch #(.NLANE(NLANE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_dir = '0;
    for (int i = 0; i < NLANE; i++) begin up_in[i] = 16'h1111; dn_in[i] = 16'h2222; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NLANE; i++) begin
      checks++;
      if (dn_out[i] !== 0 || up_out[i] !== 0) begin failures++; $display("FAIL off lane %0d", i); end
    end
    for (int k = 0; k < 500; k++) begin
      sw_dir_e [NLANE-1:0] d;
      for (int i = 0; i < NLANE; i++) d[i] = sw_dir_e'($urandom_range(0, 2));
      cfg_dir = d; cfg_we = 1;
      @(negedge clk);
      cfg_we = 0;
      for (int i = 0; i < NLANE; i++) begin up_in[i] = word_t'($urandom); dn_in[i] = word_t'($urandom); end
      @(negedge clk);
      for (int i = 0; i < NLANE; i++) begin
        checks++;
        if (dn_out[i] !== (d[i] == SW_DOWN ? up_in[i] : '0) ||
            up_out[i] !== (d[i] == SW_UP ? dn_in[i] : '0)) begin
          failures++;
          $display("FAIL lane %0d dir %0d", i, d[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
