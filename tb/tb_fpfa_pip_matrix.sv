// tb_fpfa_pip_matrix: self-checking test of the PIP switch matrix. After
// reset every sink must read zero; then random driver and sink settings
// (including out-of-range "disconnected" settings) and random source values
// are compared with a connection table kept by the testbench.
module tb_fpfa_pip_matrix;
  import fpfa_pkg::*;

  localparam int NSRC = 85, NSINK = 93, NTRK = 32;
  logic clk = 0, rst_n = 0;
  logic cfg_trk_we = 0, cfg_sink_we = 0;
  logic [5:0] cfg_trk_idx, cfg_sink_val;
  logic [6:0] cfg_trk_val, cfg_sink_idx;
  word_t src [NSRC];
  word_t trk [NTRK];
  word_t sink [NSINK];
  int drv [NTRK];
  int rd [NSINK];
  int checks = 0, failures = 0;

  fpfa_pip_matrix #(.NSRC(NSRC), .NSINK(NSINK), .NTRK(NTRK)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int s = 0; s < NSINK; s++) begin
      word_t exp;
      exp = (rd[s] < NTRK && drv[rd[s]] < NSRC) ? src[drv[rd[s]]] : '0;
      checks++;
      if (sink[s] !== exp) begin
        failures++;
        $display("FAIL sink %0d got %h exp %h", s, sink[s], exp);
      end
    end
  endtask

  initial begin
    cfg_trk_idx = 0; cfg_trk_val = 0; cfg_sink_idx = 0; cfg_sink_val = 0;
    for (int i = 0; i < NSRC; i++) src[i] = word_t'($urandom);
    for (int t = 0; t < NTRK; t++) drv[t] = NSRC;
    for (int s = 0; s < NSINK; s++) rd[s] = NTRK;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 check_all();
    for (int k = 0; k < 1500; k++) begin
      @(negedge clk);
      cfg_trk_we = 1; cfg_trk_idx = 6'($urandom_range(0, NTRK - 1));
      cfg_trk_val = 7'($urandom_range(0, NSRC + 3));
      cfg_sink_we = 1; cfg_sink_idx = 7'($urandom_range(0, NSINK - 1));
      cfg_sink_val = 6'($urandom_range(0, NTRK + 2));
      @(negedge clk);
      drv[cfg_trk_idx] = int'(cfg_trk_val);
      rd[cfg_sink_idx] = int'(cfg_sink_val);
      cfg_trk_we = 0; cfg_sink_we = 0;
      for (int i = 0; i < NSRC; i++) src[i] = word_t'($urandom);
      #1;
      if (k % 10 == 0 || k > 1400) check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
