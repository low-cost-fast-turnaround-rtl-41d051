// tb_fpfa_lut: self-checking test of a look-up table. Fills it over the
// IO-bus, reads it back on both ports with the one-cycle read latency, then
// mixes data-path writes, IO writes (which win on a clash) and reads against
// a shadow array kept by the testbench.
module tb_fpfa_lut;
  import fpfa_pkg::*;

  localparam int DEPTH = 64;
  logic clk = 0;
  logic [5:0] rd_addr, dp_waddr, io_addr;
  word_t rd_data, dp_wdata, io_wdata, io_rdata;
  logic dp_we = 0, io_we = 0, io_re = 0;
  word_t shadow [DEPTH];
  int checks = 0, failures = 0;

  fpfa_lut #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    rd_addr = 0; dp_waddr = 0; io_addr = 0; dp_wdata = 0; io_wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      io_we = 1; io_addr = 6'(i); io_wdata = word_t'(i * 977 + 5); shadow[i] = io_wdata;
    end
    @(negedge clk);
    io_we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      rd_addr = 6'(DEPTH - 1 - i); io_addr = 6'(i); io_re = 1;
      @(negedge clk);
      chk(rd_data, shadow[DEPTH - 1 - i], "dp read");
      chk(io_rdata, shadow[i], "io read");
    end
    io_re = 0;
    for (int k = 0; k < 3000; k++) begin
      logic [5:0] ra;
      ra = 6'($urandom);
      rd_addr = ra;
      dp_we = 1'($urandom); dp_waddr = 6'($urandom); dp_wdata = word_t'($urandom);
      io_we = ($urandom % 4) == 0; io_addr = 6'($urandom); io_wdata = word_t'($urandom);
      begin
        word_t exp;
        exp = shadow[ra];
        if (io_we) shadow[io_addr] = io_wdata;
        else if (dp_we) shadow[dp_waddr] = dp_wdata;
        @(negedge clk);
        chk(rd_data, exp, "mixed read");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
