// tb_fpfa_iobus: self-checking test of the global IO-bus decoder. Random
// requests; checks the per-block strobes in the request cycle and the read
// data (from stand-in block outputs) and valid flag one cycle later.
module tb_fpfa_iobus;
  import fpfa_pkg::*;

  localparam int NBLK = 4;
  logic clk = 0, rst_n = 0;
  logic io_we = 0, io_re = 0, io_rvalid;
  logic [1:0] io_blk;
  word_t io_rdata;
  logic [NBLK-1:0] blk_we, blk_re;
  word_t blk_rdata [NBLK];
  int checks = 0, failures = 0;

  fpfa_iobus #(.NBLK(NBLK)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic pre, pwe;
    logic [1:0] pblk;
    io_blk = 0;
    for (int b = 0; b < NBLK; b++) blk_rdata[b] = word_t'(16'h1000 * (b + 1));
    repeat (2) @(negedge clk);
    rst_n = 1;
    pre = 0; pblk = 0;
    for (int k = 0; k < 2000; k++) begin
      io_we = 1'($urandom); io_re = !io_we && 1'($urandom); io_blk = 2'($urandom);
      #1;
      checks++;
      if (blk_we !== (io_we ? 4'(1 << io_blk) : 4'b0) || blk_re !== (io_re ? 4'(1 << io_blk) : 4'b0)) begin
        failures++;
        $display("FAIL strobes we=%b re=%b", blk_we, blk_re);
      end
      pre = io_re; pblk = io_blk; pwe = io_we;
      @(negedge clk);
      // the next request addresses another block while the read data returns
      io_we = 0; io_re = 0; io_blk = pblk + 2'd1;
      #1;
      checks++;
      if (io_rvalid !== pre || (pre && io_rdata !== blk_rdata[pblk])) begin
        failures++;
        $display("FAIL read valid=%b data=%h", io_rvalid, io_rdata);
      end
      // stand-in blocks change their outputs after the read was taken
      for (int b = 0; b < NBLK; b++) blk_rdata[b] = word_t'($urandom);
      #1;
      checks++;
      if (pre && io_rdata !== blk_rdata[pblk]) begin
        failures++;
        $display("FAIL read mux follows block %0d", pblk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
