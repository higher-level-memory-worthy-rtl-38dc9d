// tb_dmc_memory_wide: the DMC-protected memory with wider words.
//
// Runs dmc_memory with 8-bit symbols (64-bit words) and with 16-bit symbols
// (128-bit words), each 32 words deep, through upsets and reads using
// dmc_memory_exerciser, and requires corrected reads and redundant-bit
// upsets to have happened in both.
module tb_dmc_memory_wide;

  logic clk = 0;
  logic start = 0;
  logic done8, done16;
  int c8, f8, k8, r8, c16, f16, k16, r16;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  dmc_memory_exerciser #(.M(8))  ex8  (.clk(clk), .start(start), .done(done8),
    .checks(c8), .failures(f8), .n_corrected(k8), .n_redundant(r8));
  dmc_memory_exerciser #(.M(16)) ex16 (.clk(clk), .start(start), .done(done16),
    .checks(c16), .failures(f16), .n_corrected(k16), .n_redundant(r16));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 start = 1;
    wait (done8 && done16);
    checks = c8 + c16 + 1;
    failures = f8 + f16;
    $display("64-bit: corrected %0d, redundant-only %0d; 128-bit: corrected %0d, redundant-only %0d",
             k8, r8, k16, r16);
    if (k8 == 0 || r8 == 0 || k16 == 0 || r16 == 0) begin
      failures++;
      $display("FAIL a kind of upset never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
