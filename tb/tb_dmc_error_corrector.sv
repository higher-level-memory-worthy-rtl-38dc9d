// tb_dmc_error_corrector: self-checking test of the DMC error corrector.
//
// Each flagged bit must come out inverted and every other bit unchanged;
// checked bit by bit on random data and flag patterns.
module tb_dmc_error_corrector;

  logic [31:0] data, flip, corr;

  int checks = 0;
  int failures = 0;

  dmc_error_corrector dut (.data(data), .flip(flip), .corrected(corr));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      data = $urandom;
      flip = (i < 10) ? 32'h0 : $urandom;
      #1;
      for (int b = 0; b < 32; b++) begin
        logic expect_bit;
        expect_bit = flip[b] ? !data[b] : data[b];
        checks++;
        if (corr[b] !== expect_bit) begin
          failures++;
          $display("FAIL bit %0d data=%h flip=%h corr=%h", b, data, flip, corr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
