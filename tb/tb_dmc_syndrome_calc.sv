// tb_dmc_syndrome_calc: self-checking test of the DMC syndrome calculator.
//
// Checks the worked example dH = 10110 - 10010 = 00100, a zero syndrome when
// nothing changed, wrap-around of the subtraction, and random inputs against
// per-group integer arithmetic done in the testbench.
module tb_dmc_syndrome_calc;

  logic [19:0] hr, hs, dh;
  logic [15:0] vr, vs, s;

  int checks = 0;
  int failures = 0;

  dmc_syndrome_calc dut (
    .h_recomputed(hr), .h_stored(hs), .v_recomputed(vr), .v_stored(vs),
    .dh(dh), .s(s)
  );

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s hr=%h hs=%h dh=%h vr=%h vs=%h s=%h", what, hr, hs, dh, vr, vs, s);
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
    hr = '0; hs = '0; vr = '0; vs = '0;
    hr[4:0] = 5'b10110; hs[4:0] = 5'b10010;
    #1 check("example", dh == 20'b00100 && s == 0);
    hr = 20'h5A5A5; hs = 20'h5A5A5; vr = 16'hBEEF; vs = 16'hBEEF;
    #1 check("no error", dh == 0 && s == 0);
    hr = '0; hs = '0; hs[9:5] = 5'd1;
    #1 check("wrap", dh[9:5] == 5'b11111 && dh[4:0] == 0 && dh[19:10] == 0);

    for (int i = 0; i < 1000; i++) begin
      hr = 20'($urandom); hs = 20'($urandom);
      vr = 16'($urandom); vs = 16'($urandom);
      #1;
      for (int g = 0; g < 4; g++) begin
        int diff;
        diff = (int'(hr[g*5 +: 5]) - int'(hs[g*5 +: 5]) + 32) % 32;
        check("dH", int'(dh[g*5 +: 5]) == diff);
      end
      for (int b = 0; b < 16; b++) check("S", s[b] == (vr[b] != vs[b]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
