// tb_dmc_error_locator: self-checking test of the DMC error locator.
//
// Drives horizontal and vertical syndromes and checks the flagged data bits
// against the rule written out per symbol: symbols 0 and 2 use group 0
// (dH bits 4..0), 1 and 3 group 1, 4 and 6 group 2, 5 and 7 group 3, and
// symbol s uses vertical syndrome bits of column s mod 4.
module tb_dmc_error_locator;

  logic [19:0] dh;
  logic [15:0] s;
  logic [31:0] flip;
  logic        det;

  int checks = 0;
  int failures = 0;

  dmc_error_locator dut (.dh(dh), .s(s), .flip(flip), .error_detected(det));

  function automatic logic [31:0] ref_flip(logic [19:0] d, logic [15:0] sv);
    logic [3:0] ge;
    logic [31:0] f;
    ge[0] = d[4:0] != 0;
    ge[1] = d[9:5] != 0;
    ge[2] = d[14:10] != 0;
    ge[3] = d[19:15] != 0;
    f[3:0]   = ge[0] ? sv[3:0]   : 4'h0;
    f[7:4]   = ge[1] ? sv[7:4]   : 4'h0;
    f[11:8]  = ge[0] ? sv[11:8]  : 4'h0;
    f[15:12] = ge[1] ? sv[15:12] : 4'h0;
    f[19:16] = ge[2] ? sv[3:0]   : 4'h0;
    f[23:20] = ge[3] ? sv[7:4]   : 4'h0;
    f[27:24] = ge[2] ? sv[11:8]  : 4'h0;
    f[31:28] = ge[3] ? sv[15:12] : 4'h0;
    return f;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s dh=%h s=%h flip=%h det=%b", what, dh, s, flip, det);
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
    dh = '0; s = '0;
    #1 check("quiet", flip == 0 && !det);
    // worked example: dH(0,2) = 00100, S3..S0 = 0011, S11..S8 = 0001
    dh = 20'b00100; s = 16'h0103;
    #1 check("example", flip == 32'h0000_0103 && det);
    // vertical syndrome only (error in a V bit): detected, nothing flipped
    dh = '0; s = 16'h0040;
    #1 check("V only", flip == 0 && det);
    // horizontal syndrome only (error in an H bit)
    dh = 20'b00001 << 15; s = '0;
    #1 check("H only", flip == 0 && det);
    // row 1 symbol 5
    dh = 20'b00011 << 15; s = 16'h00F0;
    #1 check("symbol 5", flip == 32'h00F0_0000 && det);

    for (int i = 0; i < 2000; i++) begin
      dh = 20'($urandom);
      if ($urandom_range(0, 1) == 1) dh[($urandom_range(0, 3))*5 +: 5] = '0;
      s = 16'($urandom);
      #1;
      check("random flip", flip == ref_flip(dh, s));
      check("random det", det == ((dh != 0) || (s != 0)));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
