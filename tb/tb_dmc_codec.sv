// tb_dmc_codec: self-checking test of the DMC codec with encoder reuse.
//
// Directed checks on the default 32-bit configuration: the stored codeword
// of a known word, the worked example in which symbol 0 goes from 1100 to
// 1111 and symbol 2 from 0110 to 0111 and both are restored, and the case
// in which every bit of symbols 0 (0110) and 2 (1001) flips, which leaves
// the horizontal syndrome at zero and the data uncorrected. Then randomized
// trials on the 32-, 64- and 128-bit configurations (4-, 8- and 16-bit
// symbols) through dmc_codec_checker.
module tb_dmc_codec;

  logic        en;
  logic [31:0] wdata, rdata;
  logic [67:0] wr_cw, rd_cw;
  logic        det;

  int checks = 0;
  int failures = 0;

  logic start;
  logic done4, done8, done16;
  int c4, f4, c8, f8, c16, f16;
  int k4 [3];
  int k8 [3];
  int k16 [3];

  dmc_codec dut (
    .en(en), .wdata(wdata), .wr_codeword(wr_cw), .rd_codeword(rd_cw),
    .rdata(rdata), .error_detected(det)
  );

  dmc_codec_checker #(.M(4),  .TRIALS(3000)) chk4  (.start(start), .done(done4),  .checks(c4),  .failures(f4),
    .n_corrected(k4[0]),  .n_undetected(k4[1]),  .n_redundant(k4[2]));
  dmc_codec_checker #(.M(8),  .TRIALS(1000)) chk8  (.start(start), .done(done8),  .checks(c8),  .failures(f8),
    .n_corrected(k8[0]),  .n_undetected(k8[1]),  .n_redundant(k8[2]));
  dmc_codec_checker #(.M(16), .TRIALS(1000)) chk16 (.start(start), .done(done16), .checks(c16), .failures(f16),
    .n_corrected(k16[0]), .n_undetected(k16[1]), .n_redundant(k16[2]));

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s en=%b wdata=%h wr_cw=%h rd_cw=%h rdata=%h det=%b",
               what, en, wdata, wr_cw, rd_cw, rdata, det);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [67:0] cw;
    start = 0;
    rd_cw = '0;
    // known word: symbols 7..0 = 8 7 6 5 4 3 2 1
    en = 0; wdata = 32'h8765_4321;
    #1;
    // H: 1+3=4, 2+4=6, 5+7=12, 6+8=14 ; V: 4321 ^ 8765
    check("codeword", wr_cw == {16'h4321 ^ 16'h8765, 5'd14, 5'd12, 5'd6, 5'd4, 32'h8765_4321});

    // worked example: symbol 0 = 1100, symbol 2 = 0110
    wdata = 32'h0000_060C;
    #1 cw = wr_cw;
    check("example H", cw[36:32] == 5'b10010);
    en = 1;
    rd_cw = cw;
    rd_cw[3:0] = 4'b1111;
    rd_cw[11:8] = 4'b0111;
    #1 check("example corrected", rdata == 32'h0000_060C && det);
    // the same symbols in row 1 (symbols 4 and 6)
    en = 0; wdata = 32'h0607_0000;
    #1 cw = wr_cw;
    en = 1; rd_cw = cw ^ 68'h0_0000_0000_0F0F_0000;
    #1 check("row 1 pair corrected", rdata == 32'h0607_0000 && det);

    // all bits of symbols 0 (0110) and 2 (1001) flip: sum unchanged
    en = 0; wdata = 32'h0000_0906;
    #1 cw = wr_cw;
    en = 1; rd_cw = cw ^ 68'h0_0000_0000_0000_0F0F;
    #1 check("equal-sum upset not corrected", rdata == 32'h0000_090F ^ 32'h0000_0009 && det);

    // error in the redundant bits only
    en = 0; wdata = 32'hDEAD_BEEF;
    #1 cw = wr_cw;
    en = 1; rd_cw = cw ^ (68'h1 << 40) ^ (68'h1 << 60);
    #1 check("redundant-bit upset", rdata == 32'hDEAD_BEEF && det);

    // randomized trials on three word widths
    start = 1;
    wait (done4 && done8 && done16);
    checks += c4 + c8 + c16;
    failures += f4 + f8 + f16;
    $display("M=4 : corrected %0d, equal-sum %0d, redundant-only %0d", k4[0], k4[1], k4[2]);
    $display("M=8 : corrected %0d, equal-sum %0d, redundant-only %0d", k8[0], k8[1], k8[2]);
    $display("M=16: corrected %0d, equal-sum %0d, redundant-only %0d", k16[0], k16[1], k16[2]);
    checks++;
    if (k4[0] == 0 || k4[1] == 0 || k4[2] == 0 || k8[0] == 0 || k16[0] == 0) begin
      failures++;
      $display("FAIL a kind of trial never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
