// tb_dmc_memory: end-to-end test of the DMC-protected memory at its default
// size (32 words of 32 data bits, 68-bit codewords).
//
// Fills the memory, reads it back clean, then for every word applies one
// radiation event through the upset port and reads the word back: a single
// bit, a burst of up to two adjacent symbols in one row, a random pattern in
// one row, an upset of the H bits or of the V bits only, an upset landing in
// the same cycle as the write, and the equal-sum case (every bit of symbols
// 0 = 0110 and 2 = 1001 flipped) that the code cannot see. Expected data is
// worked out from symbol values in the testbench. Every read must return
// rvalid exactly one cycle after re. Each mechanism is counted and a
// mechanism that never happened counts as a failure.
module tb_dmc_memory;

  localparam int D = 32;

  logic        clk = 0;
  logic        rst_n;
  logic        we, re;
  logic [4:0]  addr;
  logic [31:0] wdata, rdata;
  logic        rvalid, err;
  logic        upset_en;
  logic [4:0]  upset_addr;
  logic [67:0] upset_mask;

  logic [31:0] model [D];

  int checks = 0;
  int failures = 0;
  // mechanism counters
  int n_clean, n_corrected, n_redundant, n_equal_sum, n_write_upset, n_back_to_back;

  dmc_memory dut (
    .clk(clk), .rst_n(rst_n), .we(we), .re(re), .addr(addr), .wdata(wdata),
    .rvalid(rvalid), .rdata(rdata), .error_detected(err),
    .upset_en(upset_en), .upset_addr(upset_addr), .upset_mask(upset_mask)
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s addr=%0d rdata=%h err=%b rvalid=%b", what, addr, rdata, err, rvalid);
    end
  endtask

  function automatic int symv(logic [31:0] d, int s);
    return int'(d[s*4 +: 4]);
  endfunction

  // data the decoder should return after data-bit upset e of word d
  function automatic logic [31:0] expect_data(logic [31:0] d, logic [31:0] e);
    logic [31:0] x;
    x = d;
    for (int g = 0; g < 4; g++) begin
      int a, b;
      a = (g / 2) * 4 + (g % 2);
      b = a + 2;
      if (e[a*4 +: 4] != 0 || e[b*4 +: 4] != 0)
        if (symv(d, a) + symv(d, b) == symv(d ^ e, a) + symv(d ^ e, b)) begin
          x[a*4 +: 4] ^= e[a*4 +: 4];
          x[b*4 +: 4] ^= e[b*4 +: 4];
        end
    end
    return x;
  endfunction

  task automatic write_word(int a, logic [31:0] d);
    we = 1; re = 0; addr = 5'(a); wdata = d;
    model[a] = d;
    @(negedge clk);
    we = 0;
  endtask

  // read, check one-cycle latency, data and the error flag
  task automatic read_word(int a, logic [31:0] want, logic want_err, string what);
    re = 1; we = 0; addr = 5'(a);
    @(posedge clk);
    #1;
    check({what, " rvalid"}, rvalid);
    re = 0;
    @(negedge clk);
    check({what, " data"}, rdata == want);
    check({what, " flag"}, err == want_err);
  endtask

  task automatic upset(int a, logic [67:0] mask);
    upset_en = 1; upset_addr = 5'(a); upset_mask = mask;
    @(negedge clk);
    upset_en = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [67:0] m;
    logic [31:0] e;
    int kind, len, sb, row;
    n_clean = 0; n_corrected = 0; n_redundant = 0; n_equal_sum = 0;
    n_write_upset = 0; n_back_to_back = 0;
    rst_n = 0; we = 0; re = 0; addr = '0; wdata = '0;
    upset_en = 0; upset_addr = '0; upset_mask = '0;
    repeat (3) @(negedge clk);
    check("reset", !rvalid && !err && rdata == 0);
    rst_n = 1;
    @(negedge clk);

    for (int a = 0; a < D; a++) write_word(a, $urandom);
    for (int a = 0; a < D; a++) begin
      read_word(a, model[a], 1'b0, "clean");
      n_clean++;
    end
    @(negedge clk);
    check("rvalid drops", !rvalid);

    // one radiation event per word, several rounds
    for (int round = 0; round < 40; round++) begin
      for (int a = 0; a < D; a++) begin
        kind = $urandom_range(0, 5);
        m = '0;
        row = $urandom_range(0, 1);
        case (kind)
          0: m[row*16 + $urandom_range(0, 15)] = 1'b1;
          1: begin
            len = $urandom_range(1, 8);
            sb = $urandom_range(0, 16 - len);
            for (int b = 0; b < len; b++) m[row*16 + sb + b] = 1'b1;
          end
          2: begin
            m[row*16 +: 16] = 16'($urandom);
            if (m == 0) m[row*16] = 1'b1;
          end
          3: begin
            m[51:32] = 20'($urandom);
            if (m == 0) m[32] = 1'b1;
          end
          4: begin
            m[67:52] = 16'($urandom);
            if (m == 0) m[52] = 1'b1;
          end
          default: begin
            // upset in the same cycle as the write
            m[row*16 + $urandom_range(0, 15)] = 1'b1;
          end
        endcase
        if (kind == 5) begin
          we = 1; addr = 5'(a); wdata = $urandom; model[a] = wdata;
          upset_en = 1; upset_addr = 5'(a); upset_mask = m;
          @(negedge clk);
          we = 0; upset_en = 0;
          n_write_upset++;
        end else begin
          upset(a, m);
        end
        e = m[31:0];
        read_word(a, expect_data(model[a], e), 1'b1, "upset");
        if (kind == 3 || kind == 4) n_redundant++;
        else if (expect_data(model[a], e) != model[a]) n_equal_sum++;
        else n_corrected++;
        // restore the word
        write_word(a, $urandom);
      end
    end

    // the equal-sum case: symbol 0 = 0110, symbol 2 = 1001, all bits flip
    write_word(7, 32'h1234_5906);
    upset(7, 68'h0F0F);
    read_word(7, 32'h1234_5609, 1'b1, "equal-sum");
    n_equal_sum++;

    // back-to-back write then read of the same word, then a read of another
    for (int i = 0; i < 20; i++) begin
      int a;
      a = $urandom_range(0, D-1);
      we = 1; re = 0; addr = 5'(a); wdata = $urandom; model[a] = wdata;
      @(negedge clk);
      we = 0; re = 1;
      @(posedge clk);
      #1 check("b2b rvalid", rvalid);
      @(negedge clk);
      check("b2b data", rdata == model[a] && !err);
      re = 0;
      n_back_to_back++;
    end

    $display("clean %0d, corrected %0d, redundant-only %0d, equal-sum %0d, write+upset %0d, back-to-back %0d",
             n_clean, n_corrected, n_redundant, n_equal_sum, n_write_upset, n_back_to_back);
    check("clean reads happened", n_clean > 0);
    check("corrections happened", n_corrected > 0);
    check("redundant-only upsets happened", n_redundant > 0);
    check("equal-sum upsets happened", n_equal_sum > 0);
    check("write+upset happened", n_write_upset > 0);
    check("back-to-back happened", n_back_to_back > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
