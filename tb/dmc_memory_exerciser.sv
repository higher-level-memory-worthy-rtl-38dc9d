// dmc_memory_exerciser: drives one dmc_memory configuration through writes,
// radiation upsets and reads, used by tb_dmc_memory_wide.
//
// Symbols are M bits wide in a 2 x 4 matrix. On start it fills all DEPTH
// words, then for each word applies one upset and reads the word back. The
// upset is a burst of up to two symbols in one row, a random pattern in one
// row, or an upset of the H bits only. The expected data is worked out from
// symbol values: a pair whose sum changed is restored, a pair whose sum did
// not change stays corrupted. Each read must return rvalid one cycle after
// re.
module dmc_memory_exerciser #(
  parameter int unsigned M      = 8,
  parameter int unsigned DEPTH  = 32,
  parameter int unsigned ROUNDS = 10
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_corrected,
  output int   n_redundant
);

  localparam int unsigned DW = 8 * M;
  localparam int unsigned HW = 4 * (M + 1);
  localparam int unsigned CW = DW + HW + 4 * M;
  localparam int unsigned AW = $clog2(DEPTH);

  logic          rst_n, we, re, rvalid, err, upset_en;
  logic [AW-1:0] addr, upset_addr;
  logic [DW-1:0] wdata, rdata;
  logic [CW-1:0] upset_mask;
  logic [DW-1:0] model [DEPTH];

  dmc_memory #(.M(M), .K1(2), .K2(4), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .re(re), .addr(addr), .wdata(wdata),
    .rvalid(rvalid), .rdata(rdata), .error_detected(err),
    .upset_en(upset_en), .upset_addr(upset_addr), .upset_mask(upset_mask)
  );

  function automatic logic [CW-1:0] rnd();
    logic [CW-1:0] r;
    for (int i = 0; i < int'(CW); i += 32) r = {r, 32'($urandom)};
    return r;
  endfunction

  function automatic longint symval(logic [DW-1:0] d, int s);
    longint val = 0;
    for (int b = 0; b < int'(M); b++) if (d[s*M + b]) val += longint'(1) << b;
    return val;
  endfunction

  function automatic logic [DW-1:0] expect_data(logic [DW-1:0] d, logic [DW-1:0] e);
    logic [DW-1:0] x;
    x = d;
    for (int g = 0; g < 4; g++) begin
      int a, b;
      a = (g / 2) * 4 + (g % 2);
      b = a + 2;
      if (e[a*M +: M] != 0 || e[b*M +: M] != 0)
        if (symval(d, a) + symval(d, b) == symval(d ^ e, a) + symval(d ^ e, b)) begin
          x[a*M +: M] ^= e[a*M +: M];
          x[b*M +: M] ^= e[b*M +: M];
        end
    end
    return x;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL M=%0d %s addr=%0d rdata=%h", M, what, addr, rdata);
    end
  endtask

  initial begin
    logic [CW-1:0] m;
    logic [DW-1:0] want;
    int kind, row, len, sb;
    checks = 0; failures = 0; done = 0; n_corrected = 0; n_redundant = 0;
    rst_n = 0; we = 0; re = 0; addr = '0; wdata = '0;
    upset_en = 0; upset_addr = '0; upset_mask = '0;
    wait (start);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < int'(DEPTH); a++) begin
      we = 1; addr = AW'(a); wdata = DW'(rnd()); model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int r = 0; r < int'(ROUNDS); r++)
      for (int a = 0; a < int'(DEPTH); a++) begin
        m = '0;
        kind = $urandom_range(0, 2);
        row = $urandom_range(0, 1);
        if (kind == 0) begin
          len = $urandom_range(1, 2*M);
          sb = $urandom_range(0, 4*M - len);
          for (int b = 0; b < len; b++) m[row*4*M + sb + b] = 1'b1;
        end else if (kind == 1) begin
          m[row*4*M +: 4*M] = (4*M)'(rnd());
          if (m == 0) m[row*4*M] = 1'b1;
        end else begin
          m[DW +: HW] = HW'(rnd());
          if (m == 0) m[DW] = 1'b1;
        end
        upset_en = 1; upset_addr = AW'(a); upset_mask = m;
        @(negedge clk);
        upset_en = 0;
        want = expect_data(model[a], m[DW-1:0]);
        re = 1; addr = AW'(a);
        @(posedge clk);
        #1 check("rvalid", rvalid);
        re = 0;
        @(negedge clk);
        check("data", rdata == want);
        check("flag", err);
        if (kind == 2) n_redundant++;
        else if (want == model[a]) n_corrected++;
        // restore the word
        we = 1; wdata = DW'(rnd()); model[a] = wdata;
        @(negedge clk);
        we = 0;
      end
    done = 1;
  end

endmodule
