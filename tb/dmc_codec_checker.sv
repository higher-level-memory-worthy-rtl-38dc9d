// dmc_codec_checker: randomized encode / upset / decode check of one
// dmc_codec configuration, used by tb_dmc_codec.
//
// On start it runs TRIALS trials. Each trial encodes a random word with
// en = 0, corrupts the codeword and decodes it with en = 1. Upsets are
// either confined to the data bits of one symbol row (a single bit, a burst
// of up to two symbols, or a random pattern) or confined to the redundant
// bits (all in H or all in V). The expected output follows the code's decoding rule, worked out
// here on symbol values: a symbol pair whose integer sum is changed by the
// upset is restored; a pair whose sum is unchanged stays corrupted (the
// rare undetected case of the horizontal syndrome); upsets in the redundant
// bits leave the data intact. error_detected must be set for any upset.
// The trial counts of each kind are reported for the caller.
module dmc_codec_checker #(
  parameter int unsigned M      = 4,
  parameter int unsigned TRIALS = 200
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_corrected,    // trials with data errors that were restored
  output int   n_undetected,   // trials with a pair whose sum did not change
  output int   n_redundant     // trials with upsets in redundant bits only
);

  localparam int unsigned DW = 8 * M;
  localparam int unsigned HW = 4 * (M + 1);
  localparam int unsigned CW = DW + HW + 4 * M;

  logic          en;
  logic [DW-1:0] wdata;
  logic [CW-1:0] wr_cw, rd_cw;
  logic [DW-1:0] rdata;
  logic          det;

  dmc_codec #(.M(M), .K1(2), .K2(4)) dut (
    .en(en), .wdata(wdata), .wr_codeword(wr_cw), .rd_codeword(rd_cw),
    .rdata(rdata), .error_detected(det)
  );

  function automatic logic [CW-1:0] rand_cw();
    logic [CW-1:0] r;
    for (int i = 0; i < CW; i += 32) r = {r, 32'($urandom)};
    return r;
  endfunction

  function automatic longint symval(logic [DW-1:0] d, int s);
    longint val = 0;
    for (int b = 0; b < int'(M); b++) if (d[s*M + b]) val += longint'(1) << b;
    return val;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL M=%0d %s wdata=%h rd_cw=%h rdata=%h det=%b", M, what, wdata, rd_cw, rdata, det);
    end
  endtask

  initial begin
    logic [CW-1:0] cw, err;
    logic [DW-1:0] derr, expected;
    int row, kind, start_bit, len;
    logic any_undet;
    checks = 0; failures = 0; done = 0;
    n_corrected = 0; n_undetected = 0; n_redundant = 0;
    en = 0; wdata = '0; rd_cw = '0;
    wait (start);
    for (int t = 0; t < int'(TRIALS); t++) begin
      // encode
      en = 0;
      wdata = DW'(rand_cw());
      #1;
      check("write passes data", wr_cw[DW-1:0] == wdata);
      check("no flag on write", !det);
      cw = wr_cw;
      // upset
      err = '0;
      kind = $urandom_range(0, 3);
      row = $urandom_range(0, 1);
      case (kind)
        0: err[row*4*M + $urandom_range(0, 4*M-1)] = 1'b1;
        1: begin
          len = $urandom_range(1, 2*M);
          start_bit = $urandom_range(0, 4*M - len);
          for (int b = 0; b < len; b++) err[row*4*M + start_bit + b] = 1'b1;
        end
        2: begin
          err[row*4*M +: 4*M] = (4*M)'(rand_cw());
          if (err == 0) err[row*4*M] = 1'b1;
        end
        default: begin
          // either the H bits or the V bits, not both
          if ($urandom_range(0, 1) == 1) err[DW +: HW] = HW'(rand_cw());
          else err[DW+HW +: 4*M] = (4*M)'(rand_cw());
          if (err == 0) err[DW] = 1'b1;
        end
      endcase
      derr = err[DW-1:0];
      // expected decode, pair by pair
      expected = wdata;
      any_undet = 0;
      for (int r = 0; r < 2; r++)
        for (int p = 0; p < 2; p++) begin
          int a, b;
          a = r*4 + p;
          b = a + 2;
          if (derr[a*M +: M] != 0 || derr[b*M +: M] != 0) begin
            if (symval(wdata, a) + symval(wdata, b) ==
                symval(wdata ^ derr, a) + symval(wdata ^ derr, b)) begin
              expected[a*M +: M] = wdata[a*M +: M] ^ derr[a*M +: M];
              expected[b*M +: M] = wdata[b*M +: M] ^ derr[b*M +: M];
              any_undet = 1;
            end
          end
        end
      // decode
      en = 1;
      rd_cw = cw ^ err;
      #1;
      check("decode", rdata == expected);
      check("detect", det == 1'b1);
      if (kind == 3) n_redundant++;
      else if (any_undet) n_undetected++;
      else n_corrected++;
      // clean read
      rd_cw = cw;
      #1;
      check("clean decode", rdata == wdata && !det);
    end
    done = 1;
  end

endmodule
