// tb_dmc_encoder: self-checking test of the DMC redundant-bit generator.
//
// Checks the default 32-bit configuration against hand-written slices
// (H4..H0 = D3..D0 + D11..D8, ..., V0 = D0 ^ D16, ...), the two worked
// examples 1100 + 0110 = 10010 and 0110 + 1001 = 01111, and random words.
// A second instance with 8-bit symbols (64-bit word) is checked against a
// bit-serial reference model.
module tb_dmc_encoder;

  logic [31:0] data;
  logic [19:0] h;
  logic [15:0] v;

  logic [63:0] data8;
  logic [35:0] h8;
  logic [31:0] v8;

  int checks = 0;
  int failures = 0;

  dmc_encoder dut (.data(data), .h(h), .v(v));
  dmc_encoder #(.M(8), .K1(2), .K2(4)) dut8 (.data(data8), .h(h8), .v(v8));

  function automatic logic [19:0] ref_h(logic [31:0] d);
    logic [19:0] r;
    r[4:0]   = {1'b0, d[3:0]}   + {1'b0, d[11:8]};
    r[9:5]   = {1'b0, d[7:4]}   + {1'b0, d[15:12]};
    r[14:10] = {1'b0, d[19:16]} + {1'b0, d[27:24]};
    r[19:15] = {1'b0, d[23:20]} + {1'b0, d[31:28]};
    return r;
  endfunction

  function automatic logic [15:0] ref_v(logic [31:0] d);
    return d[15:0] ^ d[31:16];
  endfunction

  // integer value of an 8-bit symbol, summed bit by bit
  function automatic int sym8(logic [63:0] d, int s);
    int val = 0;
    for (int b = 0; b < 8; b++) if (d[s*8 + b]) val += (1 << b);
    return val;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s data=%h h=%h v=%h", what, data, h, v);
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
    // worked example: symbol 0 = 1100, symbol 2 = 0110 -> H4..H0 = 10010
    data = '0; data[3:0] = 4'b1100; data[11:8] = 4'b0110; data8 = '0;
    #1 check("example sum 10010", h[4:0] == 5'b10010);
    // symbol 0 = 0110, symbol 2 = 1001 -> 01111
    data[3:0] = 4'b0110; data[11:8] = 4'b1001;
    #1 check("example sum 01111", h[4:0] == 5'b01111);
    // carry out of the 4-bit sum
    data = 32'h0000_0F0F;
    #1 check("carry", h[4:0] == 5'd30 && v == 16'h0F0F);
    data = 32'hFFFF_FFFF;
    #1 check("all ones", h == {4{5'd30}} && v == 16'h0);

    for (int i = 0; i < 500; i++) begin
      data = $urandom;
      data8 = {$urandom, $urandom};
      #1;
      check("random H", h == ref_h(data));
      check("random V", v == ref_v(data));
      for (int r = 0; r < 2; r++)
        for (int p = 0; p < 2; p++) begin
          int g;
          g = r*2 + p;
          check("M=8 H", int'(h8[g*9 +: 9]) == sym8(data8, r*4 + p) + sym8(data8, r*4 + p + 2));
        end
      for (int b = 0; b < 32; b++)
        check("M=8 V", v8[b] == (data8[b] != data8[32 + b]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
