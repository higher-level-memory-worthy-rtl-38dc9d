// dmc_error_locator: DMC error locator.
//
// A data bit is flagged when the horizontal syndrome group covering its
// symbol is non-zero and the vertical syndrome bit of its column is set:
// for bit b of the symbol in row r, column c,
//   flip = (dH[group(r, c mod K2/2)] != 0) & S[c*M + b].
// The group narrows the error to one symbol pair in one row and S picks the
// column, which together give the symbol and bit, as in the design's
// correction rule D0correct = D0 ^ S0 for an error found in symbol 0. An
// error in a redundant bit alone sets only dH or only S and flags nothing.
// error_detected is set for any non-zero syndrome bit (this implementation's
// addition). Purely combinational.
module dmc_error_locator
  import dmc_pkg::*;
#(
  parameter int unsigned M  = DMC_M,
  parameter int unsigned K1 = DMC_K1,
  parameter int unsigned K2 = DMC_K2,
  localparam int unsigned DW = data_w(M, K1, K2),
  localparam int unsigned HW = h_w(M, K1, K2),
  localparam int unsigned VW = v_w(M, K2)
) (
  input  logic [HW-1:0] dh,
  input  logic [VW-1:0] s,
  output logic [DW-1:0] flip,           // data bits to invert
  output logic          error_detected  // any syndrome bit non-zero
);

  localparam int unsigned NP = K2 / 2;
  localparam int unsigned NG = K1 * NP;

  logic [NG-1:0] group_err;

  always_comb begin
    for (int unsigned g = 0; g < NG; g++) begin
      group_err[g] = |dh[g*(M+1) +: M+1];
    end
  end

  always_comb begin
    for (int unsigned r = 0; r < K1; r++) begin
      for (int unsigned c = 0; c < K2; c++) begin
        flip[(r*K2 + c)*M +: M] = s[c*M +: M] & {M{group_err[r*NP + (c % NP)]}};
      end
    end
  end

  assign error_detected = (|dh) | (|s);

endmodule
