// dmc_encoder: DMC redundant-bit generator.
//
// The data word D is split into K1 rows of K2 symbols of M bits; symbol
// s = r*K2 + c occupies D[s*M +: M], so with the defaults row 0 holds
// symbols 0..3 (D0..D15) and row 1 symbols 4..7 (D16..D31).
//  * Horizontal bits: in each row, symbol c is paired with symbol c + K2/2
//    and the pair is added as unsigned integers into an (M+1)-bit sum.
//    Group g = r*(K2/2) + c holds that sum in h[g*(M+1) +: M+1]; for the
//    defaults H4..H0 = sym0 + sym2, H9..H5 = sym1 + sym3,
//    H14..H10 = sym4 + sym6, H19..H15 = sym5 + sym7.
//  * Vertical bits: v[c*M + b] is the XOR of bit b of symbol column c over
//    all rows (for the defaults V0 = D0 ^ D16, ..., V15 = D15 ^ D31).
// The integer addition for H and the column parity for V follow the design
// as described; the bit ordering of H and V within their vectors is this
// implementation's choice. Purely combinational; the same unit recomputes
// H' and V' from the read data when the decoder reuses it.
module dmc_encoder
  import dmc_pkg::*;
#(
  parameter int unsigned M  = DMC_M,
  parameter int unsigned K1 = DMC_K1,
  parameter int unsigned K2 = DMC_K2,
  localparam int unsigned DW = data_w(M, K1, K2),
  localparam int unsigned HW = h_w(M, K1, K2),
  localparam int unsigned VW = v_w(M, K2)
) (
  input  logic [DW-1:0] data,
  output logic [HW-1:0] h,
  output logic [VW-1:0] v
);

  localparam int unsigned NP = K2 / 2;  // symbol pairs per row

  always_comb begin
    for (int unsigned r = 0; r < K1; r++) begin
      for (int unsigned p = 0; p < NP; p++) begin
        h[(r*NP + p)*(M+1) +: M+1] =
            (M+1)'(data[(r*K2 + p)*M +: M]) + (M+1)'(data[(r*K2 + p + NP)*M +: M]);
      end
    end
  end

  always_comb begin
    v = '0;
    for (int unsigned r = 0; r < K1; r++) begin
      v ^= data[r*K2*M +: K2*M];
    end
  end

  initial begin
    assert (K2 % 2 == 0) else $error("dmc_encoder: K2 must be even");
  end

endmodule
