// dmc_syndrome_calc: DMC syndrome calculator.
//
// Compares the redundant bits recomputed from the read data (H', V') with
// the stored ones (H, V).
//  * Horizontal syndrome: per symbol-pair group, dH = H' - H as an (M+1)-bit
//    unsigned integer subtraction (modulo 2^(M+1)); a non-zero group means
//    its two symbols hold errors.
//  * Vertical syndrome: S = V' ^ V; a set bit marks the column of the error.
// Both follow the design as described. Purely combinational.
module dmc_syndrome_calc
  import dmc_pkg::*;
#(
  parameter int unsigned M  = DMC_M,
  parameter int unsigned K1 = DMC_K1,
  parameter int unsigned K2 = DMC_K2,
  localparam int unsigned HW = h_w(M, K1, K2),
  localparam int unsigned VW = v_w(M, K2)
) (
  input  logic [HW-1:0] h_recomputed,  // H'
  input  logic [HW-1:0] h_stored,      // H
  input  logic [VW-1:0] v_recomputed,  // V'
  input  logic [VW-1:0] v_stored,      // V
  output logic [HW-1:0] dh,            // horizontal syndrome, per group
  output logic [VW-1:0] s              // vertical syndrome
);

  localparam int unsigned NG = K1 * (K2 / 2);  // horizontal groups

  always_comb begin
    for (int unsigned g = 0; g < NG; g++) begin
      dh[g*(M+1) +: M+1] = h_recomputed[g*(M+1) +: M+1] - h_stored[g*(M+1) +: M+1];
    end
  end

  assign s = v_recomputed ^ v_stored;

endmodule
