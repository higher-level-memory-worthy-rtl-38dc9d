// dmc_error_corrector: DMC error corrector.
//
// Inverts every data bit the error locator flags: a row of XOR gates,
// corrected = data ^ flip. Follows the design as described. Combinational.
module dmc_error_corrector
  import dmc_pkg::*;
#(
  parameter int unsigned M  = DMC_M,
  parameter int unsigned K1 = DMC_K1,
  parameter int unsigned K2 = DMC_K2,
  localparam int unsigned DW = data_w(M, K1, K2)
) (
  input  logic [DW-1:0] data,
  input  logic [DW-1:0] flip,
  output logic [DW-1:0] corrected
);

  assign corrected = data ^ flip;

endmodule
