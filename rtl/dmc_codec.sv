// dmc_codec: DMC encoder and decoder with encoder reuse.
//
// A single dmc_encoder serves both directions. The enable input en chooses
// its role:
//  * en = 0 (write): the encoder takes wdata and the unit emits the codeword
//    {V, H, D} to be stored.
//  * en = 1 (read): the encoder takes the data field of the codeword read
//    from memory and recomputes H' and V'; the syndrome calculator forms
//    dH = H' - H and S = V' ^ V, the error locator picks the bits to invert
//    and the error corrector returns the corrected data.
// Sharing the encoder in this way, with en driven from the memory's read and
// write controls, follows the design; the polarity of en (1 = decode) and the
// codeword field order are this implementation's choices. The unit is purely
// combinational, so a write and a read cannot use it in the same cycle.
module dmc_codec
  import dmc_pkg::*;
#(
  parameter int unsigned M  = DMC_M,
  parameter int unsigned K1 = DMC_K1,
  parameter int unsigned K2 = DMC_K2,
  localparam int unsigned DW = data_w(M, K1, K2),
  localparam int unsigned HW = h_w(M, K1, K2),
  localparam int unsigned VW = v_w(M, K2),
  localparam int unsigned CW = code_w(M, K1, K2)
) (
  input  logic          en,              // 0: encode (write), 1: decode (read)
  input  logic [DW-1:0] wdata,           // data to encode
  output logic [CW-1:0] wr_codeword,     // {V, H, D} to store
  input  logic [CW-1:0] rd_codeword,     // {V, H, D} read from memory
  output logic [DW-1:0] rdata,           // corrected data
  output logic          error_detected   // non-zero syndrome on a read
);

  logic [DW-1:0] enc_data;
  logic [HW-1:0] enc_h;
  logic [VW-1:0] enc_v;

  logic [DW-1:0] rd_d;
  logic [HW-1:0] rd_h;
  logic [VW-1:0] rd_v;

  logic [HW-1:0] dh;
  logic [VW-1:0] s;
  logic [DW-1:0] flip;
  logic          detected;

  assign {rd_v, rd_h, rd_d} = rd_codeword;

  // the one shared encoder
  assign enc_data = en ? rd_d : wdata;

  dmc_encoder #(.M(M), .K1(K1), .K2(K2)) u_encoder (
    .data (enc_data),
    .h    (enc_h),
    .v    (enc_v)
  );

  assign wr_codeword = {enc_v, enc_h, wdata};

  dmc_syndrome_calc #(.M(M), .K1(K1), .K2(K2)) u_syndrome (
    .h_recomputed (enc_h),
    .h_stored     (rd_h),
    .v_recomputed (enc_v),
    .v_stored     (rd_v),
    .dh           (dh),
    .s            (s)
  );

  dmc_error_locator #(.M(M), .K1(K1), .K2(K2)) u_locator (
    .dh             (dh),
    .s              (s),
    .flip           (flip),
    .error_detected (detected)
  );

  dmc_error_corrector #(.M(M), .K1(K1), .K2(K2)) u_corrector (
    .data      (rd_d),
    .flip      (flip),
    .corrected (rdata)
  );

  assign error_detected = en & detected;

endmodule
