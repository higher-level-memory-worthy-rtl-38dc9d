// dmc_memory: fault-tolerant memory protected by the decimal matrix code.
//
// Data words of K1*K2*M bits are encoded by dmc_codec on the way into
// codeword_memory and decoded on the way out, using one shared encoder:
// the codec's enable is driven by the read request, so during a write the
// encoder produces the stored H and V bits and during a read it recomputes
// them for the syndrome. Within one row, any pattern of errors confined to one
// symbol of each pair is corrected, which covers any upset within two
// adjacent symbols of a row.
//
// Interface and timing: one operation per cycle, we and re never together.
//  * write: we, addr, wdata sampled on the rising edge; the codeword is
//    stored at that edge.
//  * read:  re, addr in cycle t; the stored codeword is decoded in cycle t
//    and rdata, error_detected are registered, valid with rvalid in t+1.
//  * upset_en/upset_addr/upset_mask flip stored codeword bits, to model
//    radiation events in simulation; tie upset_en low in use.
// Codeword layout {V, H, D}. The one-cycle registered read and the upset
// port are this implementation's choices.
module dmc_memory
  import dmc_pkg::*;
#(
  parameter int unsigned M     = DMC_M,
  parameter int unsigned K1    = DMC_K1,
  parameter int unsigned K2    = DMC_K2,
  parameter int unsigned DEPTH = DMC_DEPTH,
  localparam int unsigned DW   = data_w(M, K1, K2),
  localparam int unsigned CW   = code_w(M, K1, K2),
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic          re,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic          rvalid,
  output logic [DW-1:0] rdata,
  output logic          error_detected,
  input  logic          upset_en,
  input  logic [AW-1:0] upset_addr,
  input  logic [CW-1:0] upset_mask
);

  logic [CW-1:0] wr_codeword;
  logic [CW-1:0] rd_codeword;
  logic [DW-1:0] dec_data;
  logic          dec_err;

  dmc_codec #(.M(M), .K1(K1), .K2(K2)) u_codec (
    .en             (re),
    .wdata          (wdata),
    .wr_codeword    (wr_codeword),
    .rd_codeword    (rd_codeword),
    .rdata          (dec_data),
    .error_detected (dec_err)
  );

  codeword_memory #(.WIDTH(CW), .DEPTH(DEPTH)) u_mem (
    .clk        (clk),
    .we         (we && !re),
    .waddr      (addr),
    .wdata      (wr_codeword),
    .raddr      (addr),
    .rdata      (rd_codeword),
    .upset_en   (upset_en),
    .upset_addr (upset_addr),
    .upset_mask (upset_mask)
  );

  // synchronous, active-low reset of the read-side registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rvalid         <= 1'b0;
      rdata          <= '0;
      error_detected <= 1'b0;
    end else begin
      rvalid <= re;
      if (re) begin
        rdata          <= dec_data;
        error_detected <= dec_err;
      end
    end
  end

  // the shared encoder serves one direction per cycle
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n) !(we && re))
    else $error("dmc_memory: write and read requested in the same cycle");

endmodule
