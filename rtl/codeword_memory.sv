// codeword_memory: storage array for DMC codewords.
//
// DEPTH words of WIDTH bits, one synchronous write port and an asynchronous
// read port. The upset port models radiation: on a clock edge with upset_en
// set, the word at upset_addr is XORed with upset_mask, so any pattern of
// multiple cell upsets can be placed in a stored codeword. A write and an
// upset of the same word in one cycle store wdata ^ upset_mask. The array is
// not reset; only written words are meaningful. The read style and the
// upset port are this implementation's choices; the design only calls for a
// memory that holds the codewords.
module codeword_memory #(
  parameter int unsigned WIDTH = 68,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             upset_en,
  input  logic [AW-1:0]    upset_addr,
  input  logic [WIDTH-1:0] upset_mask
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int unsigned a = 0; a < DEPTH; a++) begin
      if (we && AW'(a) == waddr)
        mem[a] <= wdata ^ ((upset_en && upset_addr == waddr) ? upset_mask : '0);
      else if (upset_en && AW'(a) == upset_addr)
        mem[a] <= mem[a] ^ upset_mask;
    end
  end

  assign rdata = mem[raddr];

endmodule
