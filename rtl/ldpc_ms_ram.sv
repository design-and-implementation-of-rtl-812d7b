// ldpc_ms_ram: the process buffer ("MS"), a dual-port memory of DEPTH words of LANES*W bits.
//
// It holds the current posterior value of every variable node, one block column per word, in the
// rotation the next layer using that column needs. One synchronous read port and one write port
// work in the same cycle so that a new layer can read while the previous layer writes back.
// Read data appear one cycle after the address; a read and a write of the same word in one cycle
// return the old contents. Depth 24 follows the document; the word is 96 x 8 bits where the
// document has 96 x 6 = 576, because this design keeps posteriors with 8 bits (see ldpc_pkg).
module ldpc_ms_ram
  import ldpc_pkg::*;
#(
  parameter int DEPTH = NB,
  parameter int DW    = LANES * W
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [DW-1:0]            rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [DW-1:0]            wr_data
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end
endmodule
