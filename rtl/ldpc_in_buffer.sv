// ldpc_in_buffer: single-port input buffer of DEPTH words of LANES*CHW bits (96 x 6 = 576).
//
// A codeword arrives as NB block columns, one word (LANES channel LLRs, lane 0 in the low bits)
// per accepted beat of a valid/ready handshake. When all DEPTH words are in, `full` rises and
// the buffer accepts nothing until the decoder has copied it into the process buffer by reading
// it word by word (rd_en/rd_addr, data one cycle later). Since the port is single, a read and a
// write never coincide: writes are refused while full, reads happen only while full. Once the
// decoder pulses `release_buf` the next codeword can stream in while the previous one is decoded.
// Size follows the document (24 x 576 bits); the handshake is this design's choice.
module ldpc_in_buffer
  import ldpc_pkg::*;
#(
  parameter int DEPTH = NB,
  parameter int DW    = LANES * CHW
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [DW-1:0]            in_data,
  output logic                     full,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [DW-1:0]            rd_data,
  input  logic                     release_buf
);
  localparam int AW = $clog2(DEPTH);
  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wr_ptr;

  assign in_ready = !full;

  // single port: one access per cycle, write or read
  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wr_ptr] <= in_data;
    else if (rd_en)           rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      full   <= 1'b0;
    end else if (release_buf) begin
      full   <= 1'b0;
      wr_ptr <= '0;
    end else if (in_valid && in_ready) begin
      if (wr_ptr == AW'(DEPTH-1)) begin
        full   <= 1'b1;
        wr_ptr <= '0;
      end else begin
        wr_ptr <= wr_ptr + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> full)
    else $error("in_buffer read while not full");
endmodule
