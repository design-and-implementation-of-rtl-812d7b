// ldpc_beta_ram: compressed storage of all check-to-variable messages, and their reconstruction.
//
// Min-sum lets a row's d outgoing messages be stored as Beta1 (0.75*min1), Beta2 (0.75*min2),
// the position of min1 (index) and one sign bit per message. Two memories hold them:
//   beta memory  single port, one word per layer: Beta1, Beta2, index for all LANES lanes,
//   sign memory  dual port, one word per non-zero block (edge): LANES sign bits.
// While a layer is read, the old message of every lane is rebuilt as
//   r_old = sign ? -(cnt == index ? Beta2 : Beta1) : +(...)
// where cnt is the position of the edge in the layer (the "count" of the document's figure).
// Timing: beta_rd_en and sign_rd_en act like the process buffer read, so data are ready one cycle
// later; on that cycle rc_cnt and rc_zero must describe the same edge. The beta word read for the
// first edge of a layer is kept in a holding register for the rest of the layer. rc_zero forces
// r_old = 0 (first iteration, nothing stored yet). Layout: lane i uses bits [i*5 +: 5] of each
// field. Memory organisation follows the document (12 layer words, 88 sign words); splitting
// Beta1/Beta2/index into fields of one word is this design's choice.
module ldpc_beta_ram
  import ldpc_pkg::*;
#(
  parameter int L       = LANES,
  parameter int NLAYERS = MAX_LAYERS,
  parameter int NEDGES  = EDGES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // beta memory, single port
  input  logic                 beta_rd_en,
  input  logic [LAYW-1:0]      beta_rd_layer,
  input  logic                 beta_wr_en,
  input  logic [LAYW-1:0]      beta_wr_layer,
  input  logic [L*MAGW-1:0]    beta_wr_b1,
  input  logic [L*MAGW-1:0]    beta_wr_b2,
  input  logic [L*IDXW-1:0]    beta_wr_idx,
  // sign memory, dual port
  input  logic                 sign_rd_en,
  input  logic [EDGEW-1:0]     sign_rd_edge,
  input  logic                 sign_wr_en,
  input  logic [EDGEW-1:0]     sign_wr_edge,
  input  logic [L-1:0]         sign_wr_bits,
  // reconstruction, one cycle after the reads
  input  logic [IDXW-1:0]      rc_cnt,
  input  logic                 rc_zero,
  output logic [L*W-1:0]       r_old
);
  localparam int BW = L * (2*MAGW + IDXW);

  logic [BW-1:0] beta_mem [NLAYERS];
  logic [L-1:0]  sign_mem [NEDGES];
  logic [BW-1:0] beta_rd, beta_hold, beta_cur;
  logic [L-1:0]  sign_rd;
  logic          beta_rd_d;

  always_ff @(posedge clk) begin
    if (beta_wr_en)      beta_mem[beta_wr_layer] <= {beta_wr_idx, beta_wr_b2, beta_wr_b1};
    else if (beta_rd_en) beta_rd <= beta_mem[beta_rd_layer];
    if (sign_rd_en) sign_rd <= sign_mem[sign_rd_edge];
    if (sign_wr_en) sign_mem[sign_wr_edge] <= sign_wr_bits;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beta_rd_d <= 1'b0;
      beta_hold <= '0;
    end else begin
      beta_rd_d <= beta_rd_en && !beta_wr_en;
      if (beta_rd_d) beta_hold <= beta_rd;
    end
  end

  assign beta_cur = beta_rd_d ? beta_rd : beta_hold;

  always_comb begin
    for (int i = 0; i < L; i++) begin
      mag_t b1, b2, m;
      logic [IDXW-1:0] ix;
      b1 = beta_cur[i*MAGW +: MAGW];
      b2 = beta_cur[L*MAGW + i*MAGW +: MAGW];
      ix = beta_cur[2*L*MAGW + i*IDXW +: IDXW];
      m  = (rc_cnt == ix) ? b2 : b1;
      if (rc_zero)         r_old[i*W +: W] = '0;
      else if (sign_rd[i]) r_old[i*W +: W] = -llr_t'({1'b0, m});
      else                 r_old[i*W +: W] = llr_t'({1'b0, m});
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(beta_rd_en && beta_wr_en))
    else $error("beta_ram: read and write on the single port in one cycle");
endmodule
