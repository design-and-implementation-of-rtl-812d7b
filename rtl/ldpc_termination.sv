// ldpc_termination: hard-decision based early termination.
//
// Instead of evaluating H*x^T = 0, the decoder compares the hard decisions (signs of the posterior
// values) of one iteration with those of the previous one and stops when nothing changed. This
// unit keeps one LANES-bit sign word per block column. Whenever a column receives its last update
// of the iteration (chk_en), its new signs are compared with the stored ones and stored; any
// difference in a valid lane sets a sticky "changed" flag of the codeword the lane belongs to.
// Lanes 0..zf-1 belong to the first codeword; in multi-codeword mode lanes LANES/2..LANES/2+zf-1
// belong to the second. iter_clear clears both flags at the start of an iteration. `same` is high
// when no valid lane of any active codeword changed. The column words are stored in the rotation
// of the first layer using the column, which is the same in every iteration, so the comparison
// is lane by lane. The per-codeword flags are this design's choice.
module ldpc_termination
  import ldpc_pkg::*;
#(
  parameter int L = LANES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ZW-1:0]    zf,
  input  logic             multi,
  input  logic             iter_clear,
  input  logic             chk_en,
  input  logic [COLW-1:0]  chk_col,
  input  logic [L-1:0]     chk_signs,
  output logic             changed_a,
  output logic             changed_b,
  output logic             same
);
  localparam int H = L / 2;

  logic [L-1:0] hd [NB];
  logic [L-1:0] mask_a, mask_b, diff;

  always_comb begin
    for (int i = 0; i < L; i++) begin
      mask_a[i] = (i < int'(zf));
      mask_b[i] = multi && (i >= H) && (i < H + int'(zf));
    end
    diff = hd[chk_col] ^ chk_signs;
  end

  always_ff @(posedge clk) begin
    if (chk_en) hd[chk_col] <= chk_signs;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      changed_a <= 1'b1;
      changed_b <= 1'b1;
    end else if (iter_clear) begin
      changed_a <= 1'b0;
      changed_b <= 1'b0;
    end else if (chk_en) begin
      if ((diff & mask_a) != '0) changed_a <= 1'b1;
      if ((diff & mask_b) != '0) changed_b <= 1'b1;
    end
  end

  assign same = !changed_a && !(multi && changed_b);
endmodule
