// ldpc_permute: configurable cyclic shift of Zf messages held in a fixed row of LANES registers.
//
// The shift size Zf (24..96) is usually smaller than the register row, so a plain barrel shift
// would pull "don't care" lanes into the result. Following the head/tail pointer scheme of the
// document, the row is rotated twice: once by S (giving the left part, lanes 0..Zf-S-1, with the
// head pointer moved) and once by S+LANES-Zf (giving the right part, lanes Zf-S..Zf-1, which are
// the S messages that wrapped past the tail). A per-lane select joins the two parts; lanes at and
// above Zf pass through unchanged. Result: out[i] = in[(i+S) mod Zf] for i < Zf.
// In multi-codeword mode (multi = 1, Zf <= LANES/2) the row is two independent halves, each
// holding one codeword, and both halves are shifted by the same S, as in the document's
// multi-codeword permutation. The half-width rotators used for that mode are this design's way of
// realising it. Purely combinational; S must be below Zf.
module ldpc_permute
  import ldpc_pkg::*;
#(
  parameter int L = LANES
) (
  input  logic [L*W-1:0] din,
  input  logic [ZW-1:0]  zf,
  input  logic [ZW-1:0]  shift,
  input  logic           multi,
  output logic [L*W-1:0] dout
);
  localparam int H = L / 2;

  logic [L*W-1:0] left_f, right_f;
  logic [H*W-1:0] left_lo, right_lo, left_hi, right_hi;
  logic [6:0]     amt_f, amt_h;

  assign amt_f = 7'(shift) + 7'(L) - 7'(zf);
  assign amt_h = multi ? (7'(shift) + 7'(H) - 7'(zf)) : 7'd0;

  ldpc_barrel_rotl #(.N(L), .W(W)) u_left_f  (.din(din), .amt(7'(shift)), .dout(left_f));
  ldpc_barrel_rotl #(.N(L), .W(W)) u_right_f (.din(din), .amt(amt_f),     .dout(right_f));
  ldpc_barrel_rotl #(.N(H), .W(W)) u_left_lo (.din(din[H*W-1:0]), .amt(7'(shift)), .dout(left_lo));
  ldpc_barrel_rotl #(.N(H), .W(W)) u_right_lo(.din(din[H*W-1:0]), .amt(amt_h),     .dout(right_lo));
  ldpc_barrel_rotl #(.N(H), .W(W)) u_left_hi (.din(din[L*W-1:H*W]), .amt(7'(shift)), .dout(left_hi));
  ldpc_barrel_rotl #(.N(H), .W(W)) u_right_hi(.din(din[L*W-1:H*W]), .amt(amt_h),     .dout(right_hi));

  always_comb begin
    dout = din;
    if (!multi) begin
      for (int i = 0; i < L; i++) begin
        if (i < int'(zf) - int'(shift))  dout[i*W +: W] = left_f[i*W +: W];
        else if (i < int'(zf))           dout[i*W +: W] = right_f[i*W +: W];
      end
    end else begin
      for (int j = 0; j < H; j++) begin
        if (j < int'(zf) - int'(shift)) begin
          dout[j*W +: W]     = left_lo[j*W +: W];
          dout[(H+j)*W +: W] = left_hi[j*W +: W];
        end else if (j < int'(zf)) begin
          dout[j*W +: W]     = right_lo[j*W +: W];
          dout[(H+j)*W +: W] = right_hi[j*W +: W];
        end
      end
    end
  end
endmodule
