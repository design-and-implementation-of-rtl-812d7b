// ldpc_pe: one check-node / variable-node processing unit (CHK/VAR) for one lane.
//
// It runs normalised min-sum in layered (row-update) form. For one layer the unit first consumes
// the d posterior values of its row, one per cycle (CHK phase):
//   correction   q = sat(MS - r_old), r_old being the check message this row sent last iteration,
//   abs/sort     running first minimum min1 with its position (index) and second minimum min2,
//   sign         running XOR of the signs,
// and pushes |q| and sign(q) into two FIFOs (the minimum search uses |q| clipped to 31). With the last value, Beta1 = 0.75*min1 and
// Beta2 = 0.75*min2 (x>>1 + x>>2) and the sign product are latched for the VAR phase. In the VAR
// phase each pop rebuilds q from the FIFOs, forms the new check message
//   r_new = sign * (position == index ? Beta2 : Beta1)
// and outputs MS_new = sat(q + r_new) one cycle later, together with sign(r_new) for the sign
// memory. The FIFOs let the CHK phase of the next layer run while the VAR phase of the current one
// drains; the caller must not deliver the last value of the next layer before the last pop of
// the current one. The 5-bit Beta and the FIFO split follow the document; the 8-bit posterior, the
// symmetric saturation to +/-127 and the FIFO depth are this design's choices.
module ldpc_pe
  import ldpc_pkg::*;
#(
  parameter int FIFO_DEPTH = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  // CHK phase
  input  logic            chk_valid,
  input  logic            chk_first,
  input  logic            chk_last,
  input  logic [IDXW-1:0] chk_cnt,
  input  llr_t            chk_ms,
  input  llr_t            chk_rold,
  // VAR phase
  input  logic            var_pop,
  output logic            var_valid,
  output llr_t            var_ms,
  output logic            var_rsign,
  // parameters of the layer in VAR phase, written to Beta_ram
  output mag_t            beta1,
  output mag_t            beta2,
  output logic [IDXW-1:0] index
);
  localparam int FAW = $clog2(FIFO_DEPTH);

  // ---------------- CHK ----------------
  logic signed [W:0] diff;
  llr_t              q;
  logic [W-2:0]      qabs;   // full |q|, kept in the FIFO to rebuild q
  mag_t              qmag;   // |q| clipped to the 5-bit check-message range
  logic              qsign;
  mag_t              min1_q, min2_q, min1_n, min2_n;
  logic [IDXW-1:0]   idx_q, idx_n;
  logic              sp_q, sp_n;

  always_comb begin
    diff  = (W+1)'(chk_ms) - (W+1)'(chk_rold);
    q     = sat((W+2)'(diff));
    qsign = q[W-1];
    qabs  = qsign ? (W-1)'(-q) : (W-1)'(q);
    qmag  = (qabs > (W-1)'(MAG_MAX)) ? MAGW'(MAG_MAX) : MAGW'(qabs);
    if (chk_first) begin
      min1_n = qmag;
      min2_n = '1;
      idx_n  = chk_cnt;
      sp_n   = qsign;
    end else begin
      sp_n = sp_q ^ qsign;
      if (qmag < min1_q) begin
        min1_n = qmag;
        min2_n = min1_q;
        idx_n  = chk_cnt;
      end else begin
        min1_n = min1_q;
        min2_n = (qmag < min2_q) ? qmag : min2_q;
        idx_n  = idx_q;
      end
    end
  end

  function automatic mag_t norm(input mag_t m);
    return (m >> 1) + (m >> 2);   // x * 0.75
  endfunction

  // VAR-side registers
  mag_t            vb1, vb2;
  logic [IDXW-1:0] vidx, vcnt;
  logic            vsp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min1_q <= '0; min2_q <= '0; idx_q <= '0; sp_q <= 1'b0;
      vb1 <= '0; vb2 <= '0; vidx <= '0; vsp <= 1'b0; vcnt <= '0;
    end else begin
      if (chk_valid) begin
        min1_q <= min1_n; min2_q <= min2_n; idx_q <= idx_n; sp_q <= sp_n;
      end
      if (chk_valid && chk_last) begin
        vb1  <= norm(min1_n);
        vb2  <= norm(min2_n);
        vidx <= idx_n;
        vsp  <= sp_n;
        vcnt <= '0;
      end else if (var_pop) begin
        vcnt <= vcnt + 1'b1;
      end
    end
  end

  assign beta1 = vb1;
  assign beta2 = vb2;
  assign index = vidx;

  // ---------------- FIFOs: sign and crt_out (|q|) ----------------
  logic [W-2:0]  crt_fifo  [FIFO_DEPTH];
  logic          sign_fifo [FIFO_DEPTH];
  logic [FAW-1:0] wp, rp;
  logic [FAW:0]   level;

  always_ff @(posedge clk) begin
    if (chk_valid) begin
      crt_fifo[wp]  <= qabs;
      sign_fifo[wp] <= qsign;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; level <= '0;
    end else begin
      if (chk_valid) wp <= wp + 1'b1;
      if (var_pop)   rp <= rp + 1'b1;
      level <= level + (FAW+1)'(chk_valid) - (FAW+1)'(var_pop);
    end
  end

  // ---------------- VAR ----------------
  mag_t              rmag;
  logic              rsign;
  logic signed [W+1:0] sum;
  always_comb begin
    rmag  = (vcnt == vidx) ? vb2 : vb1;
    rsign = vsp ^ sign_fifo[rp];
    sum   = (sign_fifo[rp] ? -(W+2)'(crt_fifo[rp]) : (W+2)'(crt_fifo[rp]))
          + (rsign ? -(W+2)'(rmag) : (W+2)'(rmag));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      var_valid <= 1'b0; var_ms <= '0; var_rsign <= 1'b0;
    end else begin
      var_valid <= var_pop;
      if (var_pop) begin
        var_ms    <= sat(sum);
        var_rsign <= rsign && (rmag != '0);
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) var_pop |-> level != '0)
    else $error("pe: pop from empty FIFO");
  assert property (@(posedge clk) disable iff (!rst_n) chk_valid |-> level < (FAW+1)'(FIFO_DEPTH))
    else $error("pe: push into full FIFO");
endmodule
