// ldpc_code_rom: address, shift-difference and inverse-shift tables of the decoder.
//
// The decoder keeps every block column of the process buffer rotated into the alignment that the
// next layer using it needs. This module therefore supplies, for the configured code and Zf:
//   * per layer: its degree and the index of its first edge (address ROM),
//   * per edge, read side: the block column to read (address ROM),
//   * per edge, write side: the column written back, the rotation that takes the updated column
//     from this layer's alignment to that of the next layer using it, (p_next - p) mod Zf
//     (shift ROM, "differences of successive shift amounts"), and a flag telling that this is
//     the column's last update in the iteration (used by early termination),
//   * per column: the rotation applied when the channel values are loaded (alignment of the
//     first layer using the column) and its inverse, applied on output (final ROM).
// Shift amounts follow eq. (2.3) of the 802.16e code, floor(p*Zf/96), and eq. (2.4) of the
// 802.11n code, p mod Zf. The document stores precomputed values for all 22 modes in ROM; here the
// base tables of ldpc_code_pkg are stored and scaled by combinational logic, so only two base
// matrices are held (see ldpc_code_pkg). Everything is combinational; no clock.
module ldpc_code_rom
  import ldpc_pkg::*;
  import ldpc_code_pkg::*;
(
  input  code_e            code,
  input  logic [ZW-1:0]    zf,
  // layer queries
  input  logic [LAYW-1:0]  layer,
  output logic [LAYW:0]    n_layers,
  output logic [IDXW-1:0]  layer_deg,
  output logic [EDGEW-1:0] layer_base,
  // read-side edge query
  input  logic [EDGEW-1:0] rd_edge,
  output logic [COLW-1:0]  rd_col,
  // write-side edge query
  input  logic [EDGEW-1:0] wr_edge,
  output logic [COLW-1:0]  wr_col,
  output logic [ZW-1:0]    wr_shift,   // (p_next - p) mod zf
  output logic             wr_last,
  // column queries
  input  logic [COLW-1:0]  col,
  output logic [ZW-1:0]    init_shift, // rotation applied on load
  output logic [ZW-1:0]    final_shift // inverse rotation applied on output
);

  // Shift amount p(i,j,Zf) for a base shift p.
  function automatic logic [ZW-1:0] scale(input code_e c, input logic [6:0] p, input logic [ZW-1:0] z);
    logic [13:0] prod;
    if (c == CODE_16E_R12) begin
      prod = 14'(p) * 14'(z);
      return ZW'(prod / 14'd96);
    end else begin
      return (p >= z) ? ZW'(p - z) : ZW'(p);
    end
  endfunction

  logic [6:0] p_cur, p_nxt, p_first;
  logic [ZW-1:0] s_cur, s_nxt, s_first;

  always_comb begin
    if (code == CODE_16E_R12) begin
      n_layers   = (LAYW+1)'(C16E_R12_LAYERS);
      layer_deg  = C16E_R12_DEG[layer];
      layer_base = C16E_R12_BASE[layer];
      rd_col     = C16E_R12_COL[rd_edge];
      wr_col     = C16E_R12_COL[wr_edge];
      p_cur      = C16E_R12_P[wr_edge];
      p_nxt      = C16E_R12_PNEXT[wr_edge];
      wr_last    = C16E_R12_LAST[wr_edge];
      p_first    = C16E_R12_PFIRST[col];
    end else begin
      n_layers   = (LAYW+1)'(C11N_R56_LAYERS);
      layer_deg  = C11N_R56_DEG[layer];
      layer_base = C11N_R56_BASE[layer];
      rd_col     = C11N_R56_COL[rd_edge];
      wr_col     = C11N_R56_COL[wr_edge];
      p_cur      = C11N_R56_P[wr_edge];
      p_nxt      = C11N_R56_PNEXT[wr_edge];
      wr_last    = C11N_R56_LAST[wr_edge];
      p_first    = C11N_R56_PFIRST[col];
    end
    s_cur   = scale(code, p_cur, zf);
    s_nxt   = scale(code, p_nxt, zf);
    s_first = scale(code, p_first, zf);
    wr_shift    = (s_nxt >= s_cur) ? (s_nxt - s_cur) : (s_nxt + zf - s_cur);
    init_shift  = s_first;
    final_shift = (s_first == '0) ? '0 : (zf - s_first);
  end

endmodule
