// ldpc_decoder_top: configurable layered min-sum LDPC decoder for the QC codes of IEEE 802.16e and
// IEEE 802.11n.
//
// Data path (one block column = LANES messages per cycle; 6-bit channel LLRs in the input buffer,
// 8-bit posteriors after loading):
//   in_data -> input buffer -> permutation -> process buffer (MS) -> 96 CHK/VAR units
//                                  ^                                       |
//                                  +------------- updated columns ---------+
// The block rows of the parity check matrix are decoded layer by layer (row-update message
// passing); all Zf rows of a layer are processed in parallel, one lane each. A column is always
// stored in the rotation the next layer using it needs, so each update is followed by a single
// rotation by the difference of the two shift amounts; only the output needs an inverse rotation,
// done by the same permutation unit. Beta_ram keeps the check messages in min-sum compressed form;
// the termination unit compares hard decisions of successive iterations.
//
// Interface:
//   cfg          code, Zf, multi-codeword mode, early termination enable; sampled when a decode
//                starts (input buffer full and decoder idle).
//   in_valid/in_ready/in_data   NB words per codeword: word j holds the channel LLRs of block
//                column j, lane r = bit r of that column (in multi-codeword mode lanes 0..Zf-1 are
//                the first codeword, lanes LANES/2.. the second). LLR > 0 means bit 0.
//   out_valid/out_col/out_bits  NB words of hard decisions in the same layout, after `busy` falls
//                `done` pulses once.
//   iterations   number of iterations used by the last decode.
//   ev_*         one-cycle strobes: hazard stall, order stall, read/write overlap, early stop.
// Latency: NB+2 cycles load, then per iteration about the number of non-zero blocks plus stalls,
// then NB+2 cycles output. The next codeword may be written during decoding.
module ldpc_decoder_top
  import ldpc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_t             cfg,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [LANES*CHW-1:0] in_data,
  output logic             out_valid,
  output logic [COLW-1:0]  out_col,
  output logic [LANES-1:0] out_bits,
  output logic             busy,
  output logic             done,
  output logic [ITERW-1:0] iterations,
  output logic             ev_hazard_stall,
  output logic             ev_order_stall,
  output logic             ev_overlap,
  output logic             ev_early_stop
);
  cfg_t cfg_q;

  // input buffer
  logic               ib_full, ib_rd_en, ib_release;
  logic [COLW-1:0]    ib_rd_addr;
  logic [LANES*CHW-1:0] ib_rd_data;
  logic [LANES*W-1:0] ib_rd_ext;     // channel LLRs sign-extended to the posterior width

  // process buffer
  logic               ms_rd_en, ms_wr_en;
  logic [COLW-1:0]    ms_rd_addr, ms_wr_addr;
  logic [LANES*W-1:0] ms_rd_data, ms_wr_data;

  // permutation
  logic [1:0]         perm_src;
  logic [ZW-1:0]      perm_shift;
  logic [LANES*W-1:0] perm_in;

  // beta ram
  logic               beta_rd_en, beta_wr_en, sign_rd_en, sign_wr_en, rc_zero;
  logic [LAYW-1:0]    beta_rd_layer, beta_wr_layer;
  logic [EDGEW-1:0]   sign_rd_edge, sign_wr_edge;
  logic [IDXW-1:0]    rc_cnt;
  logic [LANES*W-1:0] r_old;

  // processing units
  logic               pe_chk_valid, pe_chk_first, pe_chk_last, pe_var_pop;
  logic [IDXW-1:0]    pe_chk_cnt;
  logic [LANES*W-1:0] pe_var_ms;
  logic [LANES-1:0]   pe_var_valid, pe_var_rsign;
  logic [LANES*MAGW-1:0] pe_b1, pe_b2;
  logic [LANES*IDXW-1:0] pe_idx;

  // termination / output
  logic               term_clear, term_chk_en, term_same, term_changed_a, term_changed_b;
  logic [COLW-1:0]    term_col;
  logic               out_pre_valid;
  logic [COLW-1:0]    out_pre_col;
  logic [LANES-1:0]   ms_wr_signs;

  ldpc_in_buffer u_in_buffer (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .full(ib_full),
    .rd_en(ib_rd_en), .rd_addr(ib_rd_addr), .rd_data(ib_rd_data), .release_buf(ib_release)
  );

  ldpc_controller u_ctrl (
    .clk, .rst_n, .cfg, .cfg_q,
    .ib_full, .ib_rd_en, .ib_rd_addr, .ib_release,
    .ms_rd_en, .ms_rd_addr, .ms_wr_en, .ms_wr_addr,
    .perm_src, .perm_shift,
    .beta_rd_en, .beta_rd_layer, .beta_wr_en, .beta_wr_layer,
    .sign_rd_en, .sign_rd_edge, .sign_wr_en, .sign_wr_edge, .rc_cnt, .rc_zero,
    .pe_chk_valid, .pe_chk_first, .pe_chk_last, .pe_chk_cnt, .pe_var_pop,
    .term_clear, .term_chk_en, .term_col, .term_same,
    .out_pre_valid, .out_pre_col, .busy, .done, .iterations,
    .ev_hazard_stall, .ev_order_stall, .ev_overlap, .ev_early_stop
  );

  always_comb begin
    for (int i = 0; i < LANES; i++)
      ib_rd_ext[i*W +: W] = W'(signed'(ib_rd_data[i*CHW +: CHW]));
  end

  always_comb begin
    unique case (perm_src)
      2'd0:    perm_in = ib_rd_ext;
      2'd1:    perm_in = pe_var_ms;
      default: perm_in = ms_rd_data;
    endcase
  end

  ldpc_permute u_perm (
    .din(perm_in), .zf(cfg_q.zf), .shift(perm_shift), .multi(cfg_q.multi), .dout(ms_wr_data)
  );

  ldpc_ms_ram u_ms (
    .clk, .rd_en(ms_rd_en), .rd_addr(ms_rd_addr), .rd_data(ms_rd_data),
    .wr_en(ms_wr_en), .wr_addr(ms_wr_addr), .wr_data(ms_wr_data)
  );

  ldpc_beta_ram u_beta (
    .clk, .rst_n,
    .beta_rd_en, .beta_rd_layer, .beta_wr_en, .beta_wr_layer,
    .beta_wr_b1(pe_b1), .beta_wr_b2(pe_b2), .beta_wr_idx(pe_idx),
    .sign_rd_en, .sign_rd_edge, .sign_wr_en, .sign_wr_edge, .sign_wr_bits(pe_var_rsign),
    .rc_cnt, .rc_zero, .r_old
  );

  for (genvar i = 0; i < LANES; i++) begin : g_pe
    ldpc_pe u_pe (
      .clk, .rst_n,
      .chk_valid(pe_chk_valid), .chk_first(pe_chk_first), .chk_last(pe_chk_last),
      .chk_cnt(pe_chk_cnt), .chk_ms(ms_rd_data[i*W +: W]), .chk_rold(r_old[i*W +: W]),
      .var_pop(pe_var_pop), .var_valid(pe_var_valid[i]),
      .var_ms(pe_var_ms[i*W +: W]), .var_rsign(pe_var_rsign[i]),
      .beta1(pe_b1[i*MAGW +: MAGW]), .beta2(pe_b2[i*MAGW +: MAGW]), .index(pe_idx[i*IDXW +: IDXW])
    );
    assign ms_wr_signs[i] = ms_wr_data[i*W + W - 1];
  end

  ldpc_termination u_term (
    .clk, .rst_n, .zf(cfg_q.zf), .multi(cfg_q.multi), .iter_clear(term_clear),
    .chk_en(term_chk_en), .chk_col(term_col), .chk_signs(ms_wr_signs),
    .changed_a(term_changed_a), .changed_b(term_changed_b), .same(term_same)
  );

  // output register: hard decisions of the inverse-rotated column
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_col <= '0; out_bits <= '0;
    end else begin
      out_valid <= out_pre_valid;
      if (out_pre_valid) begin
        out_col  <= out_pre_col;
        out_bits <= ms_wr_signs;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) pe_var_pop |=> (pe_var_valid == '1))
    else $error("top: processing units out of step");
endmodule
