// ldpc_controller: sequencing of the layered decoder, with overlapped (scheduled) layers.
//
// One decode runs LOAD -> DEC (-> DRAIN) ... -> OUT:
//   LOAD   copies the NB columns of the full input buffer into the process buffer through the
//          permutation, each rotated into the alignment of the first layer that uses it, then
//          releases the input buffer so the next codeword can stream in.
//   DEC    issues one process-buffer read per cycle: the edges of a layer in the scheduled order
//          of the address ROM. Read data and the rebuilt old messages reach the processing units
//          one cycle later (CHK phase). When the last edge of a layer has been consumed, the VAR
//          phase of that layer pops one updated column per cycle; one cycle later the column is
//          rotated by the difference shift and written back, and its sign bits go to the sign
//          memory. Reading of the next layer goes on while the previous one writes back; a
//          scoreboard of pending columns stalls a read whose column has been read but not yet
//          written (hazard stall), and the last read of a layer waits until the processing units
//          have finished the previous VAR phase (order stall). The column order of the ROM keeps
//          both stalls short.
//   DRAIN  at the end of an iteration, when early termination is on (or after the last
//          iteration), waits for the pipeline to empty and then asks the termination unit whether
//          the hard decisions changed. Decoding stops after MAX_ITER iterations, or earlier when
//          early termination is on, at least two iterations are done and nothing changed.
//   OUT    reads the columns again and rotates them back by the inverse shift for the output.
// The Beta word of a layer is written (single port) in a cycle with no Beta read. The state
// machine, the scoreboard and the stall rules are this design's realisation of the document's
// flow chart and scheduling description. cfg is sampled when a decode starts.
module ldpc_controller
  import ldpc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_t              cfg,
  output cfg_t              cfg_q,
  // input buffer
  input  logic              ib_full,
  output logic              ib_rd_en,
  output logic [COLW-1:0]   ib_rd_addr,
  output logic              ib_release,
  // process buffer
  output logic              ms_rd_en,
  output logic [COLW-1:0]   ms_rd_addr,
  output logic              ms_wr_en,
  output logic [COLW-1:0]   ms_wr_addr,
  // permutation
  output logic [1:0]        perm_src,   // 0: input buffer, 1: processing units, 2: process buffer
  output logic [ZW-1:0]     perm_shift,
  // Beta_ram
  output logic              beta_rd_en,
  output logic [LAYW-1:0]   beta_rd_layer,
  output logic              beta_wr_en,
  output logic [LAYW-1:0]   beta_wr_layer,
  output logic              sign_rd_en,
  output logic [EDGEW-1:0]  sign_rd_edge,
  output logic              sign_wr_en,
  output logic [EDGEW-1:0]  sign_wr_edge,
  output logic [IDXW-1:0]   rc_cnt,
  output logic              rc_zero,
  // processing units
  output logic              pe_chk_valid,
  output logic              pe_chk_first,
  output logic              pe_chk_last,
  output logic [IDXW-1:0]   pe_chk_cnt,
  output logic              pe_var_pop,
  // termination
  output logic              term_clear,
  output logic              term_chk_en,
  output logic [COLW-1:0]   term_col,
  input  logic              term_same,
  // output
  output logic              out_pre_valid,   // permutation output is a decoded column
  output logic [COLW-1:0]   out_pre_col,
  output logic              busy,
  output logic              done,
  output logic [ITERW-1:0]  iterations,
  // event strobes for performance counting
  output logic              ev_hazard_stall,
  output logic              ev_order_stall,
  output logic              ev_overlap,
  output logic              ev_early_stop
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_DEC, S_DRAIN, S_OUT} state_e;
  state_e state;

  // ---------------- code ROM ----------------
  logic [LAYW-1:0]  rd_layer;
  logic [IDXW-1:0]  rd_k;
  logic [ITERW-1:0] rd_iter;
  logic [LAYW:0]    n_layers;
  logic [IDXW-1:0]  layer_deg;
  logic [EDGEW-1:0] layer_base, rd_edge, w_edge;
  logic [COLW-1:0]  rd_col, wr_col, s1_col;
  logic [ZW-1:0]    wr_shift, init_shift, final_shift;
  logic             wr_last;

  assign rd_edge = layer_base + EDGEW'(rd_k);

  ldpc_code_rom u_rom (
    .code(cfg_q.code), .zf(cfg_q.zf),
    .layer(rd_layer), .n_layers(n_layers), .layer_deg(layer_deg), .layer_base(layer_base),
    .rd_edge(rd_edge), .rd_col(rd_col),
    .wr_edge(w_edge), .wr_col(wr_col), .wr_shift(wr_shift), .wr_last(wr_last),
    .col(s1_col), .init_shift(init_shift), .final_shift(final_shift)
  );

  // ---------------- pipeline state ----------------
  logic [NB-1:0]    pending;
  logic             p1_valid, p1_first, p1_last, p1_zero;
  logic [IDXW-1:0]  p1_cnt, p1_deg;
  logic [LAYW-1:0]  p1_layer;
  logic [EDGEW-1:0] p1_base;
  logic [IDXW-1:0]  var_rem, var_k;
  logic [EDGEW-1:0] var_base;
  logic             w_valid;
  logic             bw_pending;
  logic [LAYW-1:0]  bw_layer;
  logic             s1_valid;
  logic [COLW-1:0]  cnt;
  logic             load_done, out_done;
  logic [ITERW-1:0] iter_done;

  // ---------------- read issue (DEC) ----------------
  logic is_last_k, hazard, order_block, issue;
  always_comb begin
    is_last_k   = (rd_k == layer_deg - 1'b1);
    hazard      = pending[rd_col];
    order_block = is_last_k && ((var_rem > IDXW'(1)) || (p1_valid && p1_last));
    issue       = (state == S_DEC) && !hazard && !order_block;
  end

  assign ms_rd_en      = issue || (state == S_OUT);
  assign ms_rd_addr    = (state == S_OUT) ? cnt : rd_col;
  assign sign_rd_en    = issue;
  assign sign_rd_edge  = rd_edge;
  assign beta_rd_en    = issue && (rd_k == '0);
  assign beta_rd_layer = rd_layer;
  assign beta_wr_en    = bw_pending && !beta_rd_en;
  assign beta_wr_layer = bw_layer;

  assign pe_chk_valid = p1_valid;
  assign pe_chk_first = p1_first;
  assign pe_chk_last  = p1_last;
  assign pe_chk_cnt   = p1_cnt;
  assign rc_cnt       = p1_cnt;
  assign rc_zero      = p1_zero;

  assign pe_var_pop   = (var_rem != '0);

  // write side, one cycle after the pop
  assign ms_wr_en     = w_valid || (state == S_LOAD && s1_valid);
  assign ms_wr_addr   = w_valid ? wr_col : s1_col;
  assign sign_wr_en   = w_valid;
  assign sign_wr_edge = w_edge;
  assign term_chk_en  = w_valid && wr_last;
  assign term_col     = wr_col;

  always_comb begin
    if (state == S_LOAD)     begin perm_src = 2'd0; perm_shift = init_shift;  end
    else if (state == S_OUT) begin perm_src = 2'd2; perm_shift = final_shift; end
    else                     begin perm_src = 2'd1; perm_shift = wr_shift;    end
  end

  assign ib_rd_en   = (state == S_LOAD) && !load_done;
  assign ib_rd_addr = cnt;
  assign out_pre_valid = (state == S_OUT) && s1_valid;
  assign out_pre_col   = s1_col;
  assign busy          = (state != S_IDLE);


  logic pipe_empty;
  assign pipe_empty = !p1_valid && (var_rem == '0) && !w_valid && !bw_pending;

  assign ev_hazard_stall = (state == S_DEC) && hazard;
  assign ev_order_stall  = (state == S_DEC) && !hazard && order_block;
  assign ev_overlap      = issue && w_valid;

  assign iterations = iter_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cfg_q <= '0;
      rd_layer <= '0; rd_k <= '0; rd_iter <= '0; iter_done <= '0;
      pending <= '0;
      p1_valid <= 1'b0; p1_first <= 1'b0; p1_last <= 1'b0; p1_zero <= 1'b0;
      p1_cnt <= '0; p1_deg <= '0; p1_layer <= '0; p1_base <= '0;
      var_rem <= '0; var_k <= '0; var_base <= '0;
      w_valid <= 1'b0; w_edge <= '0;
      bw_pending <= 1'b0; bw_layer <= '0;
      s1_valid <= 1'b0; s1_col <= '0; cnt <= '0;
      load_done <= 1'b0; out_done <= 1'b0;
      ib_release <= 1'b0; term_clear <= 1'b0; done <= 1'b0; ev_early_stop <= 1'b0;
    end else begin
      ib_release    <= 1'b0;
      term_clear    <= 1'b0;
      done          <= 1'b0;
      ev_early_stop <= 1'b0;

      // ---- read-side pipeline stage
      p1_valid <= issue;
      if (issue) begin
        p1_first <= (rd_k == '0);
        p1_last  <= is_last_k;
        p1_cnt   <= rd_k;
        p1_zero  <= (rd_iter == '0);
        p1_deg   <= layer_deg;
        p1_layer <= rd_layer;
        p1_base  <= layer_base;
      end

      // ---- VAR phase
      if (p1_valid && p1_last) begin
        var_rem    <= p1_deg;
        var_k      <= '0;
        var_base   <= p1_base;
        bw_pending <= 1'b1;
        bw_layer   <= p1_layer;
      end else if (var_rem != '0) begin
        var_rem <= var_rem - 1'b1;
        var_k   <= var_k + 1'b1;
      end
      if (beta_wr_en && !(p1_valid && p1_last)) bw_pending <= 1'b0;
      w_valid <= (var_rem != '0);
      w_edge  <= var_base + EDGEW'(var_k);

      // ---- scoreboard
      for (int c = 0; c < NB; c++) begin
        if (issue && rd_col == COLW'(c))          pending[c] <= 1'b1;
        else if (w_valid && wr_col == COLW'(c))   pending[c] <= 1'b0;
      end

      // ---- LOAD / OUT column stage
      s1_valid <= 1'b0;

      case (state)
        S_IDLE: begin
          if (ib_full) begin
            cfg_q     <= cfg;
            state     <= S_LOAD;
            cnt       <= '0;
            load_done <= 1'b0;
          end
        end
        S_LOAD: begin
          if (!load_done) begin
            s1_valid <= 1'b1;
            s1_col   <= cnt;
            if (cnt == COLW'(NB-1)) load_done <= 1'b1;
            else cnt <= cnt + 1'b1;
          end else if (!s1_valid) begin
            ib_release <= 1'b1;
            state      <= S_DEC;
            rd_layer   <= '0; rd_k <= '0; rd_iter <= '0; iter_done <= '0;
            term_clear <= 1'b1;
          end
        end
        S_DEC: begin
          if (issue) begin
            if (!is_last_k) begin
              rd_k <= rd_k + 1'b1;
            end else begin
              rd_k <= '0;
              if ((LAYW+1)'(rd_layer) == n_layers - 1'b1) begin
                rd_layer  <= '0;
                rd_iter   <= rd_iter + 1'b1;
                iter_done <= rd_iter + 1'b1;
                if ((rd_iter + 1'b1 == ITERW'(MAX_ITER)) || cfg_q.et_en) state <= S_DRAIN;
                else term_clear <= 1'b1;
              end else begin
                rd_layer <= rd_layer + 1'b1;
              end
            end
          end
        end
        S_DRAIN: begin
          if (pipe_empty && !term_clear) begin
            if (iter_done == ITERW'(MAX_ITER) ||
                (cfg_q.et_en && iter_done >= ITERW'(2) && term_same)) begin
              ev_early_stop <= (iter_done != ITERW'(MAX_ITER));
              state    <= S_OUT;
              cnt      <= '0;
              out_done <= 1'b0;
            end else begin
              term_clear <= 1'b1;
              state      <= S_DEC;
            end
          end
        end
        S_OUT: begin
          if (!out_done) begin
            s1_valid <= 1'b1;
            s1_col   <= cnt;
            if (cnt == COLW'(NB-1)) out_done <= 1'b1;
            else cnt <= cnt + 1'b1;
          end else if (!s1_valid) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(w_valid && state == S_LOAD))
    else $error("controller: decode write-back during load");
endmodule
