// tb_ldpc_controller: self-checking test of the decoding controller on its own.
//
// The test plays input buffer and termination unit: it raises ib_full, holds term_same high and
// watches the control outputs over several decodes of both codes, with and without early
// termination. Checked against the base matrices of the test package: the 24 loads, that the
// columns read in each layer are exactly that base matrix row's non-zero blocks, that a column is
// never read again before its previous update has been written back (read-after-write), that
// every read is written back once, the iteration count (10, or 2 with early termination and
// unchanged hard decisions), 24 output columns, one `done` per decode, and that stalls and
// read/write overlap both occur.
module tb_ldpc_controller;
  import ldpc_pkg::*;
  import tb_ldpc_codes_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  cfg_t cfg, cfg_q;
  logic ib_full, ib_rd_en, ib_release, ms_rd_en, ms_wr_en;
  logic [COLW-1:0] ib_rd_addr, ms_rd_addr, ms_wr_addr, term_col, out_pre_col;
  logic [1:0] perm_src;
  logic [ZW-1:0] perm_shift;
  logic beta_rd_en, beta_wr_en, sign_rd_en, sign_wr_en, rc_zero;
  logic [LAYW-1:0] beta_rd_layer, beta_wr_layer;
  logic [EDGEW-1:0] sign_rd_edge, sign_wr_edge;
  logic [IDXW-1:0] rc_cnt, pe_chk_cnt;
  logic pe_chk_valid, pe_chk_first, pe_chk_last, pe_var_pop;
  logic term_clear, term_chk_en, term_same;
  logic out_pre_valid, busy, done;
  logic [ITERW-1:0] iterations;
  logic ev_hazard_stall, ev_order_stall, ev_overlap, ev_early_stop;
  int checks = 0, failures = 0;

  ldpc_controller dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // per-decode monitors
  int n_load, n_out, n_rd, n_wr, n_done, n_stall, n_overlap;
  int row, row_left, deg_now;
  bit pending [NB];
  bit row_seen [NB];
  bit cur_code;
  int cur_rows;

  function automatic int row_deg(input bit c, input int i);
    int d;
    d = 0;
    for (int j = 0; j < NB; j++) if (hval(c, i, j) >= 0) d++;
    return d;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (ib_rd_en) n_load++;
    if (out_pre_valid) n_out++;
    if (done) n_done++;
    if (ev_hazard_stall || ev_order_stall) n_stall++;
    if (ev_overlap) n_overlap++;
    if (ms_wr_en && perm_src == 2'd1) begin
      n_wr++;
      check(pending[ms_wr_addr], $sformatf("write of column %0d that was not read", ms_wr_addr));
      pending[ms_wr_addr] = 0;
    end
    if (ms_rd_en && busy && perm_src == 2'd1) begin
      n_rd++;
      check(!pending[ms_rd_addr], $sformatf("column %0d read before its update was written", ms_rd_addr));
      pending[ms_rd_addr] = 1;
      if (row_left == 0) begin
        row = (row + 1) % cur_rows;
        row_left = row_deg(cur_code, row);
        for (int j = 0; j < NB; j++) row_seen[j] = 0;
      end
      check(hval(cur_code, row, int'(ms_rd_addr)) >= 0 && !row_seen[ms_rd_addr],
            $sformatf("row %0d read column %0d", row, ms_rd_addr));
      row_seen[ms_rd_addr] = 1;
      row_left--;
    end
  end

  task automatic run_decode(input bit c, input int z, input bit et);
    int exp_it, edges;
    cfg.code = c ? CODE_11N_R56 : CODE_16E_R12; cfg.zf = ZW'(z); cfg.multi = 0; cfg.et_en = et;
    cur_code = c; cur_rows = nrows(c);
    row = -1; row_left = 0;
    edges = 0;
    for (int i = 0; i < cur_rows; i++) edges += row_deg(c, i);
    n_load = 0; n_out = 0; n_rd = 0; n_wr = 0; n_done = 0;
    for (int j = 0; j < NB; j++) pending[j] = 0;
    @(negedge clk);
    ib_full = 1;
    wait (ib_release);
    @(negedge clk);
    ib_full = 0;
    wait (done);
    @(posedge clk);
    @(negedge clk);
    exp_it = et ? 2 : MAX_ITER;
    check(n_load == NB, $sformatf("%0d loads", n_load));
    check(n_out == NB, $sformatf("%0d output columns", n_out));
    check(n_done == 1, "one done pulse");
    check(int'(iterations) == exp_it, $sformatf("iterations %0d expected %0d", iterations, exp_it));
    check(n_rd == exp_it * edges, $sformatf("%0d reads expected %0d", n_rd, exp_it * edges));
    check(n_wr == n_rd, $sformatf("%0d writes for %0d reads", n_wr, n_rd));
    check(!busy, "idle after done");
  endtask

  initial begin
    cfg = '0; ib_full = 0; term_same = 1;
    n_stall = 0; n_overlap = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_decode(1'b0, 96, 1'b0);
    run_decode(1'b0, 96, 1'b1);
    run_decode(1'b1, 54, 1'b0);
    run_decode(1'b1, 27, 1'b1);
    run_decode(1'b0, 24, 1'b1);
    check(n_stall > 0, "no stall happened");
    check(n_overlap > 0, "no read/write overlap happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
