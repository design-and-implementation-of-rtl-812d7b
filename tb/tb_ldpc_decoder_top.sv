// tb_ldpc_decoder_top: end-to-end test of the decoder at its default size (96 lanes).
//
// Random information bits are encoded with the behavioural encoder of tb_ldpc_codes_pkg, mapped
// to 6-bit LLRs (bit 0 -> positive) with random magnitudes, a fraction of them sign-flipped as
// channel errors, and streamed into the decoder back to back, so the next codeword is written
// while the previous one decodes. The hard-decision output is compared bit by bit with the
// transmitted codeword. The cases cover both codes, several Zf, single- and multi-codeword mode,
// early termination on and off. The test also counts hazard stalls, order stalls, overlapped
// read/write cycles, early stops and multi-codeword decodes, and fails if one never happened. The
// iteration count must be 10 with early termination off, and between 2 and 10 with it on; the
// decoding cycles per iteration must stay below those of a non-overlapped schedule.
module tb_ldpc_decoder_top;
  import ldpc_pkg::*;
  import tb_ldpc_codes_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t             cfg;
  logic             in_valid, in_ready;
  logic [LANES*CHW-1:0] in_data;
  logic             out_valid, busy, done;
  logic [COLW-1:0]  out_col;
  logic [LANES-1:0] out_bits;
  logic [ITERW-1:0] iterations;
  logic             ev_hazard_stall, ev_order_stall, ev_overlap, ev_early_stop;

  ldpc_decoder_top dut (.*);

  int checks = 0, failures = 0;
  int n_hazard = 0, n_order = 0, n_overlap = 0, n_early = 0, n_multi = 0, n_maxit = 0;

  typedef struct {
    bit code; int z; bit multi; bit et; int err_pct;
  } case_t;
  case_t cases [$];
  cw_t   exp_a [$];
  cw_t   exp_b [$];

  function automatic logic [CHW-1:0] chan(input logic b, input int err_pct);
    int mag;
    logic neg;
    mag = 4 + int'($urandom_range(0, 11));
    neg = b;
    if (int'($urandom_range(0, 99)) < err_pct) begin
      neg = !neg;
      mag = 1 + int'($urandom_range(0, 3));
    end
    return neg ? CHW'(-mag) : CHW'(mag);
  endfunction

  // ---------------- stimulus ----------------
  task automatic drive_case(input case_t c);
    cw_t a, b;
    for (int j = 0; j < 24; j++) begin
      a[j] = '0; b[j] = '0;
      for (int r = 0; r < c.z; r++) begin
        a[j][r] = 1'($urandom_range(0, 1));
        b[j][r] = 1'($urandom_range(0, 1));
      end
    end
    encode(c.code, c.z, a);
    encode(c.code, c.z, b);
    checks++;
    if (syndrome_weight(c.code, c.z, a) != 0 || syndrome_weight(c.code, c.z, b) != 0) begin
      failures++;
      $display("FAIL encoder produced a non-codeword");
    end
    exp_a.push_back(a);
    exp_b.push_back(b);
    // wait until the decoder has taken the previous codeword out of the input buffer
    for (int j = 0; j < 24; j++) begin
      logic [LANES*CHW-1:0] word;
      word = '0;
      for (int r = 0; r < c.z; r++) begin
        word[r*CHW +: CHW] = chan(a[j][r], c.err_pct);
        if (c.multi) word[(HALF + r)*CHW +: CHW] = chan(b[j][r], c.err_pct);
      end
      // drive on the falling edge; the word is taken at the next rising edge with in_ready high
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = word;
      while (!in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
    // configuration of this codeword must be applied when its decode starts
  endtask

  // configuration follows the case whose decode starts next: it is set for case k+1 as soon as
  // the decode of case k has started (the controller samples cfg when it leaves idle)
  int cfg_ptr = 0;
  function automatic void apply_cfg(input int k);
    if (k < cases.size()) begin
      cfg.code  = cases[k].code ? CODE_11N_R56 : CODE_16E_R12;
      cfg.zf    = ZW'(cases[k].z);
      cfg.multi = cases[k].multi;
      cfg.et_en = cases[k].et;
    end
  endfunction

  // ---------------- checking ----------------
  int out_ptr = 0;
  int start_cycle = 0, cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) begin
    if (rst_n) begin
      if (ev_hazard_stall) n_hazard++;
      if (ev_order_stall)  n_order++;
      if (ev_overlap)      n_overlap++;
      if (ev_early_stop)   n_early++;
    end
  end

  logic busy_d;
  always @(posedge clk) begin
    busy_d <= busy;
    if (rst_n && busy && !busy_d) begin
      start_cycle = cyc;
      cfg_ptr++;
      apply_cfg(cfg_ptr);
    end
    if (rst_n && out_valid) begin
      case_t c;
      int errs;
      cw_t ea, eb;
      col_t ca, cb;
      c = cases[out_ptr];
      ea = exp_a[out_ptr];
      eb = exp_b[out_ptr];
      ca = ea[out_col];
      cb = eb[out_col];
      errs = 0;
      for (int r = 0; r < c.z; r++) begin
        if (out_bits[r] != ca[r]) errs++;
        if (c.multi && out_bits[HALF + r] != cb[r]) errs++;
      end
      checks++;
      if (errs != 0) begin
        failures++;
        $display("FAIL case %0d column %0d: %0d bit errors", out_ptr, out_col, errs);
      end
    end
    if (rst_n && done) begin
      case_t c;
      int edges, layers, cycles, nonoverlap;
      c = cases[out_ptr];
      layers = nrows(c.code);
      edges = 0;
      for (int i = 0; i < layers; i++)
        for (int j = 0; j < 24; j++) if (hval(c.code, i, j) >= 0) edges++;
      cycles = cyc - start_cycle;
      // non-overlapped schedule: every layer reads d columns, then writes d columns, plus 3 cycles
      nonoverlap = (2 * edges + 3 * layers) * int'(iterations);
      $display("case %0d: code %0d Zf=%0d multi=%0d et=%0d  iterations=%0d cycles=%0d (%0d per iteration, non-overlapped %0d)",
               out_ptr, c.code, c.z, c.multi, c.et, iterations, cycles,
               (cycles - 2*(NB+3)) / int'(iterations), nonoverlap / int'(iterations));
      checks++;
      if (c.et ? (iterations < 2 || iterations > 10) : (iterations != 10)) begin
        failures++;
        $display("FAIL case %0d: %0d iterations", out_ptr, iterations);
      end
      if (!c.et) n_maxit++;
      checks++;
      if (cycles - 2*(NB+3) >= nonoverlap) begin
        failures++;
        $display("FAIL case %0d: no gain from overlapping layers", out_ptr);
      end
      if (c.multi) n_multi++;
      out_ptr++;
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    in_valid = 1'b0;
    in_data = '0;
    cases.push_back('{code: 1'b0, z: 96, multi: 1'b0, et: 1'b0, err_pct: 4});
    cases.push_back('{code: 1'b0, z: 96, multi: 1'b0, et: 1'b1, err_pct: 4});
    cases.push_back('{code: 1'b0, z: 24, multi: 1'b1, et: 1'b1, err_pct: 3});
    cases.push_back('{code: 1'b1, z: 54, multi: 1'b0, et: 1'b0, err_pct: 1});
    cases.push_back('{code: 1'b1, z: 27, multi: 1'b1, et: 1'b1, err_pct: 1});
    cases.push_back('{code: 1'b0, z: 48, multi: 1'b1, et: 1'b0, err_pct: 3});
    cases.push_back('{code: 1'b0, z: 76, multi: 1'b0, et: 1'b1, err_pct: 4});
    apply_cfg(0);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    foreach (cases[i]) drive_case(cases[i]);
    wait (out_ptr == cases.size());
    repeat (5) @(posedge clk);
    checks++; if (n_hazard == 0)  begin failures++; $display("FAIL no hazard stall seen"); end
    checks++; if (n_order == 0)   begin failures++; $display("FAIL no order stall seen"); end
    checks++; if (n_overlap == 0) begin failures++; $display("FAIL no overlapped read/write seen"); end
    checks++; if (n_early == 0)   begin failures++; $display("FAIL no early termination seen"); end
    checks++; if (n_multi == 0)   begin failures++; $display("FAIL no multi-codeword decode seen"); end
    checks++; if (n_maxit == 0)   begin failures++; $display("FAIL no fixed 10-iteration decode seen"); end
    $display("events: hazard stalls %0d, order stalls %0d, overlapped cycles %0d, early stops %0d, multi-codeword decodes %0d",
             n_hazard, n_order, n_overlap, n_early, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
