// tb_ldpc_pe: checks one CHK/VAR unit against a reference model of normalised min-sum.
// Random layers of random degree (2..22) are fed back to back; the CHK phase of each layer
// overlaps the VAR phase of the previous one, as in the decoder. For every message the
// reference computes q = sat(ms - r_old) (posterior range +/-127), min1/min2/index over |q|
// clipped to 31, 0.75 scaling, the sign product and ms_new = sat(q + r_new); outputs, r_new signs and Beta1/Beta2/index are compared. The VAR
// output must appear exactly one cycle after each pop.
module tb_ldpc_pe;
  import ldpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic chk_valid, chk_first, chk_last, var_pop, var_valid, var_rsign;
  logic [IDXW-1:0] chk_cnt, index;
  llr_t chk_ms, chk_rold, var_ms;
  mag_t beta1, beta2;
  int checks = 0, failures = 0;

  ldpc_pe dut (.*);

  function automatic int satf(input int v);
    return v > 127 ? 127 : (v < -127 ? -127 : v);
  endfunction

  typedef struct { int d; int ms [24]; int rold [24]; } layer_t;
  layer_t layers [$];
  int exp_ms [$];
  int exp_sg [$];
  int exp_b1 [$], exp_b2 [$], exp_ix [$];

  task automatic model(input layer_t L);
    int q [24];
    int m1, m2, ix, sp, b1, b2, r;
    m1 = 31; m2 = 31; ix = 0; sp = 0;
    for (int k = 0; k < L.d; k++) begin
      int a;
      q[k] = satf(L.ms[k] - L.rold[k]);
      a = q[k] < 0 ? -q[k] : q[k];
      if (a > 31) a = 31;
      sp ^= int'(q[k] < 0);
      if (k == 0) begin m1 = a; m2 = 31; ix = 0; end
      else if (a < m1) begin m2 = m1; m1 = a; ix = k; end
      else if (a < m2) m2 = a;
    end
    b1 = (m1 >> 1) + (m1 >> 2);
    b2 = (m2 >> 1) + (m2 >> 2);
    exp_b1.push_back(b1); exp_b2.push_back(b2); exp_ix.push_back(ix);
    for (int k = 0; k < L.d; k++) begin
      int mag, s;
      mag = (k == ix) ? b2 : b1;
      s = sp ^ int'(q[k] < 0);
      r = (s != 0) ? -mag : mag;
      exp_ms.push_back(satf(q[k] + r));
      exp_sg.push_back(int'((s != 0) && (mag != 0)));
    end
  endtask

  // driver: CHK of layer n, VAR of layer n-1 runs alongside
  int var_left = 0;
  int beta_ptr = 0;
  initial begin
    chk_valid = 0; chk_first = 0; chk_last = 0; chk_cnt = '0; chk_ms = '0; chk_rold = '0; var_pop = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      layer_t L;
      L.d = $urandom_range(2, 22);
      for (int k = 0; k < L.d; k++) begin
        L.ms[k]   = ($urandom_range(0, 3) == 0) ? int'($urandom_range(0, 254)) - 127 : int'($urandom_range(0, 62)) - 31;
        L.rold[k] = (n % 5 == 0) ? 0 : int'($urandom_range(0, 46)) - 23;
      end
      model(L);
      for (int k = 0; k < L.d; k++) begin
        // the last value of a layer waits until the previous VAR phase is done
        while (k == L.d - 1 && var_left > 1) begin
          @(negedge clk); chk_valid = 0; var_pop = (var_left > 0);
          @(posedge clk); if (var_pop) var_left--;
        end
        @(negedge clk);
        chk_valid = 1; chk_first = (k == 0); chk_last = (k == L.d - 1); chk_cnt = IDXW'(k);
        chk_ms = llr_t'(L.ms[k]); chk_rold = llr_t'(L.rold[k]);
        var_pop = (var_left > 0);
        @(posedge clk);
        if (var_pop) var_left--;
      end
      var_left = L.d;
      // the new Beta values are visible after the last CHK value
      @(negedge clk);
      chk_valid = 0;
      checks++;
      if (beta1 != mag_t'(exp_b1[beta_ptr]) || beta2 != mag_t'(exp_b2[beta_ptr]) || index != IDXW'(exp_ix[beta_ptr])) begin
        failures++;
        $display("FAIL layer %0d beta %0d/%0d/%0d expected %0d/%0d/%0d", beta_ptr, beta1, beta2, index,
                 exp_b1[beta_ptr], exp_b2[beta_ptr], exp_ix[beta_ptr]);
      end
      beta_ptr++;
      var_pop = (var_left > 0);
      @(posedge clk);
      if (var_pop) var_left--;
    end
    while (var_left > 0) begin
      @(negedge clk); chk_valid = 0; var_pop = 1;
      @(posedge clk); var_left--;
    end
    @(negedge clk); var_pop = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_ms.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_ms.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: output one cycle after each pop
  logic pop_d = 1'b0;
  always @(posedge clk) begin
    pop_d <= var_pop && rst_n;
    if (rst_n) begin
      if (var_valid != pop_d) begin
        checks++; failures++;
        $display("FAIL var_valid timing");
      end
      if (var_valid) begin
        int e, s;
        e = exp_ms.pop_front();
        s = exp_sg.pop_front();
        checks++;
        if (int'(var_ms) != e || int'(var_rsign) != s) begin
          failures++;
          if (failures < 10) $display("FAIL var out %0d/%0d expected %0d/%0d", var_ms, var_rsign, e, s);
        end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
