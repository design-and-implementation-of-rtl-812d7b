// tb_ldpc_beta_ram: self-checking test of Beta_ram (Beta1/Beta2/index per layer and lane) and
// the sign memory (one sign per edge and lane), including the rebuilding of the old check
// message r_old = sign * (cnt == index ? Beta2 : Beta1), or 0 in the first iteration.
//
// All layers and edges are written with random contents, then random reads follow: a read of a
// layer's Beta word (first edge of a layer) followed by reads of further edges of the same
// layer, during which the Beta word must be held. r_old is checked one cycle after each read.
module tb_ldpc_beta_ram;
  import ldpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic beta_rd_en, beta_wr_en, sign_rd_en, sign_wr_en, rc_zero;
  logic [LAYW-1:0] beta_rd_layer, beta_wr_layer;
  logic [LANES*MAGW-1:0] beta_wr_b1, beta_wr_b2;
  logic [LANES*IDXW-1:0] beta_wr_idx;
  logic [EDGEW-1:0] sign_rd_edge, sign_wr_edge;
  logic [LANES-1:0] sign_wr_bits;
  logic [IDXW-1:0] rc_cnt;
  logic [LANES*W-1:0] r_old;
  int b1m [MAX_LAYERS][LANES], b2m [MAX_LAYERS][LANES], ixm [MAX_LAYERS][LANES];
  logic [LANES-1:0] sgm [EDGES];
  int checks = 0, failures = 0;

  ldpc_beta_ram dut (.*);

  task automatic check_rold(input int l, input int e, input int cnt, input bit zero);
    for (int i = 0; i < LANES; i++) begin
      int m, v;
      m = (cnt == ixm[l][i]) ? b2m[l][i] : b1m[l][i];
      v = zero ? 0 : (sgm[e][i] ? -m : m);
      checks++;
      if (int'(llr_t'(r_old[i*W +: W])) != v) begin
        failures++;
        if (failures < 20) $display("FAIL layer %0d edge %0d cnt %0d lane %0d: %0d expected %0d", l, e, cnt, i, llr_t'(r_old[i*W +: W]), v);
      end
    end
  endtask

  initial begin
    beta_rd_en = 0; beta_wr_en = 0; sign_rd_en = 0; sign_wr_en = 0; rc_zero = 0; rc_cnt = '0;
    beta_rd_layer = '0; beta_wr_layer = '0; beta_wr_b1 = '0; beta_wr_b2 = '0; beta_wr_idx = '0;
    sign_rd_edge = '0; sign_wr_edge = '0; sign_wr_bits = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < MAX_LAYERS; l++) begin
      @(negedge clk);
      beta_wr_en = 1; beta_wr_layer = LAYW'(l);
      for (int i = 0; i < LANES; i++) begin
        b1m[l][i] = $urandom_range(0, 23); b2m[l][i] = $urandom_range(0, 23); ixm[l][i] = $urandom_range(0, 7);
        beta_wr_b1[i*MAGW +: MAGW] = MAGW'(b1m[l][i]);
        beta_wr_b2[i*MAGW +: MAGW] = MAGW'(b2m[l][i]);
        beta_wr_idx[i*IDXW +: IDXW] = IDXW'(ixm[l][i]);
      end
    end
    @(negedge clk);
    beta_wr_en = 0;
    for (int e = 0; e < EDGES; e++) begin
      sign_wr_en = 1; sign_wr_edge = EDGEW'(e);
      sgm[e] = {$urandom, $urandom, $urandom};
      sign_wr_bits = sgm[e];
      @(negedge clk);
    end
    sign_wr_en = 0;
    for (int t = 0; t < 200; t++) begin
      int l, n;
      bit zero;
      l = $urandom_range(0, MAX_LAYERS - 1);
      n = $urandom_range(1, 8);
      zero = ($urandom_range(0, 5) == 0);
      for (int k = 0; k < n; k++) begin
        int e;
        e = $urandom_range(0, EDGES - 1);
        beta_rd_en = (k == 0); beta_rd_layer = LAYW'(l);
        sign_rd_en = 1; sign_rd_edge = EDGEW'(e);
        @(negedge clk);
        beta_rd_en = 0; sign_rd_en = 0;
        rc_cnt = IDXW'($urandom_range(0, 7)); rc_zero = zero;
        #1;
        check_rold(l, e, int'(rc_cnt), zero);
      end
    end
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
