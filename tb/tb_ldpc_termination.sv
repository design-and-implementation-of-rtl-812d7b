// tb_ldpc_termination: self-checking test of the hard-decision early-termination unit.
//
// Random "iterations" of 24 column updates are applied in single- and multi-codeword mode with
// random Zf. Each update either repeats the stored signs, or flips one random lane, which may lie
// inside or outside the active lanes. A reference model keeps its own copy of the hard
// decisions and of the two "changed" flags; `same` is compared after every iteration.
module tb_ldpc_termination;
  import ldpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [ZW-1:0] zf;
  logic multi, iter_clear, chk_en, changed_a, changed_b, same;
  logic [COLW-1:0] chk_col;
  logic [LANES-1:0] chk_signs;
  logic [LANES-1:0] ref_hd [NB];
  bit ref_a, ref_b;
  int checks = 0, failures = 0, n_same = 0, n_diff = 0;

  ldpc_termination dut (.*);

  function automatic logic [LANES-1:0] rnd_word();
    return {$urandom, $urandom, $urandom};
  endfunction

  initial begin
    zf = 7'd96; multi = 0; iter_clear = 0; chk_en = 0; chk_col = '0; chk_signs = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 40; run++) begin
      multi = 1'($urandom_range(0, 1));
      zf = multi ? 7'($urandom_range(6, 12) * 4) : 7'($urandom_range(6, 24) * 4);
      // first iteration: fresh signs everywhere
      @(negedge clk);
      iter_clear = 1;
      @(negedge clk);
      iter_clear = 0;
      for (int c = 0; c < NB; c++) begin
        chk_en = 1; chk_col = 5'(c); chk_signs = rnd_word(); ref_hd[c] = chk_signs;
        @(negedge clk);
      end
      chk_en = 0;
      for (int it = 0; it < 4; it++) begin
        iter_clear = 1; ref_a = 0; ref_b = 0;
        @(negedge clk);
        iter_clear = 0;
        for (int c = 0; c < NB; c++) begin
          logic [LANES-1:0] w;
          w = ref_hd[c];
          if ($urandom_range(0, 40) == 0) begin
            int lane;
            lane = $urandom_range(0, LANES - 1);
            w[lane] = ~w[lane];
            if (lane < int'(zf)) ref_a = 1;
            if (multi && lane >= HALF && lane < HALF + int'(zf)) ref_b = 1;
          end
          chk_en = 1; chk_col = 5'(c); chk_signs = w; ref_hd[c] = w;
          @(negedge clk);
        end
        chk_en = 0;
        checks++;
        if (same != (!ref_a && !(multi && ref_b))) begin
          failures++;
          $display("FAIL run %0d iteration %0d: same=%0d expected %0d", run, it, same, !ref_a && !(multi && ref_b));
        end
        if (same) n_same++; else n_diff++;
      end
    end
    checks++;
    if (n_same == 0 || n_diff == 0) begin
      failures++;
      $display("FAIL both outcomes must occur (%0d same, %0d changed)", n_same, n_diff);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
