// tb_ldpc_permute: checks the configurable cyclic shift against a direct index formula.
// For every Zf of both standards (and random other Zf), single and multi-codeword mode, and random
// shift amounts, out[i] must equal in[(i+S) mod Zf] inside each codeword and in[i] elsewhere.
module tb_ldpc_permute;
  import ldpc_pkg::*;

  logic [LANES*W-1:0] din, dout;
  logic [ZW-1:0] zf, shift;
  logic multi;
  int checks = 0, failures = 0;

  ldpc_permute dut (.din, .zf, .shift, .multi, .dout);

  task automatic check_one(input int z, input int s, input bit m);
    int src;
    logic [W-1:0] exp;
    int errs;
    for (int i = 0; i < LANES; i++) din[i*W +: W] = W'($urandom);
    zf = ZW'(z); shift = ZW'(s); multi = m;
    #1;
    errs = 0;
    for (int i = 0; i < LANES; i++) begin
      int base, j;
      base = (m && i >= HALF) ? HALF : 0;
      j = i - base;
      src = (j < z) ? base + ((j + s) % z) : i;
      exp = din[src*W +: W];
      if (dout[i*W +: W] != exp) errs++;
    end
    checks++;
    if (errs != 0) begin
      failures++;
      $display("FAIL zf=%0d shift=%0d multi=%0d: %0d lanes wrong", z, s, m, errs);
    end
  endtask

  initial begin
    fork
      begin
        #100000;
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none
    // 802.16e sizes 24..96 step 4, 802.11n sizes 27, 54, 81
    for (int z = 24; z <= 96; z += 4) begin
      check_one(z, 0, 1'b0);
      check_one(z, z - 1, 1'b0);
      check_one(z, 1, 1'b0);
      repeat (6) check_one(z, $urandom_range(0, z - 1), 1'b0);
      if (z <= HALF) begin
        check_one(z, 0, 1'b1);
        check_one(z, z - 1, 1'b1);
        repeat (6) check_one(z, $urandom_range(0, z - 1), 1'b1);
      end
    end
    check_one(27, 13, 1'b0); check_one(27, 26, 1'b1); check_one(54, 53, 1'b0);
    check_one(81, 80, 1'b0); check_one(81, 40, 1'b0); check_one(27, 5, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
