// tb_ldpc_in_buffer: self-checking test of the single-port input buffer.
//
// Three rounds: 24 random words are written through the valid/ready handshake with random gaps;
// the test checks that in_ready falls and full rises exactly after the 24th word, that a further
// offered word is not taken, that random reads return the stored word one cycle later, and that
// release_buf empties the buffer for the next codeword. Reference: a plain array in the test.
module tb_ldpc_in_buffer;
  import ldpc_pkg::*;
  localparam int DW = LANES * CHW;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, full, rd_en, release_buf;
  logic [DW-1:0] in_data, rd_data;
  logic [4:0] rd_addr;
  logic [DW-1:0] ref_mem [NB];
  int checks = 0, failures = 0;

  ldpc_in_buffer dut (.*);

  function automatic logic [DW-1:0] rnd_word();
    logic [DW-1:0] w;
    for (int i = 0; i < DW / 32; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    in_valid = 0; in_data = '0; rd_en = 0; rd_addr = '0; release_buf = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      for (int j = 0; j < NB; j++) begin
        @(negedge clk);
        check(in_ready && !full, $sformatf("ready before word %0d", j));
        in_valid = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
        in_valid = 1; in_data = rnd_word(); ref_mem[j] = in_data;
        @(negedge clk);
        in_valid = 0;
      end
      check(full && !in_ready, "full after 24 words");
      // an offered word must not be taken while full
      in_valid = 1; in_data = rnd_word();
      @(negedge clk);
      in_valid = 0;
      for (int k = 0; k < 40; k++) begin
        int a;
        a = $urandom_range(0, NB - 1);
        rd_en = 1; rd_addr = 5'(a);
        @(negedge clk);
        rd_en = 0;
        check(rd_data == ref_mem[a], $sformatf("read word %0d", a));
      end
      release_buf = 1;
      @(negedge clk);
      release_buf = 0;
      check(!full && in_ready, "empty after release");
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
