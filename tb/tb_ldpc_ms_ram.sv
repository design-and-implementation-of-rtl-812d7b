// tb_ldpc_ms_ram: self-checking test of the dual-port process buffer.
//
// All 24 words are first written, then 2000 cycles of random simultaneous reads and writes follow.
// Each read is compared, one cycle later, with a reference array taken before that cycle's write,
// which also covers a read and a write of the same word in one cycle (old data expected).
module tb_ldpc_ms_ram;
  import ldpc_pkg::*;
  localparam int DW = LANES * W;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rd_en, wr_en;
  logic [4:0] rd_addr, wr_addr;
  logic [DW-1:0] rd_data, wr_data, exp_data;
  logic [DW-1:0] ref_mem [NB];
  int checks = 0, failures = 0, collisions = 0;

  ldpc_ms_ram dut (.*);

  function automatic logic [DW-1:0] rnd_word();
    logic [DW-1:0] w;
    for (int i = 0; i < DW / 32; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    for (int j = 0; j < NB; j++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 5'(j); wr_data = rnd_word(); ref_mem[j] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int k = 0; k < 2000; k++) begin
      bit do_rd;
      do_rd   = $urandom_range(0, 3) != 0;
      rd_en   = do_rd;
      rd_addr = 5'($urandom_range(0, NB - 1));
      wr_en   = 1'($urandom_range(0, 1));
      wr_addr = ($urandom_range(0, 3) == 0) ? rd_addr : 5'($urandom_range(0, NB - 1));
      wr_data = rnd_word();
      if (wr_en && rd_en && wr_addr == rd_addr) collisions++;
      exp_data = ref_mem[rd_addr];
      @(negedge clk);
      if (wr_en) ref_mem[wr_addr] = wr_data;
      if (do_rd) begin
        checks++;
        if (rd_data != exp_data) begin
          failures++;
          $display("FAIL read word %0d", rd_addr);
        end
      end
    end
    checks++;
    if (collisions == 0) begin
      failures++;
      $display("FAIL no same-word read/write happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
