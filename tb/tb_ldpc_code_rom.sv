// tb_ldpc_code_rom: self-checking test of the code ROM against the base matrices of the test
// package (written in the natural row/column layout of the standards).
//
// For every supported Zf of both codes it checks per layer: the number of layers and the row
// degree; that the columns of the layer's edges are exactly the non-zero blocks of that base
// matrix row; for every edge, the write-side rotation, i.e. the difference between this use's
// shift and the shift of the same column's next use (cyclic over the iteration), modulo Zf; the
// "last use" flag; and the load and output rotations of every column.
module tb_ldpc_code_rom;
  import ldpc_pkg::*;
  import tb_ldpc_codes_pkg::*;
  code_e code;
  logic [ZW-1:0] zf;
  logic [LAYW-1:0] layer;
  logic [LAYW:0] n_layers;
  logic [IDXW-1:0] layer_deg;
  logic [EDGEW-1:0] layer_base, rd_edge, wr_edge;
  logic [COLW-1:0] rd_col, wr_col, col;
  logic [ZW-1:0] wr_shift, init_shift, final_shift;
  logic wr_last;
  int checks = 0, failures = 0;

  ldpc_code_rom dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic test_code(input bit c, input int z);
    int edge_col [EDGES];
    int edge_sh [EDGES];
    int ne, nr;
    code = c ? CODE_11N_R56 : CODE_16E_R12;
    zf = ZW'(z);
    nr = nrows(c);
    ne = 0;
    layer = '0;
    #1;
    check(int'(n_layers) == nr, $sformatf("code %0d z %0d layers", c, z));
    for (int i = 0; i < nr; i++) begin
      int deg;
      bit seen [24];
      deg = 0;
      for (int j = 0; j < 24; j++) begin
        seen[j] = 0;
        if (hval(c, i, j) >= 0) deg++;
      end
      layer = LAYW'(i);
      #1;
      check(int'(layer_deg) == deg, $sformatf("code %0d z %0d layer %0d degree", c, z, i));
      check(int'(layer_base) == ne, $sformatf("code %0d z %0d layer %0d base", c, z, i));
      for (int k = 0; k < deg; k++) begin
        rd_edge = EDGEW'(ne);
        #1;
        check(hval(c, i, int'(rd_col)) >= 0 && !seen[rd_col], $sformatf("code %0d layer %0d edge %0d column", c, i, k));
        seen[rd_col] = 1;
        edge_col[ne] = int'(rd_col);
        edge_sh[ne] = shift_of(c, i, int'(rd_col), z);
        ne++;
      end
    end
    for (int e = 0; e < ne; e++) begin
      int nx, d;
      bit last;
      nx = -1;
      last = 1;
      for (int k = 1; k <= ne; k++) begin
        if (nx < 0 && edge_col[(e + k) % ne] == edge_col[e]) begin
          nx = (e + k) % ne;
          last = (e + k) >= ne;
        end
      end
      d = ((edge_sh[nx] - edge_sh[e]) % z + z) % z;
      wr_edge = EDGEW'(e);
      #1;
      check(int'(wr_col) == edge_col[e], $sformatf("code %0d z %0d edge %0d write column", c, z, e));
      check(int'(wr_shift) == d, $sformatf("code %0d z %0d edge %0d write shift %0d expected %0d", c, z, e, wr_shift, d));
      check(wr_last == last, $sformatf("code %0d z %0d edge %0d last flag", c, z, e));
    end
    for (int j = 0; j < 24; j++) begin
      int first;
      first = -1;
      for (int e = 0; e < ne; e++) if (first < 0 && edge_col[e] == j) first = e;
      col = COLW'(j);
      #1;
      check(int'(init_shift) == edge_sh[first], $sformatf("code %0d z %0d column %0d load shift", c, z, j));
      check(int'(final_shift) == (z - edge_sh[first]) % z, $sformatf("code %0d z %0d column %0d output shift", c, z, j));
    end
  endtask

  initial begin
    code = CODE_16E_R12; zf = 7'd96; layer = '0; rd_edge = '0; wr_edge = '0; col = '0;
    for (int z = 24; z <= 96; z += 4) test_code(1'b0, z);
    test_code(1'b1, 54);
    test_code(1'b1, 27);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
