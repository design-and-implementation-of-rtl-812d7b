// ldpc_code_pkg: base matrices of the codes the decoder holds, in scheduled order.
//
// Each table lists the non-zero blocks (edges) of a base matrix layer by layer. Within a layer the
// edges are put in the order the decoder reads them: block columns the previous layer does not
// touch come first, then the shared columns in the order the previous layer writes them back. This
// lets the next layer start reading while the previous one is still writing, which is the
// scheduling idea of the design; the order itself is this design's choice. For every edge:
//   COL    block column address,
//   P      base shift amount p(i,j) of this edge,
//   PNEXT  base shift of the next edge (cyclically, across iterations) on the same column,
//   LAST   1 if no later layer of the same iteration uses this column.
// PFIRST gives, per column, the base shift of the first layer using it; it sets the alignment
// in which the column is stored between iterations and the inverse shift on output.
// DEG and BASE give per layer the degree and the index of the first edge.
// The 802.16e rate-1/2 matrix and the 802.11n rate-5/6 Zf=54 matrix are those of the standards.
package ldpc_code_pkg;

  // C16E_R12: 12 layers, 76 non-zero blocks
  localparam int C16E_R12_LAYERS = 12;
  localparam int C16E_R12_EDGES = 76;
  localparam logic [4:0] C16E_R12_DEG [12] = '{6, 7, 7, 6, 6, 7, 6, 6, 7, 6, 6, 6};
  localparam logic [6:0] C16E_R12_BASE [12] = '{0, 6, 13, 20, 26, 32, 39, 45, 51, 58, 64, 70};
  localparam logic [4:0] C16E_R12_COL [88] = '{1, 2, 8, 9, 13, 12, 5, 6, 7, 11, 14, 1, 13, 3, 4, 15, 5, 7, 11, 14, 0, 2, 8, 9, 16, 15, 6, 10, 17, 2, 9, 16, 4, 5, 7, 11, 12, 18, 17, 2, 3, 9, 10, 19, 18, 1, 6, 20, 2, 9, 19, 0, 4, 5, 7, 11, 21, 20, 10, 22, 5, 7, 11, 21, 2, 3, 8, 9, 23, 22, 0, 5, 7, 11, 12, 23, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  localparam logic [6:0] C16E_R12_P [88] = '{94, 73, 55, 83, 0, 7, 22, 79, 9, 12, 0, 27, 0, 24, 22, 0, 81, 33, 0, 0, 61, 47, 65, 25, 0, 0, 84, 72, 0, 39, 41, 0, 46, 40, 82, 79, 0, 0, 0, 95, 53, 14, 18, 0, 0, 11, 2, 0, 73, 47, 0, 12, 83, 24, 43, 51, 0, 0, 70, 0, 94, 59, 72, 0, 7, 65, 39, 49, 0, 0, 43, 66, 41, 26, 7, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  localparam logic [6:0] C16E_R12_PNEXT [88] = '{27, 47, 65, 25, 0, 0, 81, 84, 33, 0, 0, 11, 0, 53, 46, 0, 40, 82, 79, 0, 12, 39, 39, 41, 0, 0, 2, 18, 0, 95, 14, 0, 83, 24, 43, 51, 7, 0, 0, 73, 65, 47, 70, 0, 0, 94, 79, 0, 7, 49, 0, 43, 22, 94, 59, 72, 0, 0, 72, 0, 66, 41, 26, 0, 73, 24, 55, 83, 0, 0, 61, 22, 9, 12, 7, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  localparam logic C16E_R12_LAST [88] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 1, 1, 1, 0, 0, 0, 1, 0, 1, 0, 0, 0, 0, 1, 1, 0, 0, 0, 0, 1, 1, 1, 1, 1, 0, 1, 1, 1, 1, 1, 1, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  localparam logic [6:0] C16E_R12_PFIRST [24] = '{61, 94, 73, 24, 22, 22, 79, 9, 55, 83, 72, 12, 7, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};

  // C11N_R56: 4 layers, 85 non-zero blocks
  localparam int C11N_R56_LAYERS = 4;
  localparam int C11N_R56_EDGES = 85;
  localparam logic [4:0] C11N_R56_DEG [12] = '{21, 21, 22, 21, 0, 0, 0, 0, 0, 0, 0, 0};
  localparam logic [6:0] C11N_R56_BASE [12] = '{0, 21, 42, 64, 0, 0, 0, 0, 0, 0, 0, 0};
  localparam logic [4:0] C11N_R56_COL [88] = '{18, 21, 0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 16, 19, 20, 17, 22, 18, 21, 0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 16, 19, 20, 23, 17, 22, 18, 0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 16, 19, 20, 23, 17, 0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 0, 0, 0};
  localparam logic [6:0] C11N_R56_P [88] = '{46, 0, 48, 29, 37, 52, 2, 16, 6, 14, 53, 31, 34, 5, 18, 42, 53, 31, 45, 52, 1, 41, 0, 19, 0, 17, 4, 30, 7, 43, 11, 24, 6, 14, 21, 6, 39, 17, 40, 47, 7, 15, 38, 0, 0, 25, 0, 35, 7, 2, 51, 31, 46, 23, 16, 11, 53, 40, 10, 7, 46, 53, 33, 35, 3, 51, 1, 0, 2, 19, 48, 41, 1, 10, 7, 36, 47, 5, 29, 52, 52, 31, 10, 26, 6, 0, 0, 0};
  localparam logic [6:0] C11N_R56_PNEXT [88] = '{19, 0, 17, 4, 30, 7, 43, 11, 24, 6, 14, 21, 6, 39, 17, 40, 47, 7, 15, 38, 0, 25, 0, 35, 0, 7, 2, 51, 31, 46, 23, 16, 11, 53, 40, 10, 7, 46, 53, 33, 35, 3, 51, 1, 0, 2, 0, 46, 19, 48, 41, 1, 10, 7, 36, 47, 5, 29, 52, 52, 31, 10, 26, 6, 45, 52, 1, 0, 41, 48, 29, 37, 52, 2, 16, 6, 14, 53, 31, 34, 5, 18, 42, 53, 31, 0, 0, 0};
  localparam logic C11N_R56_LAST [88] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 0, 0, 0};
  localparam logic [6:0] C11N_R56_PFIRST [24] = '{48, 29, 37, 52, 2, 16, 6, 14, 53, 31, 34, 5, 18, 42, 53, 31, 45, 41, 46, 52, 1, 0, 0, 0};

endpackage
