// ldpc_barrel_rotl: rotate N messages left by AMT positions (out[i] = in[(i+AMT) mod N]).
//
// Built as the three multiplexer levels of the document's 96-message barrel shifter: the first
// level rotates by a multiple of 16 chosen by amt[6:4], the second by 0/4/8/12 (amt[3:2]), the
// third by 0..3 (amt[1:0]). For N = 96 the first level has six useful inputs (0..80). AMT must be
// below N. Purely combinational.
module ldpc_barrel_rotl #(
  parameter int N = 96,
  parameter int W = 6
) (
  input  logic [N*W-1:0] din,
  input  logic [6:0]     amt,
  output logic [N*W-1:0] dout
);
  logic [N*W-1:0] l1, l2;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      l1[i*W +: W] = din[((i + 16*int'(amt[6:4])) % N)*W +: W];
    end
    for (int i = 0; i < N; i++) begin
      l2[i*W +: W] = l1[((i + 4*int'(amt[3:2])) % N)*W +: W];
    end
    for (int i = 0; i < N; i++) begin
      dout[i*W +: W] = l2[((i + int'(amt[1:0])) % N)*W +: W];
    end
  end
endmodule
