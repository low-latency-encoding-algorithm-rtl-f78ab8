// barrel_rotator: rotates an N-bit vector toward bit 0 by a run-time amount,
//     dout[p] = din[(p + amt) mod N],  0 <= amt < N.
// It is built as log2 stages of fixed rotations (1, 2, 4, ...), each stage
// reducing the remaining amount modulo N, so it works for any N, including
// the 7-bit vectors of the matrix calculation. Purely combinational.
// The published method names a barrel shifter; its construction is this design's own.
module barrel_rotator #(
  parameter int N  = 7,
  parameter int AW = $clog2(N)
) (
  input  logic [N-1:0]  din,
  input  logic [AW-1:0] amt,
  output logic [N-1:0]  dout
);

  always_comb begin
    logic [N-1:0] v;
    logic [N-1:0] t;
    v = din;
    for (int s = 0; s < AW; s++) begin
      for (int p = 0; p < N; p++) t[p] = amt[s] ? v[(p + (1 << s)) % N] : v[p];
      v = t;
    end
    dout = v;
  end

endmodule
