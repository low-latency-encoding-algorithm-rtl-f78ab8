// matrix_calc: matrix calculation stage of the zero-state solver.
//
// Input are the E = 7 accumulated bits of each plane (acc0 for u0, acc1 for
// u1) as left by the input accumulators, and a rotation amount 'rot'. Both
// planes pass through a barrel rotator, z[p] = acc[(p + rot) mod 7], which
// brings them into an order where position p must be multiplied by
// A^((7 - p) mod 7) B. A fixed XOR network then forms
//     S = sum_p A^((7-p) mod 7) B (z0[p], z1[p])^T.
// The seven products B, A^6B, A^5B, ..., AB are constants of the code, so the
// network is only XOR gates; it is built here from the package functions.
//
// The rotation amount that makes the fixed network right is
//     rot = (N - 1 - floor((N-1)/(W/2)) * ((W/2) mod 7)) mod 7
// (computed by the zero_state_solver): it undoes the accumulator's per-word
// rotation and aligns group n mod 7 to the power (N-1-n) mod 7 of A.
// Purely combinational.
module matrix_calc
  import ctc_pkg::*;
(
  input  logic [E-1:0] acc0,
  input  logic [E-1:0] acc1,
  input  logic [2:0]   rot,
  output state_t       szs
);

  logic [E-1:0] z0, z1;

  barrel_rotator #(.N(E)) u_rot0 (.din(acc0), .amt(rot), .dout(z0));
  barrel_rotator #(.N(E)) u_rot1 (.din(acc1), .amt(rot), .dout(z1));

  always_comb begin
    szs = '0;
    for (int p = 0; p < E; p++)
      szs = szs ^ pow_a((E - p) % E, mul_b(z0[p], z1[p]));
  end

endmodule
