// circulation_lut: initial-state lookup of the tail-biting encoder.
//
// Tail biting requires S_N = S_0. With S_N = A^N S_0 + S_N^[zs] this gives
//     (A^N + I) S_0 = S_N^[zs],
// and because A^7 = I the 3x3 matrix depends only on N mod 7. For
// N mod 7 = 1..6 it is invertible, so S_0 is a fixed function of
// (N mod 7, S_N^[zs]): a 7 x 8 table of 3-bit states. The table is computed
// at elaboration time from the code matrices (ctc_pkg::circulation_state, which
// searches the 8 states for the solution); no table file is used.
// For N mod 7 = 0 there is no unique solution: 'singular' is raised and
// S_0 = 0 is returned.
//
// Interface and timing: purely combinational, 'n_mod7' in 0..6.
// The published method states that S_0 is found from S_N^[zs] by a lookup table;
// the table layout is this design's own.
module circulation_lut
  import ctc_pkg::*;
(
  input  logic [2:0] n_mod7,
  input  state_t     szs,
  output state_t     s0,
  output logic       singular
);

  typedef logic [E-1:0][(1 << M)-1:0][M-1:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (int n = 0; n < E; n++)
      for (int s = 0; s < (1 << M); s++)
        t[n][s] = circulation_state(n, state_t'(s));
    return t;
  endfunction

  localparam table_t LUT = build_table();

  always_comb begin
    singular = (n_mod7 == 3'd0) || (n_mod7 >= 3'(E));
    s0       = singular ? '0 : LUT[n_mod7][szs];
  end

endmodule
