// tb_ref_pkg: reference model of the duo-binary constituent code for the
// testbenches, written from the encoder's adder structure rather than from
// the matrices used in the RTL:
//   w   = u0 ^ u1 ^ s1 ^ s3   (first adder, input of the first delay)
//   s1' = w, s2' = s1 ^ u1, s3' = s2 ^ u1
//   parity = w ^ s2 ^ s3      (parity adder)
// State encoding as in the RTL: bit 0 = s1, bit 1 = s2, bit 2 = s3.
package tb_ref_pkg;

  function automatic logic [2:0] ref_step(logic [2:0] s, logic u0, logic u1);
    logic w;
    w = u0 ^ u1 ^ s[0] ^ s[2];
    return {s[1] ^ u1, s[0] ^ u1, w};
  endfunction

  function automatic logic ref_parity(logic [2:0] s, logic u0, logic u1);
    logic w;
    w = u0 ^ u1 ^ s[0] ^ s[2];
    return w ^ s[1] ^ s[2];
  endfunction

  // State reached after encoding syms[0..n-1] serially from state s.
  function automatic logic [2:0] ref_run(logic [2:0] s, logic [1:0] syms [], int n);
    for (int i = 0; i < n; i++) s = ref_step(s, syms[i][0], syms[i][1]);
    return s;
  endfunction

  // Circulation state by exhaustive search: the start state that the frame
  // brings back to itself. Returns -1 if none or several exist.
  function automatic int ref_circ(logic [1:0] syms [], int n);
    int found = -1, cnt = 0;
    for (int s = 0; s < 8; s++)
      if (ref_run(3'(s), syms, n) == 3'(s)) begin found = s; cnt++; end
    return (cnt == 1) ? found : -1;
  endfunction

endpackage
