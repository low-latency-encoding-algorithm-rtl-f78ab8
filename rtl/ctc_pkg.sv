// ctc_pkg: types, constants and matrix helpers shared by the duo-binary
// tail-biting turbo encoder.
//
// The constituent code is the 8-state duo-binary recursive systematic
// convolutional (RSC) code with the state-space description
//     S(n+1) = A*S(n) + B*u(n)        y(n) = C*S(n) + D*u(n)     (over GF(2))
//         | 1 0 1 |       | 1 1 |       | 0 0 0 |       | 1 0 |
//     A = | 1 0 0 |   B = | 0 1 |   C = | 0 0 0 |   D = | 0 1 |
//         | 0 1 0 |       | 0 1 |       | 1 1 0 |       | 1 1 |
// with S = (s1, s2, s3) the three delay elements from input to output side
// and u = (u0, u1) the bit couple of one symbol. A has period E = 7
// (A^7 = I), which is what the low-latency zero-state computation uses.
//
// Bit order of state_t: bit 0 = s1, bit 1 = s2, bit 2 = s3 (own choice).
// All functions are constant-evaluable, so tables built from them are fixed
// at elaboration time.
package ctc_pkg;

  localparam int M = 3;  // delay elements of the constituent code
  localparam int E = 7;  // period of A: A^7 = I

  typedef logic [M-1:0] state_t;

  // A * s
  function automatic state_t mul_a(state_t s);
    state_t r;
    r[0] = s[0] ^ s[2];
    r[1] = s[0];
    r[2] = s[1];
    return r;
  endfunction

  // B * (u0, u1)^T
  function automatic state_t mul_b(logic u0, logic u1);
    state_t r;
    r[0] = u0 ^ u1;
    r[1] = u1;
    r[2] = u1;
    return r;
  endfunction

  // A^p * s for 0 <= p
  function automatic state_t pow_a(int unsigned p, state_t s);
    state_t r = s;
    for (int unsigned i = 0; i < p % E; i++) r = mul_a(r);
    return r;
  endfunction

  // One trellis step, equation (2)
  function automatic state_t next_state(state_t s, logic u0, logic u1);
    return mul_a(s) ^ mul_b(u0, u1);
  endfunction

  // Parity output, third row of equation (3): s1 ^ s2 ^ u0 ^ u1
  function automatic logic parity(state_t s, logic u0, logic u1);
    return s[0] ^ s[1] ^ u0 ^ u1;
  endfunction

  // Circulation state: the S0 with (A^n + I) S0 = szs, n = N mod 7.
  // For n = 0 the matrix is singular and 0 is returned.
  function automatic state_t circulation_state(int unsigned n, state_t szs);
    state_t r = '0;
    for (int s = 0; s < (1 << M); s++)
      if ((pow_a(n, state_t'(s)) ^ state_t'(s)) == szs && (n % E) != 0)
        r = state_t'(s);
    return r;
  endfunction

endpackage
