// zero_state_solver: computes the zero-state solution of a frame,
//     S_N^[zs] = sum_{n=0}^{N-1} A^(N-1-n) B u_n,
// the state the constituent encoder would reach from state 0, while taking
// W bits (W/2 symbols) per clock instead of one symbol.
//
// Because A^7 = I only the XOR of the symbols in each residue class n mod 7
// matters. Two input_accumulators (one for the u0 bits, one for the u1 bits
// of each word) build these 2 x 7 sums at W/2 symbols per cycle; once the
// last word is in, matrix_calc rotates them back into order and applies the
// fixed XOR network for B, AB, ..., A^6B once.
//
// Word format (own choice, following the bit order u0^0, u0^1, u1^0, ... of
// the information sequence): bit 2j of a word is u^0 and bit 2j+1 is u^1 of
// symbol j of that word; word k carries symbols k*W/2 .. k*W/2 + W/2 - 1.
// Symbols at or beyond the frame length N in the last word are masked to 0.
//
// Interface and timing: pulse 'start' with 'frame_len' = N (1..NMAX). Then
// present the K = ceil(N / (W/2)) words with 'in_valid', back to back or with
// gaps. Two cycles after the last word 'done' pulses for one cycle with the
// result on 'szs' (held until the next frame). 'busy' is high from 'start'
// to 'done'. Zero-state latency is therefore K + 2 cycles for back-to-back
// words, against N cycles for a serial solver.
module zero_state_solver
  import ctc_pkg::*;
#(
  parameter int W    = 16,    // input bits per cycle
  parameter int NMAX = 2400,  // largest frame length in symbols
  parameter int LW   = $clog2(NMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [LW-1:0] frame_len,
  input  logic          in_valid,
  input  logic [W-1:0]  in_word,
  output logic          busy,
  output logic          done,
  output state_t        szs
);

  localparam int WH = W / 2;
  localparam int SH = WH % E;

  logic [LW-1:0] n_q;        // frame length
  logic [LW-1:0] wcnt_q;     // words accepted so far
  logic [2:0]    rot_q;      // barrel rotation for the matrix calculation
  logic          calc_q;     // last word is in: run the matrix calculation
  logic [WH-1:0] plane0, plane1;
  logic [E-1:0]  acc0, acc1;
  logic          last_word;
  state_t        szs_comb;

  // Rotation amount from the frame length:
  // ((N-1) - floor((N-1)/(W/2)) * ((W/2) mod 7)) mod 7
  function automatic logic [2:0] rot_amount(logic [LW-1:0] n);
    int unsigned nm1, a, b;
    nm1 = (n == '0) ? 0 : int'(n) - 1;
    a   = nm1 % E;
    b   = ((nm1 / WH) % E) * SH % E;
    return 3'((a + E - b) % E);
  endfunction

  // Split the word into its two bit planes and mask symbols beyond N.
  always_comb begin
    for (int j = 0; j < WH; j++) begin
      logic ok;
      ok = (32'(wcnt_q) * WH + j) < 32'(n_q);
      plane0[j] = in_word[2*j]     & ok;
      plane1[j] = in_word[2*j + 1] & ok;
    end
    last_word = (32'(wcnt_q) + 1) * WH >= 32'(n_q);
  end

  input_accumulator #(.WH(WH), .E(E)) u_acc0 (
    .clk, .rst_n, .en(in_valid && busy && !calc_q), .first(wcnt_q == '0),
    .din(plane0), .acc(acc0)
  );
  input_accumulator #(.WH(WH), .E(E)) u_acc1 (
    .clk, .rst_n, .en(in_valid && busy && !calc_q), .first(wcnt_q == '0),
    .din(plane1), .acc(acc1)
  );

  matrix_calc u_mat (.acc0(acc0), .acc1(acc1), .rot(rot_q), .szs(szs_comb));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q    <= '0;
      wcnt_q <= '0;
      rot_q  <= '0;
      calc_q <= 1'b0;
      busy   <= 1'b0;
      done   <= 1'b0;
      szs    <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        n_q    <= frame_len;
        wcnt_q <= '0;
        rot_q  <= rot_amount(frame_len);
        calc_q <= 1'b0;
        busy   <= 1'b1;
      end else if (busy) begin
        if (calc_q) begin
          szs    <= szs_comb;
          done   <= 1'b1;
          busy   <= 1'b0;
          calc_q <= 1'b0;
        end else if (in_valid) begin
          wcnt_q <= wcnt_q + 1'b1;
          if (last_word) calc_q <= 1'b1;
        end
      end
    end
  end

  // A frame must hold at least one symbol and fit the configured maximum.
  a_len: assert property (@(posedge clk) disable iff (!rst_n)
                          start |-> (frame_len != '0 && 32'(frame_len) <= NMAX));

endmodule
