// tailbiting_encoder: low-latency tail-biting constituent encoder.
//
// A tail-biting convolutional code must start and end in the same state
// (the circulation state S_0), which depends on the whole frame. A plain
// encoder finds it by encoding the frame once from state 0 (N cycles),
// looking S_0 up from the reached state, and encoding again (N cycles).
// Here the first pass is replaced by the zero_state_solver, which reads the
// frame W bits (W/2 symbols) per cycle from the frame buffer and forms the
// zero-state solution in ceil(N/(W/2)) + 2 cycles; S_0 is then taken from
// circulation_lut and the rsc_encoder encodes the frame one symbol per cycle
// starting from S_0.
//
// Sequence (states of the controller):
//   IDLE  wait for 'start'. A frame length N with N = 0, N > NMAX or
//         N mod 7 = 0 (no circulation state exists) is refused: 'len_err'
//         pulses and nothing else happens.
//   ACC   read words 0..K-1, K = ceil(N/(W/2)), one per cycle, into the
//         solver (the read data arrive one cycle later).
//   WAIT  wait for the solver; on its 'done', load S_0 into the RSC encoder.
//   ENC   read symbol n (n = 0..N-1) from the buffer and encode it.
//   FIN   compare the final RSC state with S_0 ('tb_ok'), pulse 'done'.
//
// Interface and timing: the frame is written through the wr_* port (word
// format: bit 2j = u^0, bit 2j+1 = u^1 of symbol j) before 'start'. Encoded
// symbols (systematic u0, u1 and parity) appear on the y_* outputs with
// 'out_valid', one per cycle, the first K + 5 cycles after 'start' and the
// last K + N + 4 cycles after it; 'done' follows one cycle after the last.
// 'circ_state' and 'szs' hold S_0 and S_N^[zs] of the last frame.
// The two-part zero-state computation and the lookup follow the published method; the
// controller, the refusal of invalid lengths and the end check are this
// design's own.
module tailbiting_encoder
  import ctc_pkg::*;
#(
  parameter int W     = 16,    // bits read per cycle during the pre-pass
  parameter int NMAX  = 2400,  // largest frame length in symbols
  parameter int LW    = $clog2(NMAX + 1),
  parameter int DEPTH = (NMAX + W/2 - 1) / (W/2),
  parameter int AW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // frame memory write port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  // control
  input  logic          start,
  input  logic [LW-1:0] frame_len,
  output logic          busy,
  output logic          done,
  output logic          len_err,
  output logic          tb_ok,
  output state_t        circ_state,
  output state_t        szs,
  // encoded symbols
  output logic          out_valid,
  output logic          y_sys0,
  output logic          y_sys1,
  output logic          y_par
);

  localparam int WH  = W / 2;
  localparam int WHL = $clog2(WH);

  typedef enum logic [2:0] {S_IDLE, S_ACC, S_WAIT, S_ENC, S_FIN} phase_t;

  phase_t        phase_q;
  logic [LW-1:0] n_q;        // frame length
  logic [LW-1:0] cnt_q;      // word counter (ACC) or symbol counter (ENC)
  logic [LW-1:0] k_q;        // words per frame
  logic [2:0]    nmod_q;     // N mod 7
  logic          rd_valid_q; // a word read during ACC arrives this cycle
  logic [AW-1:0] rd_addr;
  logic [W-1:0]  rd_data;
  logic          len_ok;
  logic          zs_done;
  logic          zs_busy;
  state_t        zs_state;
  state_t        s0;
  logic          lut_singular;
  logic          enc_valid;
  logic [1:0]    enc_sym;
  state_t        rsc_state;
  logic [LW-1:0] next_cnt;

  // ---------------------------------------------------------------- memory
  always_comb begin
    next_cnt = cnt_q + 1'b1;
    unique case (phase_q)
      S_ACC:   rd_addr = AW'(cnt_q);
      S_ENC:   rd_addr = AW'(next_cnt >> WHL);
      default: rd_addr = '0;
    endcase
  end

  frame_buffer #(.W(W), .DEPTH(DEPTH), .AW(AW)) u_buf (
    .clk, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data
  );

  // ------------------------------------------------------- zero-state part
  zero_state_solver #(.W(W), .NMAX(NMAX), .LW(LW)) u_zs (
    .clk, .rst_n,
    .start(start && phase_q == S_IDLE && len_ok), .frame_len,
    .in_valid(rd_valid_q), .in_word(rd_data),
    .busy(zs_busy), .done(zs_done), .szs(zs_state)
  );

  circulation_lut u_lut (
    .n_mod7(nmod_q), .szs(zs_state), .s0(s0), .singular(lut_singular)
  );

  // ------------------------------------------------------- encoding part
  always_comb begin
    enc_valid = (phase_q == S_ENC);
    enc_sym   = rd_data[2*cnt_q[WHL-1:0] +: 2];
  end

  rsc_encoder u_rsc (
    .clk, .rst_n,
    .load(phase_q == S_WAIT && zs_done), .load_state(s0),
    .in_valid(enc_valid), .u0(enc_sym[0]), .u1(enc_sym[1]),
    .out_valid, .y_sys0, .y_sys1, .y_par, .state(rsc_state)
  );

  // ----------------------------------------------------------- controller
  assign len_ok = frame_len != '0 && 32'(frame_len) <= NMAX
                  && (32'(frame_len) % E) != 0;
  assign busy   = phase_q != S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q    <= S_IDLE;
      n_q        <= '0;
      cnt_q      <= '0;
      k_q        <= '0;
      nmod_q     <= '0;
      rd_valid_q <= 1'b0;
      done       <= 1'b0;
      len_err    <= 1'b0;
      tb_ok      <= 1'b0;
      circ_state <= '0;
      szs        <= '0;
    end else begin
      done       <= 1'b0;
      len_err    <= 1'b0;
      rd_valid_q <= 1'b0;
      unique case (phase_q)
        S_IDLE: if (start) begin
          if (len_ok) begin
            n_q     <= frame_len;
            k_q     <= LW'((32'(frame_len) + WH - 1) / WH);
            nmod_q  <= 3'(32'(frame_len) % E);
            cnt_q   <= '0;
            phase_q <= S_ACC;
          end else begin
            len_err <= 1'b1;
          end
        end
        S_ACC: begin
          rd_valid_q <= 1'b1;
          cnt_q      <= next_cnt;
          if (next_cnt == k_q) phase_q <= S_WAIT;
        end
        S_WAIT: if (zs_done) begin
          circ_state <= s0;
          szs        <= zs_state;
          cnt_q      <= '0;
          phase_q    <= S_ENC;
        end
        S_ENC: begin
          cnt_q <= next_cnt;
          if (next_cnt == n_q) phase_q <= S_FIN;
        end
        S_FIN: begin
          tb_ok   <= (rsc_state == circ_state);
          done    <= 1'b1;
          phase_q <= S_IDLE;
        end
        default: phase_q <= S_IDLE;
      endcase
    end
  end

  // The lookup must never be asked for a length whose matrix is singular.
  a_lut: assert property (@(posedge clk) disable iff (!rst_n)
                          (phase_q == S_WAIT && zs_done) |-> !lut_singular);
  // The solver is idle whenever the controller is.
  a_zs:  assert property (@(posedge clk) disable iff (!rst_n)
                          (phase_q == S_IDLE) |-> !zs_busy);

endmodule
