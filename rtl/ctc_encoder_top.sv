// ctc_encoder_top: duo-binary turbo encoder built from two low-latency
// tail-biting constituent encoders working in parallel.
//
// A turbo code concatenates two copies of the same RSC code in parallel:
// the first encodes the frame in natural order, the second the same frame
// after the turbo interleaver. Each copy here is a tailbiting_encoder with
// its own frame buffer, zero-state solver and circulation-state lookup, so
// both find their circulation states in ceil(N/(W/2)) + 2 cycles and then
// encode side by side, one symbol per cycle.
//
// The interleaver itself is not part of this design: the interleaved frame
// is written by the producer into the second encoder's buffer through the
// il_wr_* port (same word format as the natural frame: bit 2j = u^0,
// bit 2j+1 = u^1 of symbol j). Any permutation, including a swap of u^0 and
// u^1 inside a symbol, can be applied that way.
//
// Interface and timing: write both frames, then pulse 'start' with
// 'frame_len' = N. Per cycle the outputs give the systematic couple
// (sys_a, sys_b) of the natural frame and the parities par_1 (natural) and
// par_2 (interleaved), with 'out_valid'; the first symbol appears K + 5
// cycles after 'start' (K = ceil(N/(W/2))). 'done' pulses once after the last
// symbol; 'tb_ok' then tells whether both codes ended in their start states.
// 'len_err' pulses when N is refused (N = 0, N > NMAX or N mod 7 = 0).
// The parallel concatenation follows the published method; everything about ports
// and the shared control is this design's own.
module ctc_encoder_top
  import ctc_pkg::*;
#(
  parameter int W     = 16,
  parameter int NMAX  = 2400,
  parameter int LW    = $clog2(NMAX + 1),
  parameter int DEPTH = (NMAX + W/2 - 1) / (W/2),
  parameter int AW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic          il_wr_en,
  input  logic [AW-1:0] il_wr_addr,
  input  logic [W-1:0]  il_wr_data,
  input  logic          start,
  input  logic [LW-1:0] frame_len,
  output logic          busy,
  output logic          done,
  output logic          len_err,
  output logic          tb_ok,
  output state_t        circ_state_1,
  output state_t        circ_state_2,
  output logic          out_valid,
  output logic          sys_a,
  output logic          sys_b,
  output logic          par_1,
  output logic          par_2
);

  logic   busy1, busy2, done1, done2, err1, err2, ok1, ok2, v1, v2;
  logic   s1a, s1b, s2a, s2b;
  state_t zs1, zs2;

  tailbiting_encoder #(.W(W), .NMAX(NMAX), .LW(LW), .DEPTH(DEPTH), .AW(AW)) u_enc1 (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .start, .frame_len,
    .busy(busy1), .done(done1), .len_err(err1), .tb_ok(ok1),
    .circ_state(circ_state_1), .szs(zs1),
    .out_valid(v1), .y_sys0(s1a), .y_sys1(s1b), .y_par(par_1)
  );

  tailbiting_encoder #(.W(W), .NMAX(NMAX), .LW(LW), .DEPTH(DEPTH), .AW(AW)) u_enc2 (
    .clk, .rst_n, .wr_en(il_wr_en), .wr_addr(il_wr_addr), .wr_data(il_wr_data),
    .start, .frame_len,
    .busy(busy2), .done(done2), .len_err(err2), .tb_ok(ok2),
    .circ_state(circ_state_2), .szs(zs2),
    .out_valid(v2), .y_sys0(s2a), .y_sys1(s2b), .y_par(par_2)
  );

  // Both encoders see the same control and run in lock step; the second
  // one's systematic bits are the interleaved copy and are not transmitted.
  assign busy      = busy1 | busy2;
  assign done      = done1;
  assign len_err   = err1;
  assign tb_ok     = ok1 & ok2;
  assign out_valid = v1;
  assign sys_a     = s1a;
  assign sys_b     = s1b;

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               (v1 == v2) && (done1 == done2) && (err1 == err2));

endmodule
