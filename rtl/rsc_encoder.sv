// rsc_encoder: duo-binary recursive systematic convolutional encoder, the
// constituent code of the turbo encoder (three delay elements, one symbol of
// two bits per clock).
//
// Each accepted symbol (u0, u1) advances the state by S' = A*S + B*u and
// produces the codeword bits y = (u0, u1, s1 ^ s2 ^ u0 ^ u1): the two
// systematic bits and the parity bit of the encoder's parity adder, which sums
// the first adder's output (u0^u1^s1^s3), s2 and s3. The state can be loaded
// before a frame, which a tail-biting encoder uses to start from the
// circulation state.
//
// Interface and timing: 'load' (priority over 'in_valid') writes 'load_state'
// into the state register. A symbol presented with 'in_valid' is encoded at
// the next rising edge: the registered outputs y_* and 'out_valid' are valid
// one cycle after the input. 'state' is the current state register.
// The state equations and the parity tap come from the published method; the load
// port, the output register and the reset to state 0 are this design's own.
module rsc_encoder
  import ctc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  state_t load_state,
  input  logic   in_valid,
  input  logic   u0,
  input  logic   u1,
  output logic   out_valid,
  output logic   y_sys0,
  output logic   y_sys1,
  output logic   y_par,
  output state_t state
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= '0;
      out_valid <= 1'b0;
      y_sys0    <= 1'b0;
      y_sys1    <= 1'b0;
      y_par     <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (load) begin
        state <= load_state;
      end else if (in_valid) begin
        state     <= next_state(state, u0, u1);
        out_valid <= 1'b1;
        y_sys0    <= u0;
        y_sys1    <= u1;
        y_par     <= parity(state, u0, u1);
      end
    end
  end

endmodule
