// input_accumulator: one bit plane (all u0 bits or all u1 bits) of the
// input accumulation stage of the zero-state solver.
//
// Symbol n of a frame belongs to group n mod E (E = 7, the period of A).
// Each cycle one word of WH = W/2 bits arrives; bit j of word k is symbol
// k*WH + j. Bits whose positions differ by E fall in the same group, so the
// word is first folded to E bits (for WH = 8 the eighth bit is XORed onto
// the first). Because WH is not a multiple of E, the group seen at a fixed
// position moves by SH = WH mod E from one word to the next; the register is
// therefore rotated by SH before the folded word is XORed in:
//     acc'[p] = acc[(p + SH) mod E] ^ fold[p]
// After words 0..K-1, acc[p] holds the XOR of all bits of group
// ((K-1)*SH + p) mod E. The matrix calculation undoes that rotation.
//
// Interface and timing: with 'en' high a word is accumulated at the rising
// edge; 'first' marks the first word of a frame, which replaces the old
// contents instead of being added to them. 'acc' is the register.
// Fold, rotate-by-one for W = 16 and the E-bit registers follow the published method;
// the 'first' control and reset to zero are this design's own.
module input_accumulator #(
  parameter int WH = 8,  // bits of this plane per word (W/2)
  parameter int E  = 7   // number of accumulators
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          first,
  input  logic [WH-1:0] din,
  output logic [E-1:0]  acc
);

  localparam int SH = WH % E;

  logic [E-1:0] fold;
  logic [E-1:0] rotated;

  always_comb begin
    fold = '0;
    for (int j = 0; j < WH; j++) fold[j % E] = fold[j % E] ^ din[j];
    for (int p = 0; p < E; p++) rotated[p] = acc[(p + SH) % E];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (en)    acc <= (first ? '0 : rotated) ^ fold;
  end

endmodule
