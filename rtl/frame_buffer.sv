// frame_buffer: frame memory holding the information symbols of one frame
// as W-bit words, the memory the encoder reads its input from.
//
// One write port for the producer and one read port for the encoder. The
// read is synchronous: 'rd_data' shows the word at the address presented in
// the previous cycle. An address at or beyond DEPTH reads as zero.
// Word format: bit 2j = u^0, bit 2j+1 = u^1 of symbol j of the word.
// The published method only says that input data are stored in a memory with a 16- or
// 32-bit bus and read from it by the encoder; depth and ports are this
// design's own.
module frame_buffer #(
  parameter int W     = 16,
  parameter int DEPTH = 300,
  parameter int AW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && 32'(wr_addr) < DEPTH) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (32'(rd_addr) < DEPTH) rd_data <= mem[rd_addr];
    else                      rd_data <= '0;
  end

endmodule
