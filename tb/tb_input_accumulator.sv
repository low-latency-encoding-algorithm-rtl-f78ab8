// tb_input_accumulator: feeds random words into two accumulators (W/2 = 8,
// the 16-bit case, and W/2 = 16, the 32-bit case) and checks after every
// word that position p holds the XOR of all bits whose symbol index n
// satisfies n mod 7 = ((k-1)*SH + p) mod 7, with k words seen so far.
// The expected sums are formed directly from the symbol indices.
module tb_input_accumulator;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        en = 1'b0, first = 1'b0;
  logic [7:0]  din8 = '0;
  logic [15:0] din16 = '0;
  logic [6:0]  acc8, acc16;
  int          checks = 0, failures = 0;

  input_accumulator #(.WH(8),  .E(7)) dut8  (.clk, .rst_n, .en, .first, .din(din8),  .acc(acc8));
  input_accumulator #(.WH(16), .E(7)) dut16 (.clk, .rst_n, .en, .first, .din(din16), .acc(acc16));

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] grp8, grp16;   // XOR per residue class n mod 7
    logic [6:0] exp8, exp16;
    int         k;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int frame = 0; frame < 60; frame++) begin
      grp8 = '0; grp16 = '0;
      k = 0;
      for (int w = 0; w < 1 + $urandom_range(0, 40); w++) begin
        if ($urandom_range(0, 3) == 0) begin  // idle cycle: nothing changes
          logic [6:0] h8, h16;
          h8 = acc8; h16 = acc16;
          en = 1'b0;
          @(negedge clk);
          if (k > 0) check(acc8 == h8 && acc16 == h16, "hold when idle");
        end
        din8 = 8'($urandom); din16 = 16'($urandom);
        en = 1'b1; first = (k == 0);
        for (int j = 0; j < 8;  j++) grp8[(k*8 + j) % 7]   ^= din8[j];
        for (int j = 0; j < 16; j++) grp16[(k*16 + j) % 7] ^= din16[j];
        @(negedge clk);
        en = 1'b0;
        for (int p = 0; p < 7; p++) begin
          exp8[p]  = grp8[(k*1 + p) % 7];
          exp16[p] = grp16[(k*2 + p) % 7];
        end
        check(acc8 == exp8, "W=16 accumulator contents");
        check(acc16 == exp16, "W=32 accumulator contents");
        k++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
