// tb_frame_buffer: writes random words at random addresses and reads them
// back, checking the one-cycle read latency against a shadow array, and
// that addresses at or beyond the depth read as zero.
module tb_frame_buffer;

  localparam int W = 16, DEPTH = 300, AW = 9;

  logic          clk = 1'b0;
  logic          wr_en = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0]  wr_data = '0, rd_data;
  logic [W-1:0]  shadow [DEPTH];
  logic          written [DEPTH];
  logic [W-1:0]  prev;
  int            checks = 0, failures = 0;

  frame_buffer #(.W(W), .DEPTH(DEPTH), .AW(AW)) dut (.*);

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
    for (int a = 0; a < DEPTH; a++) written[a] = 1'b0;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = W'($urandom);
      shadow[a] = wr_data; written[a] = 1'b1;
      @(negedge clk);
    end
    prev = rd_data;
    for (int i = 0; i < 5000; i++) begin
      int a;
      a = $urandom_range(0, DEPTH + 20);
      wr_en = ($urandom_range(0, 3) == 0);
      wr_addr = AW'($urandom_range(0, DEPTH - 1));
      wr_data = W'($urandom);
      rd_addr = AW'(a);
      #1;
      check(rd_data == prev, "read data changes only at the clock edge");
      @(negedge clk);
      prev = rd_data;
      if (a < DEPTH) check(rd_data == shadow[a], "read data");
      else           check(rd_data == '0, "out-of-range read is zero");
      if (wr_en) shadow[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
