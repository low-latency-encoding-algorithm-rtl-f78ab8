// tb_zero_state_solver: runs random frames through two solvers, one taking
// 16 bits per cycle and one 32, and compares the result with the state the
// reference trellis reaches from state 0 after encoding the frame serially.
// Frame lengths cover full and partial last words and every N mod 7 and
// N mod (W/2); words arrive back to back or with random gaps. For back-to-back
// frames the latency is checked: 'done' must rise K + 1 cycles after the
// first word is presented, K = ceil(N/(W/2)) (the method targets N/8 and N/16 cycles
// instead of N).
module tb_zero_state_solver;
  import ctc_pkg::*;
  import tb_ref_pkg::*;

  localparam int NMAX = 2400;
  localparam int LW   = 12;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          start = 1'b0, in_valid = 1'b0;
  logic [LW-1:0] frame_len = '0;
  logic [15:0]   word16 = '0;
  logic [31:0]   word32 = '0;
  logic          busy16, busy32, done16, done32;
  state_t        szs16, szs32;
  int            checks = 0, failures = 0;

  zero_state_solver #(.W(16), .NMAX(NMAX), .LW(LW)) dut16 (
    .clk, .rst_n, .start, .frame_len, .in_valid, .in_word(word16),
    .busy(busy16), .done(done16), .szs(szs16));
  zero_state_solver #(.W(32), .NMAX(NMAX), .LW(LW)) dut32 (
    .clk, .rst_n, .start, .frame_len, .in_valid, .in_word(word32),
    .busy(busy32), .done(done32), .szs(szs32));

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s N=%0d at %0t", what, frame_len, $time);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one frame through the solver of width w (16 or 32).
  task automatic run(int w, int n, logic [1:0] syms [], bit gaps);
    int     wh, k, lat;
    state_t expv;
    wh = w / 2;
    k  = (n + wh - 1) / wh;
    expv = ref_run(3'd0, syms, n);
    frame_len = LW'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 0;
    for (int i = 0; i < k; i++) begin
      while (gaps && $urandom_range(0, 2) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
        lat++;
      end
      in_valid = 1'b1;
      for (int j = 0; j < wh; j++) begin
        // symbols past the frame carry random bits: the solver must ignore them
        logic [1:0] s;
        s = (i*wh + j < n) ? syms[i*wh + j] : 2'($urandom);
        if (w == 16) word16[2*j +: 2] = s;
        else         word32[2*j +: 2] = s;
      end
      @(negedge clk);
      lat++;
    end
    in_valid = 1'b0;
    while (!(w == 16 ? done16 : done32)) begin
      @(negedge clk);
      lat++;
      if (lat > 4 * k + 20) break;
    end
    if (w == 16) check(szs16 == expv, "W=16 zero-state solution");
    else         check(szs32 == expv, "W=32 zero-state solution");
    if (!gaps) check(lat == k + 1, "latency K + 1 cycles after the first word");
    @(negedge clk);
    check(!done16 && !done32, "done is a single pulse");
  endtask

  initial begin
    logic [1:0] syms [];
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 400; t++) begin
      if (t < 64)       n = t + 1;                       // all small lengths
      else if (t < 70)  n = NMAX - (t - 64);              // the largest ones
      else              n = $urandom_range(1, 600);
      syms = new[n];
      for (int i = 0; i < n; i++) syms[i] = 2'($urandom);
      run(16, n, syms, t >= 200);
      run(32, n, syms, t >= 200);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
