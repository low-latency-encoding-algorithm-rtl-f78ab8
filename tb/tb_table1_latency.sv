// tb_table1_latency: latency workload for the two memory widths.
// For frame lengths from 24 to 2399 symbols, runs the tail-biting encoder
// with 16-bit and with 32-bit input words and measures (a) the cycles from
// 'start' to the first encoded symbol, which is the zero-state and lookup
// phase, and (b) the cycles from 'start' to 'done'. Phase (a) must take
// ceil(N/8) + 5 or ceil(N/16) + 5 cycles, i.e. about N/8 and N/16 as in the
// published latency figures of the method (1 + 1/8 and 1 + 1/16 of the N-cycle
// encoding pass, against 2 for a serial first pass). The measured total
// latency divided by N is printed for each case. Outputs are also checked
// against the reference trellis.
module tb_table1_latency;
  import ctc_pkg::*;
  import tb_ref_pkg::*;

  localparam int NMAX = 2400;
  localparam int LW   = 12;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          start[2] = '{1'b0, 1'b0};
  logic [LW-1:0] frame_len = '0;
  logic          wr_en16 = 1'b0, wr_en32 = 1'b0;
  logic [8:0]    wr_addr16 = '0;
  logic [7:0]    wr_addr32 = '0;
  logic [15:0]   wr_data16 = '0;
  logic [31:0]   wr_data32 = '0;
  logic          busy[2], done[2], len_err[2], tb_ok[2], out_valid[2];
  logic          ys0[2], ys1[2], yp[2];
  state_t        circ[2], zsv[2];
  int            checks = 0, failures = 0;

  tailbiting_encoder #(.W(16), .NMAX(NMAX)) dut16 (
    .clk, .rst_n, .wr_en(wr_en16), .wr_addr(wr_addr16), .wr_data(wr_data16),
    .start(start[0]), .frame_len, .busy(busy[0]), .done(done[0]), .len_err(len_err[0]),
    .tb_ok(tb_ok[0]), .circ_state(circ[0]), .szs(zsv[0]),
    .out_valid(out_valid[0]), .y_sys0(ys0[0]), .y_sys1(ys1[0]), .y_par(yp[0]));

  tailbiting_encoder #(.W(32), .NMAX(NMAX)) dut32 (
    .clk, .rst_n, .wr_en(wr_en32), .wr_addr(wr_addr32), .wr_data(wr_data32),
    .start(start[1]), .frame_len, .busy(busy[1]), .done(done[1]), .len_err(len_err[1]),
    .tb_ok(tb_ok[1]), .circ_state(circ[1]), .szs(zsv[1]),
    .out_valid(out_valid[1]), .y_sys0(ys0[1]), .y_sys1(ys1[1]), .y_par(yp[1]));

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s N=%0d at %0t", what, frame_len, $time);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int d, int n);
    logic [1:0] syms [];
    int         wh, k, cyc, got, first_cyc, s0;
    logic [2:0] st;
    wh = d ? 16 : 8;
    k  = (n + wh - 1) / wh;
    syms = new[n];
    for (int i = 0; i < n; i++) syms[i] = 2'($urandom);
    for (int i = 0; i < k; i++) begin
      logic [31:0] word;
      word = '0;
      for (int j = 0; j < wh; j++) if (i*wh + j < n) word[2*j +: 2] = syms[i*wh + j];
      if (d == 0) begin wr_en16 = 1'b1; wr_addr16 = 9'(i); wr_data16 = word[15:0]; end
      else        begin wr_en32 = 1'b1; wr_addr32 = 8'(i); wr_data32 = word;       end
      @(negedge clk);
    end
    wr_en16 = 1'b0; wr_en32 = 1'b0;
    s0 = ref_circ(syms, n);
    st = 3'(s0);
    frame_len = LW'(n);
    start[d] = 1'b1;
    @(negedge clk);
    start[d] = 1'b0;
    cyc = 1; got = 0; first_cyc = -1;
    while (!done[d] && cyc < 4 * n + 100) begin
      if (out_valid[d]) begin
        if (first_cyc < 0) first_cyc = cyc;
        check(yp[d] == ref_parity(st, syms[got][0], syms[got][1]) &&
              ys0[d] == syms[got][0] && ys1[d] == syms[got][1], "encoded symbol");
        st = ref_step(st, syms[got][0], syms[got][1]);
        got++;
      end
      @(negedge clk);
      cyc++;
    end
    check(got == n && tb_ok[d], "frame encoded and tail-biting");
    check(first_cyc == k + 5, "zero-state phase takes ceil(N/(W/2)) + 5 cycles");
    check(cyc == n + k + 5, "total latency N + ceil(N/(W/2)) + 5 cycles");
    $display("W=%0d N=%0d: zero-state phase %0d cycles (serial: %0d), total %0d cycles = %0d.%03d x N",
             wh * 2, n, first_cyc, n, cyc, cyc / n, (cyc % n) * 1000 / n);
    @(negedge clk);
  endtask

  initial begin
    int lens [6] = '{24, 240, 480, 960, 1920, 2399};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    foreach (lens[i]) begin
      run(0, lens[i]);
      run(1, lens[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
