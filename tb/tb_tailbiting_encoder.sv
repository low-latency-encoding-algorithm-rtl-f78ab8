// tb_tailbiting_encoder: end-to-end check of the low-latency tail-biting
// constituent encoder for a 16-bit and a 32-bit frame memory.
// For each random frame the expected circulation state is found by brute
// force (the one start state that the reference trellis brings back to
// itself), and the expected codeword by encoding serially from it. The test
// checks every output symbol, the reported circulation state and zero-state
// value, the 'tb_ok' end check, refusal of lengths with N mod 7 = 0, and the
// latency: first symbol K + 5 cycles after 'start', K = ceil(N/(W/2)), with
// N symbols following back to back.
module tb_tailbiting_encoder;
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
  int            n_refused = 0, n_partial = 0;

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

  // Encode one frame on encoder d (0: 16-bit, 1: 32-bit).
  task automatic run(int d, int n, logic [1:0] syms []);
    int     wh, k, s0, cyc, got, first_cyc;
    logic [2:0] st;
    wh = d ? 16 : 8;
    k  = (n + wh - 1) / wh;
    // write the frame
    for (int i = 0; i < k; i++) begin
      logic [31:0] word;
      word = '0;
      for (int j = 0; j < wh; j++)
        if (i*wh + j < n) word[2*j +: 2] = syms[i*wh + j];
      if (d == 0) begin wr_en16 = 1'b1; wr_addr16 = 9'(i); wr_data16 = word[15:0]; end
      else        begin wr_en32 = 1'b1; wr_addr32 = 8'(i); wr_data32 = word;       end
      @(negedge clk);
    end
    wr_en16 = 1'b0; wr_en32 = 1'b0;
    if (n % wh != 0) n_partial++;
    s0 = ref_circ(syms, n);
    frame_len = LW'(n);
    start[d] = 1'b1;
    @(negedge clk);
    start[d] = 1'b0;
    if (n % 7 == 0) begin
      check(len_err[d] && !busy[d], "length with N mod 7 = 0 refused");
      n_refused++;
      return;
    end
    check(s0 >= 0, "reference has a unique circulation state");
    st = 3'(s0);
    cyc = 1; got = 0; first_cyc = -1;
    while (!done[d] && cyc < 4 * n + 100) begin
      if (out_valid[d]) begin
        if (first_cyc < 0) first_cyc = cyc;
        check(ys0[d] == syms[got][0] && ys1[d] == syms[got][1], "systematic bits");
        check(yp[d] == ref_parity(st, syms[got][0], syms[got][1]), "parity bit");
        check(cyc == first_cyc + got, "one symbol per cycle");
        st = ref_step(st, syms[got][0], syms[got][1]);
        got++;
      end
      @(negedge clk);
      cyc++;
    end
    check(done[d], "done");
    check(got == n, "symbol count");
    check(first_cyc == k + 5, "first symbol K + 5 cycles after start");
    check(st == 3'(s0), "reference ends in the circulation state");
    check(circ[d] == 3'(s0), "circulation state");
    check(zsv[d] == ref_run(3'd0, syms, n), "zero-state value");
    check(tb_ok[d], "tail-biting end check");
    @(negedge clk);
  endtask

  initial begin
    logic [1:0] syms [];
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 160; t++) begin
      if (t < 50)       n = t + 1;
      else if (t < 53)  n = NMAX - (t - 50);
      else              n = $urandom_range(1, 400);
      syms = new[n];
      for (int i = 0; i < n; i++) syms[i] = 2'($urandom);
      run(0, n, syms);
      run(1, n, syms);
    end
    check(n_refused > 0, "a refused length occurred");
    check(n_partial > 0, "a partial last word occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
