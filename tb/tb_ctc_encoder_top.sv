// tb_ctc_encoder_top: end-to-end test of the duo-binary turbo encoder at its
// default parameters (16-bit frame memory, frames up to 2400 symbols).
// Each frame is random; the interleaved copy is made here with a random
// permutation of the symbols and a random swap of the two bits of some
// symbols, standing in for the turbo interleaver. Both parity streams and the
// systematic stream are compared with the reference trellis started from the
// brute-force circulation state of each copy. The test runs frames of every
// length class and counts how often each mechanism of the design occurred:
// a partial last word, a non-zero barrel rotation, each N mod 7 class, a
// refused length, the largest frame and the tail-biting end check. One that
// never occurs counts as a failure.
module tb_ctc_encoder_top;
  import ctc_pkg::*;
  import tb_ref_pkg::*;

  localparam int NMAX = 2400;
  localparam int W    = 16;
  localparam int WH   = W / 2;
  localparam int LW   = 12;
  localparam int AW   = 9;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          wr_en = 1'b0, il_wr_en = 1'b0, start = 1'b0;
  logic [AW-1:0] wr_addr = '0, il_wr_addr = '0;
  logic [W-1:0]  wr_data = '0, il_wr_data = '0;
  logic [LW-1:0] frame_len = '0;
  logic          busy, done, len_err, tb_ok, out_valid, sys_a, sys_b, par_1, par_2;
  state_t        circ_state_1, circ_state_2;
  int            checks = 0, failures = 0;
  int            cnt_partial = 0, cnt_rot = 0, cnt_refused = 0, cnt_max = 0, cnt_tbok = 0;
  int            cnt_mod [7] = '{0, 0, 0, 0, 0, 0, 0};

  ctc_encoder_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s N=%0d at %0t", what, frame_len, $time);
    end
  endtask

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_frames(int n, logic [1:0] a [], logic [1:0] b []);
    for (int i = 0; i < (n + WH - 1) / WH; i++) begin
      wr_en = 1'b1; il_wr_en = 1'b1;
      wr_addr = AW'(i); il_wr_addr = AW'(i);
      wr_data = '0; il_wr_data = '0;
      for (int j = 0; j < WH; j++)
        if (i*WH + j < n) begin
          wr_data[2*j +: 2]    = a[i*WH + j];
          il_wr_data[2*j +: 2] = b[i*WH + j];
        end
      @(negedge clk);
    end
    wr_en = 1'b0; il_wr_en = 1'b0;
  endtask

  task automatic run(int n);
    logic [1:0] a [], b [];
    int         perm [];
    int         s1, s2, cyc, got, first_cyc, k, rot;
    logic [2:0] st1, st2;
    a = new[n]; b = new[n]; perm = new[n];
    for (int i = 0; i < n; i++) begin a[i] = 2'($urandom); perm[i] = i; end
    for (int i = n - 1; i > 0; i--) begin   // Fisher-Yates shuffle
      int j, t;
      j = $urandom_range(0, i);
      t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    for (int i = 0; i < n; i++) begin
      b[i] = a[perm[i]];
      if (i % 2 == 1) b[i] = {b[i][0], b[i][1]};
    end
    write_frames(n, a, b);
    k   = (n + WH - 1) / WH;
    rot = ((n - 1) - ((n - 1) / WH) * (WH % 7)) % 7;
    if (rot < 0) rot += 7;
    frame_len = LW'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    if (n % 7 == 0) begin
      check(len_err && !busy, "N mod 7 = 0 refused");
      cnt_refused++;
      return;
    end
    check(!len_err && busy, "frame accepted");
    cnt_mod[n % 7]++;
    if (n % WH != 0) cnt_partial++;
    if (rot != 0)    cnt_rot++;
    if (n == NMAX)   cnt_max++;
    s1 = ref_circ(a, n); s2 = ref_circ(b, n);
    st1 = 3'(s1); st2 = 3'(s2);
    cyc = 1; got = 0; first_cyc = -1;
    while (!done && cyc < 4 * n + 100) begin
      if (out_valid) begin
        if (first_cyc < 0) first_cyc = cyc;
        check(sys_a == a[got][0] && sys_b == a[got][1], "systematic couple");
        check(par_1 == ref_parity(st1, a[got][0], a[got][1]), "parity 1");
        check(par_2 == ref_parity(st2, b[got][0], b[got][1]), "parity 2");
        st1 = ref_step(st1, a[got][0], a[got][1]);
        st2 = ref_step(st2, b[got][0], b[got][1]);
        got++;
      end
      @(negedge clk);
      cyc++;
    end
    check(got == n, "all symbols encoded");
    check(first_cyc == k + 5, "first symbol K + 5 cycles after start");
    check(cyc == k + n + 5, "done one cycle after the last symbol");
    check(circ_state_1 == st1 && circ_state_2 == st2, "circulation states");
    check(tb_ok, "both codes end in their start states");
    if (tb_ok) cnt_tbok++;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(NMAX);                      // one frame of the largest size
    for (int n = 1; n <= 60; n++) run(n);
    for (int t = 0; t < 40; t++) run($urandom_range(61, NMAX));
    check(cnt_partial > 0, "partial last word occurred");
    check(cnt_rot > 0, "non-zero barrel rotation occurred");
    check(cnt_refused > 0, "refused length occurred");
    check(cnt_max > 0, "largest frame occurred");
    check(cnt_tbok > 0, "tail-biting end check passed");
    for (int m = 1; m < 7; m++) check(cnt_mod[m] > 0, "every N mod 7 class occurred");
    $display("mechanisms: partial=%0d rotation=%0d refused=%0d max=%0d tb_ok=%0d",
             cnt_partial, cnt_rot, cnt_refused, cnt_max, cnt_tbok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
