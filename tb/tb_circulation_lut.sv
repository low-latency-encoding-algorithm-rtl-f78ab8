// tb_circulation_lut: for every N mod 7 and every zero-state value, checks
// that the returned S_0 satisfies the tail-biting condition: starting from
// S_0 and applying (N mod 7) zero-input steps of the reference trellis, then
// adding the zero-state value, gives S_0 back. Also checks 'singular' for
// N mod 7 = 0 and that S_0 differs for different zero-state values.
module tb_circulation_lut;
  import ctc_pkg::*;
  import tb_ref_pkg::*;

  logic [2:0] n_mod7;
  state_t     szs, s0;
  logic       singular;
  int         checks = 0, failures = 0;

  circulation_lut dut (.n_mod7, .szs, .s0, .singular);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s n=%0d szs=%0d s0=%0d", what, n_mod7, szs, s0);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] t;
    logic [7:0] seen;
    for (int n = 0; n < 7; n++) begin
      seen = '0;
      for (int s = 0; s < 8; s++) begin
        n_mod7 = 3'(n); szs = 3'(s);
        #1;
        if (n == 0) begin
          check(singular, "singular flag for N mod 7 = 0");
        end else begin
          check(!singular, "no singular flag");
          t = s0;
          for (int z = 0; z < n; z++) t = ref_step(t, 1'b0, 1'b0);
          check((t ^ szs) == s0, "tail-biting condition");
          seen[s0] = 1'b1;
        end
      end
      if (n != 0) check(seen == 8'hff, "lookup is a permutation");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
