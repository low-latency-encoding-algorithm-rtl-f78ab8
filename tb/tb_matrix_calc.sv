// tb_matrix_calc: checks the barrel rotation and the fixed XOR network of
// the matrix calculation for random accumulator contents and every rotation.
// The expected state is formed by applying the reference trellis step to the
// rotated accumulator bits: position p contributes A^((7-p) mod 7) B u,
// which is the state reached from 0 by input u followed by (7-p) mod 7 zero
// inputs (A^7 = I makes 7 zero steps the identity).
module tb_matrix_calc;
  import ctc_pkg::*;
  import tb_ref_pkg::*;

  logic [6:0] acc0, acc1;
  logic [2:0] rot;
  state_t     szs;
  int         checks = 0, failures = 0;

  matrix_calc dut (.acc0, .acc1, .rot, .szs);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s rot=%0d acc0=%b acc1=%b got=%0d", what, rot, acc0, acc1, szs);
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
    logic [2:0] expv, t;
    int         q;
    for (int i = 0; i < 3000; i++) begin
      acc0 = 7'($urandom); acc1 = 7'($urandom); rot = 3'($urandom_range(0, 6));
      if (i < 14) begin  // single-bit inputs first: one product at a time
        acc0 = (i < 7) ? 7'(1 << i) : '0;
        acc1 = (i < 7) ? '0 : 7'(1 << (i - 7));
      end
      #1;
      expv = '0;
      for (int p = 0; p < 7; p++) begin
        q = (p + rot) % 7;
        t = ref_step(3'd0, acc0[q], acc1[q]);
        for (int z = 0; z < (7 - p) % 7; z++) t = ref_step(t, 1'b0, 1'b0);
        expv ^= t;
      end
      check(szs == expv, "zero-state result");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
