// tb_rsc_encoder: checks the constituent RSC encoder against the reference
// adder model, symbol by symbol, with random loads of the start state,
// random input and idle cycles. Also checks the one-cycle output latency.
module tb_rsc_encoder;
  import ctc_pkg::*;
  import tb_ref_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   load = 1'b0, in_valid = 1'b0, u0 = 1'b0, u1 = 1'b0;
  state_t load_state = '0, state;
  logic   out_valid, y_sys0, y_sys1, y_par;
  int     checks = 0, failures = 0;

  rsc_encoder dut (.*);

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
    logic [2:0] ref_s;
    logic       e0, e1, ep;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(state == 3'd0, "reset state");
    ref_s = '0;
    for (int i = 0; i < 4000; i++) begin
      int r;
      r = $urandom_range(0, 9);
      load = 1'b0; in_valid = 1'b0;
      if (r == 0) begin
        load_state = state_t'($urandom);
        load       = 1'b1;
        @(negedge clk);
        load = 1'b0;
        check(state == load_state, "load");
        ref_s = state;
      end else if (r == 1) begin
        @(negedge clk);
        check(!out_valid, "no output when idle");
        check(state == ref_s, "state held when idle");
      end else begin
        u0 = 1'($urandom); u1 = 1'($urandom); in_valid = 1'b1;
        e0 = u0; e1 = u1; ep = ref_parity(ref_s, u0, u1);
        ref_s = ref_step(ref_s, u0, u1);
        @(negedge clk);
        in_valid = 1'b0;
        check(out_valid, "out_valid one cycle after input");
        check(y_sys0 == e0 && y_sys1 == e1, "systematic bits");
        check(y_par == ep, "parity bit");
        check(state == ref_s, "next state");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
