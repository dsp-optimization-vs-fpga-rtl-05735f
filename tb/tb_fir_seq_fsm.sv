// tb_fir_seq_fsm: runs the controller with a pointer model (counted here,
// not the pointer block) that raises CMP after TAPS enables, and random
// x_valid. Each clock the state and all six control outputs are compared
// with the expected table for that state, and the next state with the
// published transitions. Also counts, per sample, the ES cycles (must be 8)
// and the clocks from INIT to INIT when a sample is waiting (must be 18).
module tb_fir_seq_fsm;
  import fir_pkg::*;
  localparam int TAPS = 8;

  logic clk = 1'b0;
  logic rst, x_valid, cmp;
  logic load, rsp, ep, rsa, es, eo;
  seq_state_t state;

  int checks = 0, failures = 0;
  int kmod = 0;
  int es_count = 0, cyc = 0, samples = 0, waits = 0, loops = 0;
  seq_state_t exp_state;
  logic l_rsp, l_ep, l_es;

  fir_seq_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("t=%0t state=%s: %s", $time, state.name(), what);
    end
  endtask

  initial begin
    rst = 1'b1; x_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    exp_state = S_IDLE;
    for (int n = 0; n < 3000; n++) begin
      x_valid = (n < 400) ? 1'b1 : ($urandom_range(0, 2) == 0);
      cmp = (kmod == TAPS - 1);
      #1;
      check(state == exp_state, "state differs from the model");
      case (exp_state)
        S_IDLE: check({load, rsp, ep, rsa, es, eo} == 6'b010100, "IDLE controls");
        S_INIT: check({load, rsp, ep, rsa, es, eo} == {x_valid, 5'b10100}, "INIT controls");
        S_CMPT: check({load, rsp, ep, rsa, es, eo} == 6'b000010, "CMPT controls");
        S_TEST: check({load, rsp, ep, rsa, es, eo} == {2'b00, !cmp, 3'b000}, "TEST controls");
        S_DONE: check({load, rsp, ep, rsa, es, eo} == 6'b000001, "DONE controls");
        default: check(1'b0, "illegal state");
      endcase
      l_rsp = rsp; l_ep = ep; l_es = es;
      @(posedge clk);
      #1;
      // pointer model, from the controls sampled before the edge
      if (l_rsp) kmod = 0; else if (l_ep) kmod++;
      if (l_es) es_count++;
      cyc++;
      case (exp_state)
        S_IDLE: exp_state = S_INIT;
        S_INIT: if (x_valid) begin exp_state = S_CMPT; cyc = 1; es_count = 0; end
                else waits++;
        S_CMPT: exp_state = S_TEST;
        S_TEST: if (cmp) exp_state = S_DONE; else begin exp_state = S_CMPT; loops++; end
        S_DONE: begin
          exp_state = S_INIT;
          samples++;
          check(es_count == TAPS, $sformatf("%0d ES cycles in a sample", es_count));
          check(cyc == 2 * TAPS + 2, $sformatf("%0d clocks from INIT to INIT", cyc));
        end
        default: ;
      endcase
    end
    check(samples > 50, "too few samples");
    check(waits > 0, "INIT never waited");
    check(loops > 0, "TEST never looped");
    $display("samples=%0d waits=%0d loops=%0d", samples, waits, loops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
