// tb_fir_top: end-to-end run of both filters at their default size (8 taps,
// 16-bit samples, 32-bit results, default coefficients). The same 40-sample
// block (the evaluation length used for the timing comparison) plus 7 lead-in
// samples is streamed into each filter: into the parallel one at one sample
// per clock, into the sequential one as fast as it accepts them. Every
// result is compared with a direct convolution computed here, and the two
// filters' results for the 40 samples are compared with each other.
// Counted and required at least once: sequential INIT waits for a sample,
// TEST looping back to CMPT (CMP low), TEST leaving to DONE (CMP high),
// the parallel buffer becoming full. Timing checks: the parallel filter
// produces the 40 results in 40 consecutive clocks; the sequential filter
// spends 8 x 40 = 320 multiply-accumulate cycles on them, and 18 clocks per
// sample.
module tb_fir_top;
  import fir_pkg::*;
  localparam int NS = 40;
  localparam int LEAD = 7;

  logic clk = 1'b0;
  logic rst;
  logic signed [15:0] seq_x, par_x;
  logic seq_x_valid, seq_x_ready, par_x_valid;
  logic signed [31:0] seq_y, par_y;
  logic seq_y_valid, par_y_valid, par_full;

  fir_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int b [8] = '{1, 2, 3, 4, 4, 3, 2, 1};
  int samples [LEAD + NS];
  int expected [LEAD + NS];
  int seq_res [$], par_res [$];
  int cyc = 0;
  int init_waits = 0, test_loops = 0, test_exits = 0, full_events = 0;
  int es_cycles = 0;
  int par_first = -1, par_last = -1, seq_first = -1, seq_last = -1;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (dut.u_seq.state == S_INIT && !seq_x_valid) init_waits++;
      if (dut.u_seq.state == S_TEST) begin
        if (dut.u_seq.cmp) test_exits++; else test_loops++;
      end
      if (dut.u_seq.es) es_cycles++;
      if (seq_y_valid) begin
        seq_res.push_back(int'(seq_y));
        if (seq_res.size() == LEAD + 1) seq_first = cyc;
        seq_last = cyc;
      end
      if (par_y_valid) begin
        par_res.push_back(int'(par_y));
        if (par_res.size() == 1) par_first = cyc;
        par_last = cyc;
      end
    end
  end

  logic full_d = 1'b0;
  always @(posedge clk) begin
    full_d <= par_full;
    if (par_full && !full_d) full_events++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int n = 0; n < LEAD + NS; n++) begin
      samples[n] = (n % 10 == 2) ? -32768 : (n % 10 == 7) ? 32767 : $signed(16'($urandom));
    end
    for (int n = 0; n < LEAD + NS; n++) begin
      automatic longint s = 0;
      for (int k = 0; k < 8; k++) if (n - k >= 0) s += longint'(b[k]) * samples[n - k];
      expected[n] = int'(32'(s));
    end

    rst = 1'b1; seq_x_valid = 1'b0; par_x_valid = 1'b0; seq_x = '0; par_x = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (4) @(posedge clk);   // the sequential filter waits in INIT
    fork
      begin : par_feed
        for (int n = 0; n < LEAD + NS; n++) begin
          #1 par_x = 16'(samples[n]); par_x_valid = 1'b1;
          @(posedge clk);
        end
        #1 par_x_valid = 1'b0;
      end
      begin : seq_feed
        for (int n = 0; n < LEAD + NS; n++) begin
          #1 seq_x = 16'(samples[n]); seq_x_valid = 1'b1;
          do @(posedge clk); while (!seq_x_ready);
        end
        #1 seq_x_valid = 1'b0;
      end
    join
    repeat (30) @(posedge clk);

    check(seq_res.size() == LEAD + NS, $sformatf("sequential gave %0d results", seq_res.size()));
    check(par_res.size() == NS, $sformatf("parallel gave %0d results", par_res.size()));
    for (int n = 0; n < LEAD + NS && n < seq_res.size(); n++)
      check(seq_res[n] == expected[n], $sformatf("seq y(%0d)=%0d expected %0d", n, seq_res[n], expected[n]));
    for (int n = 0; n < NS && n < par_res.size(); n++) begin
      check(par_res[n] == expected[LEAD + n], $sformatf("par y(%0d)=%0d expected %0d", LEAD + n, par_res[n], expected[LEAD + n]));
      if (LEAD + n < seq_res.size())
        check(par_res[n] == seq_res[LEAD + n], "the two filters disagree");
    end
    check(par_last - par_first + 1 == NS, $sformatf("parallel: %0d results over %0d clocks", NS, par_last - par_first + 1));
    check(es_cycles == 8 * (LEAD + NS), $sformatf("sequential: %0d multiply-accumulate cycles", es_cycles));
    check(seq_last - seq_first == 18 * (NS - 1), $sformatf("sequential: %0d clocks between result 1 and %0d", seq_last - seq_first, NS));
    check(init_waits > 0, "INIT never waited");
    check(test_loops > 0, "TEST never looped back");
    check(test_exits == LEAD + NS, $sformatf("TEST left to DONE %0d times", test_exits));
    check(full_events == 1, "parallel buffer never became full");
    $display("seq: results=%0d mac_cycles=%0d clocks_per_sample=%0d init_waits=%0d test_loops=%0d test_exits=%0d",
             seq_res.size(), es_cycles, (seq_last - seq_first) / (NS - 1), init_waits, test_loops, test_exits);
    $display("par: results=%0d clocks_for_%0d_results=%0d full_events=%0d", par_res.size(), NS, par_last - par_first + 1, full_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
