// tb_fir_par: streams random samples (full-scale values mixed in) into the
// parallel filter, one per clock, then with random gaps, and compares every
// flagged output with a direct convolution computed here, cut to 32 bits.
// Checks the timing: `full` rises at the 8th load, the first flagged output
// comes one clock after it, and 40 back-to-back samples give 40 results in
// 40 consecutive clocks. A second instance with random coefficients and 8
// taps checks the multiplier wiring (tap k with coefficient k). A third,
// 3-tap instance runs the example difference filter b = {-1, 0, 1}, whose
// result is x(n-2) - x(n).
module tb_fir_par;
  localparam int TAPS = 8;

  logic clk = 1'b0;
  logic rst;
  logic signed [15:0] x;
  logic x_valid;
  logic signed [31:0] y, yr;
  logic y_valid, yr_valid, full, fullr;

  int checks = 0, failures = 0;
  int b8 [TAPS] = '{1, 2, 3, 4, 4, 3, 2, 1};
  int br [TAPS] = '{-300, 7, 1234, -32768, 32767, 0, 55, -2};
  localparam logic [TAPS-1:0][15:0] RCOEFS = '{16'hFFFE, 16'd55, 16'd0, 16'h7FFF,
                                             16'h8000, 16'd1234, 16'd7, 16'hFED4};
  int hist [$];
  int exp_q [$], expr_q [$];
  int outs = 0, loads = 0, run = 0, best_run = 0;
  int full_at = -1, first_out_at = -1, cyc = 0;

  fir_par dut (.clk, .rst, .x, .x_valid, .y, .y_valid, .full);
  fir_par #(.COEFS(RCOEFS)) dutr (.clk, .rst, .x, .x_valid, .y(yr), .y_valid(yr_valid), .full(fullr));

  logic signed [31:0] y3;
  logic y3_valid, full3;
  int outs3 = 0;
  fir_par #(.TAPS(3), .COEFS({16'h0001, 16'h0000, 16'hFFFF})) dut3 (
    .clk, .rst, .x, .x_valid, .y(y3), .y_valid(y3_valid), .full(full3));

  always #5 clk = ~clk;

  // 3-tap check: expected values are queued at load time (below)
  int exp3_q [$];
  always @(posedge clk) begin
    if (!rst && y3_valid) begin
      automatic int e3 = (exp3_q.size() > 0) ? exp3_q.pop_front() : 0;
      checks++;
      if (int'(y3) != e3) begin failures++; $display("3-tap y=%0d expected %0d", y3, e3); end
      outs3++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int conv(int h[$], int b[]);
    longint s = 0;
    for (int k = 0; k < TAPS; k++)
      if (k < h.size()) s += longint'(b[k]) * longint'(h[h.size() - 1 - k]);
    return int'(32'(s));
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && x_valid) begin
      hist.push_back(int'(x));
      loads++;
      if (hist.size() >= 3)
        exp3_q.push_back(int'(32'(longint'(hist[hist.size() - 3]) - longint'(hist[hist.size() - 1]))));
      if (hist.size() >= TAPS) begin
        exp_q.push_back(conv(hist, b8));
        expr_q.push_back(conv(hist, br));
      end
    end
    if (!rst && full && full_at < 0) full_at = cyc;
    if (!rst && y_valid) begin
      automatic int e = (exp_q.size() > 0) ? exp_q.pop_front() : 0;
      automatic int er = (expr_q.size() > 0) ? expr_q.pop_front() : 0;
      checks += 2;
      if (int'(y) != e) begin failures++; $display("y=%0d expected %0d", y, e); end
      if (int'(yr) != er) begin failures++; $display("yr=%0d expected %0d", yr, er); end
      if (first_out_at < 0) first_out_at = cyc;
      outs++;
      run++;
      if (run > best_run) best_run = run;
    end else run = 0;
    if (!rst && (y_valid != yr_valid)) begin failures++; $display("valid mismatch"); end
  end

  initial begin
    rst = 1'b1; x_valid = 1'b0; x = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // 48 samples back to back (8 to fill, then 40 results in a row)
    for (int n = 0; n < 48; n++) begin
      x = (n % 9 == 4) ? 16'sh8000 : (n % 13 == 6) ? 16'sh7FFF : 16'($urandom);
      x_valid = 1'b1;
      @(posedge clk); #1;
      checks++;
      if (full != (n >= TAPS - 1)) begin failures++; $display("full=%0b after %0d loads", full, n + 1); end
    end
    // then with gaps
    for (int n = 0; n < 150; n++) begin
      x = 16'($urandom);
      x_valid = $urandom_range(0, 1);
      @(posedge clk); #1;
    end
    x_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (outs != loads - (TAPS - 1)) begin failures++; $display("%0d outputs for %0d loads", outs, loads); end
    checks++;
    if (first_out_at != full_at + 1) begin failures++; $display("full at %0d, first output at %0d", full_at, first_out_at); end
    checks++;
    if (best_run < 41) begin failures++; $display("longest run of outputs %0d, expected 41", best_run); end
    // reset clears full
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    checks++;
    if (full) begin failures++; $display("full after reset"); end
    checks++;
    if (outs3 != loads - 2) begin failures++; $display("3-tap: %0d outputs for %0d loads", outs3, loads); end
    $display("outputs=%0d loads=%0d best_run=%0d outputs3=%0d", outs, loads, best_run, outs3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
