// tb_fir_seq: streams random 16-bit samples (with full-scale values mixed
// in) into the sequential filter, with random gaps in x_valid, and compares
// every output with a direct convolution y(n) = sum b(k) x(n-k) computed
// here from the coefficient list, cut to 32 bits. Checks the timing: 18
// clocks per sample when samples are always waiting, and 8 ES
// (multiply-accumulate) cycles per sample. A second instance runs the 3-tap
// example filter b = {-1, 0, 1} on the sequence 1, 2, 3, ... .
module tb_fir_seq;
  localparam int TAPS = 8;
  localparam int NS = 200;

  logic clk = 1'b0;
  logic rst;
  logic signed [15:0] x;
  logic x_valid, x_ready;
  logic signed [31:0] y;
  logic y_valid;

  logic signed [15:0] x3;
  logic x3_valid, x3_ready;
  logic signed [31:0] y3;
  logic y3_valid;

  int checks = 0, failures = 0;
  int b8 [TAPS] = '{1, 2, 3, 4, 4, 3, 2, 1};
  int b3 [3]    = '{-1, 0, 1};
  int hist [$];
  int hist3 [$];
  int outs = 0, outs3 = 0;
  int es_cycles = 0;
  longint last_out_t = -1;
  int back_to_back = 0;

  fir_seq dut (.*);
  fir_seq #(.TAPS(3), .COEFS({16'h0001, 16'h0000, 16'hFFFF})) dut3 (
    .clk, .rst, .x(x3), .x_valid(x3_valid), .x_ready(x3_ready),
    .y(y3), .y_valid(y3_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int conv(int h[$], int b[], int taps);
    longint s = 0;
    for (int k = 0; k < taps; k++)
      if (k < h.size()) s += longint'(b[k]) * longint'(h[h.size() - 1 - k]);
    return int'(32'(s));
  endfunction

  // count multiply-accumulate cycles of the 8-tap instance
  always @(posedge clk) if (!rst && dut.es) es_cycles++;

  // output checker, 8-tap
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int exp_q [$];
  always @(posedge clk) begin
    if (!rst && x_valid && x_ready) begin
      hist.push_back(int'(x));
      exp_q.push_back(conv(hist, b8, TAPS));
    end
    if (!rst && y_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("output with no sample"); end
      else begin
        automatic int e = exp_q.pop_front();
        if (int'(y) != e) begin failures++; $display("y=%0d expected %0d", y, e); end
      end
      if (last_out_t >= 0 && cyc - last_out_t == 18) back_to_back++;
      last_out_t = cyc;
      outs++;
    end
  end

  int exp3_q [$];
  always @(posedge clk) begin
    if (!rst && x3_valid && x3_ready) begin
      hist3.push_back(int'(x3));
      exp3_q.push_back(conv(hist3, b3, 3));
    end
    if (!rst && y3_valid) begin
      automatic int e = exp3_q.pop_front();
      checks++;
      if (int'(y3) != e) begin failures++; $display("3-tap y=%0d expected %0d", y3, e); end
      outs3++;
    end
  end

  initial begin
    rst = 1'b1; x_valid = 1'b0; x = '0; x3_valid = 1'b0; x3 = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // 3-tap example: x = 1, 2, 3, ... always valid; y = x(n-2) - x(n)
    x3_valid = 1'b1;
    x3 = 16'sd1;
    // 8-tap: first 20 samples back to back, then random gaps
    for (int n = 0; n < NS; n++) begin
      x = (n % 7 == 3) ? 16'sh8000 : (n % 11 == 5) ? 16'sh7FFF : 16'($urandom);
      x_valid = (n < 20) ? 1'b1 : ($urandom_range(0, 1) == 1);
      if (!x_valid) begin
        repeat ($urandom_range(1, 30)) @(posedge clk);
        #1 x_valid = 1'b1;
      end
      do begin
        @(posedge clk);
        if (x3_valid && x3_ready) x3 <= x3 + 16'sd1;
      end while (!x_ready);
      #1 x_valid = 1'b0;
    end
    x3_valid = 1'b0;
    repeat (40) @(posedge clk);
    checks++;
    if (outs != NS) begin failures++; $display("%0d outputs for %0d samples", outs, NS); end
    checks++;
    if (es_cycles != 8 * NS) begin failures++; $display("%0d ES cycles, expected %0d", es_cycles, 8 * NS); end
    checks++;
    if (back_to_back < 15) begin failures++; $display("only %0d outputs 18 clocks apart", back_to_back); end
    checks++;
    if (outs3 < 20) begin failures++; $display("3-tap filter gave %0d outputs", outs3); end
    $display("outputs=%0d es_cycles=%0d back_to_back=%0d outputs3=%0d", outs, es_cycles, back_to_back, outs3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
