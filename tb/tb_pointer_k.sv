// tb_pointer_k: random RSP/EP sequences against a counter model: k clears on
// RSP (which wins over EP), advances on EP, wraps from TAPS-1 to 0; `last`
// must be high exactly when k = TAPS-1. Run for TAPS = 8 and TAPS = 5.
module tb_pointer_k;
  logic clk = 1'b0;
  logic rst;
  logic rsp, ep;
  logic [2:0] k8, k5;
  logic last8, last5;
  int checks = 0, failures = 0;
  int m8 = 0, m5 = 0;
  int wraps = 0;

  pointer_k #(.TAPS(8)) dut8 (.clk, .rst, .rsp, .ep, .k(k8), .last(last8));
  pointer_k #(.TAPS(5)) dut5 (.clk, .rst, .rsp, .ep, .k(k5), .last(last5));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks += 4;
    if (int'(k8) != m8) begin failures++; $display("k8=%0d exp %0d", k8, m8); end
    if (int'(k5) != m5) begin failures++; $display("k5=%0d exp %0d", k5, m5); end
    if (last8 != (m8 == 7)) begin failures++; $display("last8 wrong at %0d", m8); end
    if (last5 != (m5 == 4)) begin failures++; $display("last5 wrong at %0d", m5); end
  endtask

  initial begin
    rst = 1'b1; rsp = 1'b0; ep = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    compare();
    for (int n = 0; n < 600; n++) begin
      rsp = ($urandom_range(0, 15) == 0);
      ep  = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (rsp) begin m8 = 0; m5 = 0; end
      else if (ep) begin
        if (m8 == 7) wraps++;
        m8 = (m8 + 1) % 8;
        m5 = (m5 + 1) % 5;
      end
      #1 compare();
    end
    checks++;
    if (wraps == 0) begin failures++; $display("no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
