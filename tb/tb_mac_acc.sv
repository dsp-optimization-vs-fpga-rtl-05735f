// tb_mac_acc: random samples and coefficients (including the extremes
// -32768 and 32767) with random ES/RSA; the accumulator is compared each
// clock with a 64-bit software sum cut to 32 bits. Long runs of ES without
// RSA make the 32-bit sum wrap, which is checked too.
module tb_mac_acc;
  logic clk = 1'b0;
  logic rst, rsa, es;
  logic signed [15:0] sample, coef;
  logic signed [31:0] acc;
  int checks = 0, failures = 0;
  longint model = 0;
  int wraps = 0;

  mac_acc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [15:0] pick();
    case ($urandom_range(0, 5))
      0: return 16'sh8000;
      1: return 16'sh7FFF;
      default: return 16'($urandom);
    endcase
  endfunction

  initial begin
    rst = 1'b1; rsa = 1'b0; es = 1'b0; sample = '0; coef = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      rsa = (n % 500 == 0) || ($urandom_range(0, 200) == 0);
      es  = ($urandom_range(0, 4) != 0);
      sample = pick();
      coef   = pick();
      @(posedge clk);
      if (rsa) model = 0;
      else if (es) begin
        automatic longint full_sum;
        full_sum = model + longint'(sample) * longint'(coef);
        if (full_sum > 64'sd2147483647 || full_sum < -64'sd2147483648) wraps++;
        model = longint'(32'(full_sum));
        model = longint'($signed(32'(model)));
      end
      #1;
      checks++;
      if (longint'(acc) != model) begin
        failures++;
        $display("n=%0d acc=%0d expected %0d", n, acc, model);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("the 32-bit sum never wrapped"); end
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
