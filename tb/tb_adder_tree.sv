// tb_adder_tree: random signed terms into trees of 8, 3 and 5 inputs; each
// sum is compared with a loop sum taken modulo 2^32, and the 8-input tree
// is also fed values that make the 32-bit sum wrap.
module tb_adder_tree;
  int checks = 0, failures = 0;

  logic signed [31:0] t8 [8];
  logic signed [31:0] t3 [3];
  logic signed [31:0] t5 [5];
  logic signed [31:0] s8, s3, s5;

  adder_tree #(.N(8), .W(32)) dut8 (.terms(t8), .sum(s8));
  adder_tree #(.N(3), .W(32)) dut3 (.terms(t3), .sum(s3));
  adder_tree #(.N(5), .W(32)) dut5 (.terms(t5), .sum(s5));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      automatic longint e8 = 0, e3 = 0, e5 = 0;
      for (int i = 0; i < 8; i++) begin
        t8[i] = (n < 20) ? 32'sh7FFF0000 : 32'($urandom);
        e8 += longint'(t8[i]);
      end
      for (int i = 0; i < 3; i++) begin t3[i] = 32'($urandom); e3 += longint'(t3[i]); end
      for (int i = 0; i < 5; i++) begin t5[i] = 32'($urandom); e5 += longint'(t5[i]); end
      #1;
      checks += 3;
      if (s8 != 32'(e8)) begin failures++; $display("N=8 sum %0d exp %0d", s8, 32'(e8)); end
      if (s3 != 32'(e3)) begin failures++; $display("N=3 sum %0d exp %0d", s3, 32'(e3)); end
      if (s5 != 32'(e5)) begin failures++; $display("N=5 sum %0d exp %0d", s5, 32'(e5)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
