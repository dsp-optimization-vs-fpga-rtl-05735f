// tb_coef_rom: reads every address of the default 8-entry coefficient table
// and of a 3-entry table holding the example filter b = {-1, 0, 1}, and
// compares with the expected values listed here; address 3 of the 3-entry
// table must read 0. Packed parameter element k is b(k), so {1, 0, -1}
// written MSB first gives b(0) = -1.
module tb_coef_rom;
  int checks = 0, failures = 0;

  logic [2:0] addr8;
  logic signed [15:0] coef8;
  logic [1:0] addr3;
  logic signed [15:0] coef3;

  coef_rom dut8 (.addr(addr8), .coef(coef8));
  coef_rom #(.TAPS(3), .COEF_W(16), .COEFS({16'h0001, 16'h0000, 16'hFFFF}))
    dut3 (.addr(addr3), .coef(coef3));

  localparam int EXP8 [8] = '{1, 2, 3, 4, 4, 3, 2, 1};
  localparam int EXP3 [4] = '{-1, 0, 1, 0};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++) begin
      addr8 = 3'(a);
      #1;
      checks++;
      if (int'(coef8) != EXP8[a]) begin
        failures++;
        $display("8-tap addr %0d: got %0d expected %0d", a, coef8, EXP8[a]);
      end
    end
    for (int a = 0; a < 4; a++) begin
      addr3 = 2'(a);
      #1;
      checks++;
      if (int'(coef3) != EXP3[a]) begin
        failures++;
        $display("3-tap addr %0d: got %0d expected %0d", a, coef3, EXP3[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
