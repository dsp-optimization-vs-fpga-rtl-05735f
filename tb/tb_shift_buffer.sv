// tb_shift_buffer: drives random samples with random shift enables into the
// sample buffer and compares every entry and the `full` flag, after each
// clock, with a software copy of the buffer (an array shifted in the
// testbench). Also checks the reset state (all zero, not full) and that full
// rises exactly at the TAPS-th load and stays high.
module tb_shift_buffer;
  localparam int TAPS = 8;
  localparam int DATA_W = 16;

  logic clk = 1'b0;
  logic rst;
  logic shift_en;
  logic signed [DATA_W-1:0] din;
  logic signed [DATA_W-1:0] taps [TAPS];
  logic full;

  int checks = 0, failures = 0;
  int model [TAPS];
  int loads = 0;

  shift_buffer #(.TAPS(TAPS), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int k = 0; k < TAPS; k++) begin
      checks++;
      if (int'(taps[k]) != model[k]) begin
        failures++;
        $display("entry %0d: got %0d expected %0d", k, taps[k], model[k]);
      end
    end
    checks++;
    if (full !== (loads >= TAPS)) begin
      failures++;
      $display("full=%0b after %0d loads", full, loads);
    end
  endtask

  initial begin
    rst = 1'b1; shift_en = 1'b0; din = '0;
    for (int k = 0; k < TAPS; k++) model[k] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    compare();
    for (int n = 0; n < 400; n++) begin
      shift_en = (n < 20) ? ($urandom_range(0, 3) != 0) : $urandom_range(0, 1);
      din = DATA_W'($urandom);
      @(posedge clk);
      if (shift_en) begin
        for (int k = TAPS - 1; k > 0; k--) model[k] = model[k-1];
        model[0] = int'(din);
        loads++;
      end
      #1 compare();
    end
    // reset mid-stream clears everything
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    loads = 0;
    for (int k = 0; k < TAPS; k++) model[k] = 0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
