// shift_buffer: the sample buffer of the FIR filters, TAPS registers of
// DATA_W bits. When shift_en is high at a clock edge, din enters entry 0 and
// every entry moves one place down (entry k takes entry k-1); the oldest
// sample falls out of entry TAPS-1. So after a load taps[k] holds x(n-k).
// All entries are outputs, as the parallel filter reads them all at once.
// A load counter raises `full` once TAPS samples have entered and holds it
// until reset ("full buffer = 1").
// The buffer is built from registers rather than a block RAM because every
// entry moves in one cycle. Reset (synchronous, active high) clears the
// entries, which gives the causal x = 0 before the first sample.
module shift_buffer #(
  parameter int TAPS   = fir_pkg::TAPS,
  parameter int DATA_W = fir_pkg::DATA_W
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          shift_en,
  input  logic signed [DATA_W-1:0]      din,
  output logic signed [DATA_W-1:0]      taps [TAPS],
  output logic                          full
);

  localparam int CNT_W = $clog2(TAPS + 1);

  logic [CNT_W-1:0] fill;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < TAPS; k++) taps[k] <= '0;
    end else if (shift_en) begin
      taps[0] <= din;
      for (int k = 1; k < TAPS; k++) taps[k] <= taps[k-1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst)
      fill <= '0;
    else if (shift_en && fill != CNT_W'(TAPS))
      fill <= fill + 1'b1;
  end

  assign full = (fill == CNT_W'(TAPS));

endmodule
