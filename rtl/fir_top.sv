// fir_top: the two hardware forms of the 8-tap FIR filter, side by side.
// The sequential filter (fir_seq) uses one multiplier and one accumulator
// and takes 18 clocks per sample, 8 of them multiply-accumulate cycles; it
// suits a small FPGA. The parallel filter (fir_par) uses one multiplier per
// tap and an adder tree and takes one sample per clock; it suits a larger
// FPGA. They share clock, reset and coefficient set and are otherwise
// independent: each has its own sample input and 32-bit result output.
// Samples come from an ADC and results go to a DAC, neither of which is part
// of this RTL. Synchronous reset, active high.
module fir_top #(
  parameter int TAPS   = fir_pkg::TAPS,
  parameter int DATA_W = fir_pkg::DATA_W,
  parameter int COEF_W = fir_pkg::COEF_W,
  parameter int ACC_W  = fir_pkg::ACC_W,
  parameter logic [TAPS-1:0][COEF_W-1:0] COEFS = fir_pkg::DEFAULT_COEFS
) (
  input  logic                     clk,
  input  logic                     rst,
  // sequential filter
  input  logic signed [DATA_W-1:0] seq_x,
  input  logic                     seq_x_valid,
  output logic                     seq_x_ready,
  output logic signed [ACC_W-1:0]  seq_y,
  output logic                     seq_y_valid,
  // parallel filter
  input  logic signed [DATA_W-1:0] par_x,
  input  logic                     par_x_valid,
  output logic signed [ACC_W-1:0]  par_y,
  output logic                     par_y_valid,
  output logic                     par_full
);

  fir_seq #(
    .TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W), .COEFS(COEFS)
  ) u_seq (
    .clk, .rst,
    .x(seq_x), .x_valid(seq_x_valid), .x_ready(seq_x_ready),
    .y(seq_y), .y_valid(seq_y_valid)
  );

  fir_par #(
    .TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W), .COEFS(COEFS)
  ) u_par (
    .clk, .rst,
    .x(par_x), .x_valid(par_x_valid),
    .y(par_y), .y_valid(par_y_valid), .full(par_full)
  );

endmodule
