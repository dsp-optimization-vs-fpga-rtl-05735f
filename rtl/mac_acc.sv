// mac_acc: multiply-accumulate unit of the sequential filter: a signed
// DATA_W x COEF_W multiplier, an adder and the ACC_W-bit accumulator S.
// At a clock edge with ES high, S <= S + sample * coef; with RSA high
// S <= 0 (RSA wins). The sum wraps modulo 2^ACC_W: with the default 16/16/32
// widths a sum of eight full-scale products could need 35 bits, and the
// published circuit keeps 32. Synchronous reset, active high.
module mac_acc #(
  parameter int DATA_W = fir_pkg::DATA_W,
  parameter int COEF_W = fir_pkg::COEF_W,
  parameter int ACC_W  = fir_pkg::ACC_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     rsa,
  input  logic                     es,
  input  logic signed [DATA_W-1:0] sample,
  input  logic signed [COEF_W-1:0] coef,
  output logic signed [ACC_W-1:0]  acc
);

  logic signed [DATA_W+COEF_W-1:0] product;
  logic signed [ACC_W-1:0]         sum;

  always_comb begin
    product = sample * coef;
    sum     = acc + ACC_W'(product);
  end

  always_ff @(posedge clk) begin
    if (rst || rsa)
      acc <= '0;
    else if (es)
      acc <= sum;
  end

endmodule
