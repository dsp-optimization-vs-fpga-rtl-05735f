// fir_par: parallel FIR filter, the fast form. Every clock with x_valid high
// a sample enters the shift buffer. The TAPS buffer entries feed TAPS
// multipliers, each with its own constant coefficient (entry k with b(k)),
// and the products are summed two by two by the adder tree (4 + 2 + 1 adders
// for 8 taps). The sum is registered in the ACC_W-bit output register at the
// next clock edge, so one result is produced per clock: the sample taken at
// edge n is in the buffer after edge n, and y(n) is in the output register,
// with y_valid high, after edge n+1. Results are flagged with y_valid only
// when the buffer was full (`full`, high after TAPS loads); the first
// TAPS-1 partial results are not flagged. Products and sums wrap to ACC_W
// bits.
// Structure, widths and the full-buffer condition follow the published
// circuit; x_valid/y_valid and the one-clock output register timing are this
// design's choices. Synchronous reset, active high.
module fir_par #(
  parameter int TAPS   = fir_pkg::TAPS,
  parameter int DATA_W = fir_pkg::DATA_W,
  parameter int COEF_W = fir_pkg::COEF_W,
  parameter int ACC_W  = fir_pkg::ACC_W,
  parameter logic [TAPS-1:0][COEF_W-1:0] COEFS = fir_pkg::DEFAULT_COEFS
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] x,
  input  logic                     x_valid,
  output logic signed [ACC_W-1:0]  y,
  output logic                     y_valid,
  output logic                     full
);

  logic signed [DATA_W-1:0] taps  [TAPS];
  logic signed [ACC_W-1:0]  prods [TAPS];
  logic signed [ACC_W-1:0]  sop;
  logic                     loaded;

  shift_buffer #(.TAPS(TAPS), .DATA_W(DATA_W)) u_buf (
    .clk, .rst, .shift_en(x_valid), .din(x), .taps, .full
  );

  // One multiplier per tap, coefficient wired as a constant.
  for (genvar k = 0; k < TAPS; k++) begin : g_mul
    localparam logic signed [COEF_W-1:0] B = COEFS[k];
    logic signed [DATA_W+COEF_W-1:0] p;
    always_comb begin
      p        = taps[k] * B;
      prods[k] = ACC_W'(p);
    end
  end

  adder_tree #(.N(TAPS), .W(ACC_W)) u_tree (.terms(prods), .sum(sop));

  // Output register: the SOP of the buffer as it stands after each load.
  // `loaded` marks a buffer that changed at the last edge; its SOP is
  // registered at this edge and flagged if the buffer was full.
  always_ff @(posedge clk) begin
    if (rst) begin
      loaded  <= 1'b0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      loaded  <= x_valid;
      y_valid <= loaded && full;
      if (loaded) y <= sop;
    end
  end

endmodule
