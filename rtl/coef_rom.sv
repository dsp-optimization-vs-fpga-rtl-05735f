// coef_rom: constant table of the filter coefficients, one COEF_W-bit word
// per tap, read asynchronously at the pointer address: coef = COEFS[addr].
// The table is the COEFS parameter, so a different filter is a different
// parameter value. An address at or beyond TAPS reads 0 (only reachable when
// TAPS is not a power of two). The asynchronous read lets the product of a
// tap be formed in the same cycle the pointer points at it.
module coef_rom #(
  parameter int TAPS   = fir_pkg::TAPS,
  parameter int COEF_W = fir_pkg::COEF_W,
  parameter logic [TAPS-1:0][COEF_W-1:0] COEFS = fir_pkg::DEFAULT_COEFS,
  localparam int ADDR_W = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic [ADDR_W-1:0]        addr,
  output logic signed [COEF_W-1:0] coef
);

  logic signed [COEF_W-1:0] rom [TAPS];

  always_comb begin
    for (int k = 0; k < TAPS; k++) rom[k] = $signed(COEFS[k]);
  end

  always_comb begin
    if (int'(addr) < TAPS) coef = rom[addr];
    else                   coef = '0;
  end

endmodule
