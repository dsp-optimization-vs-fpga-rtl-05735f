// pointer_k: the tap pointer k of the sequential filter. It addresses the
// sample buffer and the coefficient ROM together. RSP clears it to 0, EP
// advances it by one per clock (wrapping from TAPS-1 to 0); RSP wins when
// both are high. `last` is high while k = TAPS-1 and is the loop-exit test
// (CMP) of the controller. Synchronous reset, active high.
module pointer_k #(
  parameter int TAPS = fir_pkg::TAPS,
  localparam int PTR_W = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             rsp,
  input  logic             ep,
  output logic [PTR_W-1:0] k,
  output logic             last
);

  always_ff @(posedge clk) begin
    if (rst || rsp)
      k <= '0;
    else if (ep)
      k <= (k == PTR_W'(TAPS - 1)) ? '0 : k + 1'b1;
  end

  assign last = (k == PTR_W'(TAPS - 1));

endmodule
