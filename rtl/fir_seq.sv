// fir_seq: sequential FIR filter, the small-area form. One multiplier and
// one accumulator serve all taps: the pointer k walks the sample buffer and
// the coefficient ROM together, and each CMPT state adds buffer[k]*rom[k]
// into the accumulator S. After the last tap, DONE copies S into the 32-bit
// output register (EO).
//   Datapath:  shift_buffer -> taps[k] --\
//              coef_rom(k) ---------------> mac_acc (X, +, Acc) -> Output
//   Control:   fir_seq_fsm drives load, RSP, EP, RSA, ES, EO; pointer_k
//              returns CMP (k = TAPS-1).
// Interface: a sample is taken when x_valid and x_ready are both high
// (x_ready is high only in INIT). y_valid pulses for one clock, the clock
// after DONE, when y holds y(n) = sum b(k) x(n-k) for the sample just taken,
// wrapped to ACC_W bits. With 8 taps a sample takes 18 clocks when samples
// are always waiting: INIT, 8 x (CMPT, TEST), DONE; 8 of these are
// multiply-accumulate cycles. The block structure, control-signal names,
// widths and the five states follow the published circuit; the handshake,
// the per-state controls and y_valid are this design's own. The buffer's
// `full` flag is left open here: this form produces an output for every
// sample, counting samples before the first as zero.
module fir_seq #(
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
  output logic                     x_ready,
  output logic signed [ACC_W-1:0]  y,
  output logic                     y_valid
);

  localparam int PTR_W = (TAPS > 1) ? $clog2(TAPS) : 1;

  logic load, rsp, ep, rsa, es, eo, cmp;
  logic [PTR_W-1:0]         k;
  logic signed [DATA_W-1:0] taps [TAPS];
  logic signed [DATA_W-1:0] sample;
  logic signed [COEF_W-1:0] coef;
  logic signed [ACC_W-1:0]  acc;
  fir_pkg::seq_state_t      state;

  fir_seq_fsm u_fsm (
    .clk, .rst, .x_valid, .cmp,
    .load, .rsp, .ep, .rsa, .es, .eo, .state
  );

  pointer_k #(.TAPS(TAPS)) u_ptr (
    .clk, .rst, .rsp, .ep, .k, .last(cmp)
  );

  shift_buffer #(.TAPS(TAPS), .DATA_W(DATA_W)) u_buf (
    .clk, .rst, .shift_en(load), .din(x), .taps, .full()
  );

  coef_rom #(.TAPS(TAPS), .COEF_W(COEF_W), .COEFS(COEFS)) u_rom (
    .addr(k), .coef
  );

  // Buffer read at the pointer.
  always_comb sample = taps[k];

  mac_acc #(.DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_mac (
    .clk, .rst, .rsa, .es, .sample, .coef, .acc
  );

  // Output register (EO).
  always_ff @(posedge clk) begin
    if (rst) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= eo;
      if (eo) y <= acc;
    end
  end

  assign x_ready = (state == fir_pkg::S_INIT);

  // Every load is a handshake, and a sample is only taken with x_valid high.
  a_load_handshake: assert property (@(posedge clk) disable iff (rst)
    load |-> (x_valid && x_ready));

endmodule
