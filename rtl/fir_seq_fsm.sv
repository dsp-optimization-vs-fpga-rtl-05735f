// fir_seq_fsm: controller of the sequential FIR filter. Five states, with
// the transitions of the published state diagram:
//   reset -> IDLE -> INIT -> CMPT -> TEST -> (CMP low)  CMPT
//                                         -> (CMP high) DONE -> INIT
// Every state lasts one clock except INIT, which waits for a sample
// (x_valid); this wait and the control each state drives are this design's
// choices, as the diagram prints only the states and transitions:
//   IDLE : RSP, RSA          (pointer and accumulator cleared)
//   INIT : RSP, RSA; with x_valid also `load` (sample shifted into buffer)
//   CMPT : ES                (S <= S + buffer[k] * rom[k])
//   TEST : EP when CMP is low (k <= k + 1)
//   DONE : EO                (output register <= S)
// CMP is the pointer's `last` flag (k = TAPS-1). A sample therefore takes
// 8 multiply-accumulate cycles and 18 clocks from INIT to INIT with the
// default 8 taps. Synchronous reset, active high.
module fir_seq_fsm
  import fir_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       x_valid,
  input  logic       cmp,
  output logic       load,
  output logic       rsp,
  output logic       ep,
  output logic       rsa,
  output logic       es,
  output logic       eo,
  output seq_state_t state
);

  seq_state_t next;

  always_ff @(posedge clk) begin
    if (rst) state <= S_IDLE;
    else     state <= next;
  end

  always_comb begin
    next = state;
    load = 1'b0;
    rsp  = 1'b0;
    ep   = 1'b0;
    rsa  = 1'b0;
    es   = 1'b0;
    eo   = 1'b0;
    unique case (state)
      S_IDLE: begin
        rsp  = 1'b1;
        rsa  = 1'b1;
        next = S_INIT;
      end
      S_INIT: begin
        rsp = 1'b1;
        rsa = 1'b1;
        if (x_valid) begin
          load = 1'b1;
          next = S_CMPT;
        end
      end
      S_CMPT: begin
        es   = 1'b1;
        next = S_TEST;
      end
      S_TEST: begin
        if (cmp) begin
          next = S_DONE;
        end else begin
          ep   = 1'b1;
          next = S_CMPT;
        end
      end
      S_DONE: begin
        eo   = 1'b1;
        next = S_INIT;
      end
      default: next = S_IDLE;
    endcase
  end

  // The state register only ever holds one of the five encodings.
  a_legal_state: assert property (@(posedge clk) disable iff (rst)
    state inside {S_IDLE, S_INIT, S_CMPT, S_TEST, S_DONE});

endmodule
