// controller: the eight-state sequencer of the synthesis system.
//
// It follows the thesis's state diagram and state table exactly, with the
// thesis's binary state assignment ABC and its next-state and output
// equations:
//   A+ = S3.~kvalue + S4 + S6
//   B+ = S1.load + S2 + S3.kvalue + S4.cmp + S5 + S6 + S7
//   C+ = S0.ready + S1.~load + S2 + S4.~cmp + S5 + S6.player_done
//   reset_K = S0.ready + S3.kvalue + S7     incr_I = S3.kvalue + S7
//   incr_K  = S5     found = S4.cmp     dfound = S3.kvalue
// S0 waits for ready, S1 for load. S2 presents segment X, S3 checks whether
// counter K has passed the last library entry (kvalue), S4 compares entry
// Y(K) with X. On a miss S5 increments K and the scan goes back to S3; when
// every entry missed, S3 raises dfound, clears K and moves to the next
// segment. On a hit S4 raises found, S6 waits for player_done and S7 clears
// K and moves to the next segment. The outputs are combinational (Mealy)
// and valid in the cycle they are asserted; every transition takes one clock.
//
// A search therefore spends three cycles (S3, S4, S5) per library entry
// that misses. After the last segment the machine keeps cycling from S2, as
// in the thesis; only reset returns it to S0. The synchronous, active-high
// reset is this design's choice.
module controller
  import tts_pkg::*;
(
  input  logic clk,
  input  logic reset,        // synchronous, active high, to S0
  input  logic ready,
  input  logic load,
  input  logic kvalue,
  input  logic cmp,
  input  logic player_done,
  output logic reset_k,
  output logic incr_k,
  output logic incr_i,
  output logic found,
  output logic dfound,
  output state_t state       // present state, for observation
);
  state_t next;

  always_ff @(posedge clk) begin
    if (reset) state <= S0_IDLE;
    else       state <= next;
  end

  always_comb begin
    next    = state;
    reset_k = 1'b0;
    incr_k  = 1'b0;
    incr_i  = 1'b0;
    found   = 1'b0;
    dfound  = 1'b0;
    case (state)
      S0_IDLE:   if (ready) begin next = S1_LOAD; reset_k = 1'b1; end
      S1_LOAD:   if (load)  next = S2_ASSIGN;
      S2_ASSIGN: next = S3_KCHECK;
      S3_KCHECK:
        if (kvalue) begin
          next    = S2_ASSIGN;
          dfound  = 1'b1;
          incr_i  = 1'b1;
          reset_k = 1'b1;
        end else begin
          next = S4_CMP;
        end
      S4_CMP:
        if (cmp) begin next = S6_PLAY; found = 1'b1; end
        else     next = S5_INCK;
      S5_INCK: begin next = S3_KCHECK; incr_k = 1'b1; end
      S6_PLAY:   if (player_done) next = S7_INCI;
      S7_INCI: begin
        next    = S2_ASSIGN;
        incr_i  = 1'b1;
        reset_k = 1'b1;
      end
      default:   next = S0_IDLE;
    endcase
  end
endmodule
