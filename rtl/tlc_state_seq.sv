// tlc_state_seq: four-state cyclic sequencer for a highway / farm-road pair.
//
// The states are named after the two roads' lamps: HGRE_FRED (highway
// green, farm red; code 00), HYEL_FRED, HRED_FGRE and HRED_FYEL, entered in
// that order and then back to HGRE_FRED. Each state holds itself until its
// time is up: the two green states last GREEN_TICKS and the two yellow
// states YELLOW_TICKS. The 2-bit code walks 00, 01, 10, 11 and drives the
// lamp decoder.
//
// The state names, the order of the cycle and the code 00 of the first state
// come from the published state machine; the codes of the others follow the
// 00, 01, 10, 11 order seen at the decoder's state input. The hold
// condition (a timer) and the durations are this design's choice.
//
// Ports: clk, rst_n (asynchronous, active low, enters HGRE_FRED), tick
// (timing pulse), state (current state).
module tlc_state_seq
  import tlc_pkg::*;
#(
  parameter int unsigned GREEN_TICKS  = 30,
  parameter int unsigned YELLOW_TICKS = 3,
  parameter int unsigned TW           = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  output seq_state_e state
);

  seq_state_e    state_q;
  logic [TW-1:0] dur;
  logic          expire;

  // Odd codes are the yellow states.
  assign dur = state_q[0] ? TW'(YELLOW_TICKS) : TW'(GREEN_TICKS);

  phase_timer #(.W(TW)) u_timer (
    .clk    (clk),
    .rst_n  (rst_n),
    .tick   (tick),
    .dur    (dur),
    .expire (expire)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= HGRE_FRED;
    end else if (expire) begin
      unique case (state_q)
        HGRE_FRED: state_q <= HYEL_FRED;
        HYEL_FRED: state_q <= HRED_FGRE;
        HRED_FGRE: state_q <= HRED_FYEL;
        default:   state_q <= HGRE_FRED;
      endcase
    end
  end

  assign state = state_q;

endmodule
