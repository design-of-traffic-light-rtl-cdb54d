// tlc_sensor_fsm: four-road junction controller that skips empty roads.
//
// Roads R1..R4 are served in turn, each in two states: S(2k) shows green
// and S(2k+1) yellow on road k+1, with every other road red. Reset enters S0
// (R1 green). While road k+1 is yellow the presence sensor of the following
// road is examined when the yellow ends: if it reports no vehicle that road
// is skipped and control goes straight to the green of the road after it
// (S1 -> S4 when X2 is low, S3 -> S6 when X3 is low, S5 -> S0 when X4 is
// low, S7 -> S2 when X1 is low); otherwise the following road gets its
// green. Only one road is skipped per step, so S0 is always entered after
// reset and R1 is served whenever it is reached, as described.
//
// Timing: every state lasts a whole number of ticks. A yellow lasts
// YELLOW_TICKS. A green lasts GREEN_LONG when that road's volume sensor
// v[k] was high as the green was entered and GREEN_SHORT otherwise, so a
// heavily used road gets a longer green. The volume rule, the tick counts and
// the reset green (short) are this design's choices; the state sequence and
// skip rules follow the description of the junction controller. The S6 exit
// goes to S7 (the yellow of R4), which the description of S7 requires.
//
// Ports: clk, rst_n (asynchronous, active low), tick (timing pulse),
// x[3:0] presence X1..X4, v[3:0] volume, road[3:0] lamps of R1..R4,
// state, skip (one-cycle pulse when a road is skipped).
module tlc_sensor_fsm
  import tlc_pkg::*;
#(
  parameter int unsigned GREEN_SHORT  = 30,
  parameter int unsigned GREEN_LONG   = 60,
  parameter int unsigned YELLOW_TICKS = 3,
  parameter int unsigned TW           = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  input  logic [3:0]    x,
  input  logic [3:0]    v,
  output lamp_t         road [4],
  output sensor_state_e state,
  output logic          skip
);

  sensor_state_e state_q, state_d;
  logic          long_q, long_d;
  logic [TW-1:0] dur;
  logic          expire;

  // Road served in the current state and the one after it.
  logic [1:0] cur_road, nxt_road;
  assign cur_road = state_q[2:1];
  assign nxt_road = cur_road + 2'd1;

  assign dur = state_q[0] ? TW'(YELLOW_TICKS)
                          : (long_q ? TW'(GREEN_LONG) : TW'(GREEN_SHORT));

  phase_timer #(.W(TW)) u_timer (
    .clk    (clk),
    .rst_n  (rst_n),
    .tick   (tick),
    .dur    (dur),
    .expire (expire)
  );

  always_comb begin
    state_d = state_q;
    long_d  = long_q;
    skip    = 1'b0;
    if (expire) begin
      if (!state_q[0]) begin
        // green -> yellow of the same road
        state_d = sensor_state_e'({cur_road, 1'b1});
      end else if (x[nxt_road]) begin
        // next road has traffic: its green
        state_d = sensor_state_e'({nxt_road, 1'b0});
        long_d  = v[nxt_road];
      end else begin
        // next road empty: skip to the green of the road after it
        state_d = sensor_state_e'({nxt_road + 2'd1, 1'b0});
        long_d  = v[nxt_road + 2'd1];
        skip    = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S0;
      long_q  <= 1'b0;
    end else begin
      state_q <= state_d;
      long_q  <= long_d;
    end
  end

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      if (r == int'(cur_road)) road[r] = state_q[0] ? LAMP_YELLOW : LAMP_GREEN;
      else                     road[r] = LAMP_RED;
    end
  end

  assign state = state_q;

  // Exactly one road is ever not red.
  assert property (@(posedge clk) disable iff (!rst_n)
    $countones({road[0].red, road[1].red, road[2].red, road[3].red}) == 3)
    else $error("more than one road released");

endmodule
