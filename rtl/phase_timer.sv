// phase_timer: measures how long a controller has been in its current state.
//
// The owning state machine presents the duration of its current state, in
// ticks, on `dur`. The timer counts ticks in `elapsed`; on the tick that
// completes the duration it raises `expire` for that one cycle and clears
// `elapsed`, so the state machine changes state in the same cycle and the
// next state starts counting from zero. A state therefore lasts exactly
// `dur` ticks (a duration of 0 behaves as 1). The first state after reset
// counts from reset. The durations themselves are user settings, as the
// description of the controller asks; the counting scheme is this design's.
//
// Ports: clk, rst_n (asynchronous, active low), tick (timing pulse),
// dur (duration of the current state), expire (one-cycle pulse).
module phase_timer #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  input  logic [W-1:0] dur,
  output logic         expire
);

  logic [W-1:0] elapsed;

  // elapsed + 1 >= dur, written so that it cannot overflow.
  assign expire = tick && (elapsed >= dur - W'(1) || dur == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      elapsed <= '0;
    else if (expire) elapsed <= '0;
    else if (tick)   elapsed <= elapsed + 1'b1;
  end

endmodule
