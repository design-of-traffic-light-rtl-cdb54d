// tlc_top: the traffic light controllers of this design, side by side.
//
// Three descriptions of a four-way junction controller are built, and they
// share only the clock, the reset and the timing pulse:
//   * u_sensor - roads R1..R4 served in turn, empty roads skipped using the
//     presence sensors x, green length chosen by the volume sensors v
//     (tlc_sensor_fsm);
//   * u_ped    - directions N, E, S, W with all-red, green, two yellows and
//     a pedestrian walk during the second yellow (tlc_ped_fsm);
//   * u_seq + u_dec - a four-state sequencer whose 2-bit state is decoded
//     into the an/grn/rd/ylw lamp vectors (tlc_state_seq, tlc_lamp_decoder).
// A tick_divider turns the clock into a 1 s tick (50 MHz clock assumed);
// every lamp duration is a whole number of ticks. The decoder's active-low
// reset is tied to the system reset, so all reds and yellows are driven high
// and all greens low while the junction is held in reset.
//
// Ports: clk, rst_n (asynchronous, active low); x, v (sensors of R1..R4);
// sensor_road/sensor_state/sensor_skip; ped_lamp/ped_walk/ped_dir/ped_cnt/
// ped_wrap; seq_state, an, grn, rd, ylw. All outputs change one clock after
// the tick that ends a state (the decoder outputs combinationally after it).
module tlc_top
  import tlc_pkg::*;
#(
  parameter int unsigned CLK_DIV        = 50_000_000,
  parameter int unsigned GREEN_SHORT    = 30,
  parameter int unsigned GREEN_LONG     = 60,
  parameter int unsigned YELLOW_TICKS   = 3,
  parameter int unsigned PED_GREEN      = 30,
  parameter int unsigned PED_SIDE_GREEN = 15,
  parameter logic [3:0]  PED_MAIN_DIRS  = 4'b1111,
  parameter int unsigned PED_Y1         = 3,
  parameter int unsigned PED_Y2         = 3,
  parameter int unsigned PED_ALL_RED    = 1,
  parameter int unsigned SEQ_GREEN      = 30,
  parameter int unsigned SEQ_YELLOW     = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  // sensor-driven controller
  input  logic [3:0]    x,
  input  logic [3:0]    v,
  output lamp_t         sensor_road [4],
  output sensor_state_e sensor_state,
  output logic          sensor_skip,
  // four-direction controller with pedestrian phase
  output lamp_t         ped_lamp [4],
  output ped_t          ped_walk [4],
  output dir_e          ped_dir,
  output cnt_e          ped_cnt,
  output logic          ped_wrap,
  // sequencer and lamp decoder
  output seq_state_e    seq_state,
  output logic [3:0]    an,
  output logic [3:0]    grn,
  output logic [3:0]    rd,
  output logic [3:0]    ylw
);

  logic tick;

  tick_divider #(.DIV(CLK_DIV)) u_div (
    .clk   (clk),
    .rst_n (rst_n),
    .tick  (tick)
  );

  tlc_sensor_fsm #(
    .GREEN_SHORT  (GREEN_SHORT),
    .GREEN_LONG   (GREEN_LONG),
    .YELLOW_TICKS (YELLOW_TICKS)
  ) u_sensor (
    .clk   (clk),
    .rst_n (rst_n),
    .tick  (tick),
    .x     (x),
    .v     (v),
    .road  (sensor_road),
    .state (sensor_state),
    .skip  (sensor_skip)
  );

  tlc_ped_fsm #(
    .GREEN_TICKS      (PED_GREEN),
    .SIDE_GREEN_TICKS (PED_SIDE_GREEN),
    .MAIN_DIRS        (PED_MAIN_DIRS),
    .Y1_TICKS      (PED_Y1),
    .Y2_TICKS      (PED_Y2),
    .ALL_RED_TICKS (PED_ALL_RED)
  ) u_ped (
    .clk   (clk),
    .rst_n (rst_n),
    .tick  (tick),
    .lamp  (ped_lamp),
    .ped   (ped_walk),
    .dir   (ped_dir),
    .cnt   (ped_cnt),
    .wrap  (ped_wrap)
  );

  tlc_state_seq #(
    .GREEN_TICKS  (SEQ_GREEN),
    .YELLOW_TICKS (SEQ_YELLOW)
  ) u_seq (
    .clk   (clk),
    .rst_n (rst_n),
    .tick  (tick),
    .state (seq_state)
  );

  tlc_lamp_decoder u_dec (
    .state (seq_state),
    .reset (rst_n),
    .an    (an),
    .grn   (grn),
    .rd    (rd),
    .ylw   (ylw)
  );

endmodule
