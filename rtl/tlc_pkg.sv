// tlc_pkg: types shared by the traffic light controllers.
//
// lamp_t is one signal head (red, yellow, green; 1 = lamp on). ped_t is a
// pedestrian head (red, green). The enums carry the state encodings of the
// three controllers: the eight states S0..S7 of the sensor-driven controller,
// the phase counter "cnt" and direction "dir" of the four-direction
// controller with pedestrian phase, and the four named states of the
// two-road sequencer. Where a code is printed for a state (dir 00..11 for
// N, E, S, W; cnt 00 green and 01 first yellow; state 00 for the first
// sequencer state) it is used; the other codes are this design's choice.
package tlc_pkg;

  typedef struct packed {
    logic red;
    logic yellow;
    logic green;
  } lamp_t;

  typedef struct packed {
    logic red;
    logic green;
  } ped_t;

  localparam lamp_t LAMP_RED    = '{red: 1'b1, yellow: 1'b0, green: 1'b0};
  localparam lamp_t LAMP_YELLOW = '{red: 1'b0, yellow: 1'b1, green: 1'b0};
  localparam lamp_t LAMP_GREEN  = '{red: 1'b0, yellow: 1'b0, green: 1'b1};
  localparam ped_t  PED_STOP    = '{red: 1'b1, green: 1'b0};
  localparam ped_t  PED_WALK    = '{red: 1'b0, green: 1'b1};

  // Sensor-driven controller: S(2k) = road k+1 green, S(2k+1) = road k+1 yellow.
  typedef enum logic [2:0] {
    S0 = 3'd0, S1 = 3'd1, S2 = 3'd2, S3 = 3'd3,
    S4 = 3'd4, S5 = 3'd5, S6 = 3'd6, S7 = 3'd7
  } sensor_state_e;

  // Four-direction controller.
  typedef enum logic [1:0] {
    DIR_N = 2'b00, DIR_E = 2'b01, DIR_S = 2'b10, DIR_W = 2'b11
  } dir_e;

  typedef enum logic [1:0] {
    CNT_GREEN   = 2'b00,  // green for dir
    CNT_Y1      = 2'b01,  // first yellow
    CNT_Y2      = 2'b10,  // second yellow, pedestrian walk for dir
    CNT_ALL_RED = 2'b11   // all red before dir gets green
  } cnt_e;

  // Two-road sequencer (highway H, farm road F).
  typedef enum logic [1:0] {
    HGRE_FRED = 2'b00,
    HYEL_FRED = 2'b01,
    HRED_FGRE = 2'b10,
    HRED_FYEL = 2'b11
  } seq_state_e;

endpackage
