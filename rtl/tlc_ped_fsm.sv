// tlc_ped_fsm: four-direction controller with a pedestrian phase.
//
// Directions North, East, South, West (dir = 00, 01, 10, 11) are served in
// that order. For each direction the phase counter cnt steps through an
// all-red interval, green (cnt 00) with every other direction red, a first
// yellow y1 (cnt 01), and a second yellow y2 (cnt 10) during which that
// direction's pedestrian signal shows walk. After y2, dir is incremented
// (West wraps to North) and cnt starts again. One green serves left,
// straight and right turns of its direction. Pedestrian heads show stop at
// all other times.
//
// The green/y1/y2 order, the dir codes and the pedestrian walk during y2
// follow the description; the all-red step follows the flow chart, which
// begins each round with all red. Its code 11 and the code 10 for y2 are
// this design's choice, and ALL_RED_TICKS = 0 removes the all-red step
// (sequence green, y1, y2 only). Durations are in ticks and are assumed.
// Main roads may be given a longer green than side roads, as the description
// suggests: directions whose bit is set in MAIN_DIRS get GREEN_TICKS, the
// others SIDE_GREEN_TICKS. By default all four are main roads.
// Reset enters the all-red step (or green, without it) of North.
//
// Assertions check that no two directions are released together.
//
// Ports: clk, rst_n (asynchronous, active low), tick (timing pulse),
// lamp[4] and ped[4] indexed by dir (0 = North), dir, cnt, and wrap
// (one-cycle pulse when West hands over to North).
module tlc_ped_fsm
  import tlc_pkg::*;
#(
  parameter int unsigned GREEN_TICKS      = 30,
  parameter int unsigned SIDE_GREEN_TICKS = 15,
  parameter logic [3:0]  MAIN_DIRS        = 4'b1111,
  parameter int unsigned Y1_TICKS         = 3,
  parameter int unsigned Y2_TICKS         = 3,
  parameter int unsigned ALL_RED_TICKS    = 1,
  parameter int unsigned TW               = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tick,
  output lamp_t lamp [4],
  output ped_t  ped  [4],
  output dir_e  dir,
  output cnt_e  cnt,
  output logic  wrap
);

  localparam cnt_e FIRST = (ALL_RED_TICKS == 0) ? CNT_GREEN : CNT_ALL_RED;

  dir_e          dir_q, dir_d;
  cnt_e          cnt_q, cnt_d;
  logic [TW-1:0] dur;
  logic          expire;

  always_comb begin
    unique case (cnt_q)
      CNT_ALL_RED: dur = TW'(ALL_RED_TICKS);
      CNT_GREEN:   dur = MAIN_DIRS[dir_q] ? TW'(GREEN_TICKS) : TW'(SIDE_GREEN_TICKS);
      CNT_Y1:      dur = TW'(Y1_TICKS);
      default:     dur = TW'(Y2_TICKS);
    endcase
  end

  phase_timer #(.W(TW)) u_timer (
    .clk    (clk),
    .rst_n  (rst_n),
    .tick   (tick),
    .dur    (dur),
    .expire (expire)
  );

  always_comb begin
    dir_d = dir_q;
    cnt_d = cnt_q;
    wrap  = 1'b0;
    if (expire) begin
      unique case (cnt_q)
        CNT_ALL_RED: cnt_d = CNT_GREEN;
        CNT_GREEN:   cnt_d = CNT_Y1;
        CNT_Y1:      cnt_d = CNT_Y2;
        default: begin
          cnt_d = FIRST;
          dir_d = dir_e'(dir_q + 2'd1);
          wrap  = (dir_q == DIR_W);
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dir_q <= DIR_N;
      cnt_q <= FIRST;
    end else begin
      dir_q <= dir_d;
      cnt_q <= cnt_d;
    end
  end

  always_comb begin
    for (int d = 0; d < 4; d++) begin
      lamp[d] = LAMP_RED;
      ped[d]  = PED_STOP;
      if (d == int'(dir_q)) begin
        unique case (cnt_q)
          CNT_GREEN:   lamp[d] = LAMP_GREEN;
          CNT_Y1:      lamp[d] = LAMP_YELLOW;
          CNT_Y2: begin
            lamp[d] = LAMP_YELLOW;
            ped[d]  = PED_WALK;
          end
          default:     lamp[d] = LAMP_RED;
        endcase
      end
    end
  end

  assign dir = dir_q;
  assign cnt = cnt_q;

  // No conflicting releases: at most one direction is not red, and a
  // pedestrian walks only beside the one direction that shows yellow.
  assert property (@(posedge clk) disable iff (!rst_n)
    $countones({lamp[0].red, lamp[1].red, lamp[2].red, lamp[3].red}) >= 3)
    else $error("more than one direction released");
  assert property (@(posedge clk) disable iff (!rst_n)
    $countones({ped[0].green, ped[1].green, ped[2].green, ped[3].green}) <= 1 &&
    (!ped[dir_q].green || lamp[dir_q].yellow))
    else $error("pedestrian walk outside the second yellow");

endmodule
