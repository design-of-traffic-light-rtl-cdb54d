// tb_tlc_top: end-to-end test of the three controllers on one clock.
//
// The top runs with a clock divider of 3 and short lamp durations. The
// testbench drives random presence and volume sensors and checks, every
// cycle, all outputs against independent models: the sensor-driven
// controller (state, lamps, skip), the four-direction controller (dir, cnt,
// lamps, pedestrian heads, wrap), the sequencer (a cycle-count schedule) and
// the lamp decoder (the published truth table as literals). The tick is
// modelled as every CLK_DIV-th cycle after reset. A reset pulse in the middle
// checks that everything restarts and that the decoder blanks while reset is
// low. Mechanisms counted, each of which must occur: a skip of each road,
// long and short greens, a pedestrian walk in each direction, an all-red
// step, main-road (E, W here) and side-road (N, S) greens, a full round of
// directions, each sequencer state, decoder blanking.
module tb_tlc_top;
  import tlc_pkg::*;

  localparam int DIV = 3;
  localparam int GS = 2, GL = 4, YT = 1;
  localparam int PG = 3, PSG = 1, PY1 = 1, PY2 = 2, PAR = 1;
  localparam logic [3:0] PMAIN = 4'b1010;
  localparam int QG = 3, QY = 1;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [3:0]    x = 4'hf, v = 4'h0;
  lamp_t         sensor_road [4];
  sensor_state_e sensor_state;
  logic          sensor_skip;
  lamp_t         ped_lamp [4];
  ped_t          ped_walk [4];
  dir_e          ped_dir;
  cnt_e          ped_cnt;
  logic          ped_wrap;
  seq_state_e    seq_state;
  logic [3:0]    an, grn, rd, ylw;

  int checks = 0, failures = 0;

  tlc_top #(
    .CLK_DIV(DIV), .GREEN_SHORT(GS), .GREEN_LONG(GL), .YELLOW_TICKS(YT),
    .PED_GREEN(PG), .PED_SIDE_GREEN(PSG), .PED_MAIN_DIRS(PMAIN), .PED_Y1(PY1), .PED_Y2(PY2), .PED_ALL_RED(PAR),
    .SEQ_GREEN(QG), .SEQ_YELLOW(QY)
  ) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- models ----------------
  int s_state, s_left;           // sensor controller
  int p_dir, p_ph, p_left;       // pedestrian controller, ph 0 all red .. 3 y2
  int q_state, q_left;           // sequencer

  // mechanism counters
  int skips [4];
  int longs, shorts, walks [4], allreds, wraps, seqvis [4], blanks;
  int main_greens, side_greens;

  function automatic int p_len(int ph, int dir);
    case (ph)
      0: return PAR;
      1: return PMAIN[dir] ? PG : PSG;
      2: return PY1;
      default: return PY2;
    endcase
  endfunction

  task automatic models_reset();
    s_state = 0; s_left = GS;
    p_dir = 0; p_ph = 0; p_left = PAR;
    q_state = 0; q_left = QG;
  endtask

  task automatic fail(input string msg);
    failures++;
    $display("%0t: %s", $time, msg);
  endtask

  task automatic check_all(input logic tick);
    int nr;
    logic [3:0] cur, nxt;
    // sensor controller
    nr = (s_state / 2 + 1) % 4;
    checks += 2;
    if (int'(sensor_state) != s_state) fail($sformatf("sensor state S%0d expected S%0d", sensor_state, s_state));
    if (sensor_skip !== (tick && s_left == 1 && s_state % 2 == 1 && !x[nr])) fail("sensor skip");
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (sensor_road[r].green  !== (s_state == 2 * r) ||
          sensor_road[r].yellow !== (s_state == 2 * r + 1) ||
          sensor_road[r].red    !== (s_state / 2 != r))
        fail($sformatf("sensor road R%0d lamps %b in S%0d", r + 1, sensor_road[r], s_state));
    end
    // pedestrian controller
    checks += 3;
    if (int'(ped_dir) != p_dir) fail("ped dir");
    if (ped_cnt !== ((p_ph == 0) ? 2'b11 : 2'(p_ph - 1))) fail("ped cnt");
    if (ped_wrap !== (tick && p_left == 1 && p_ph == 3 && p_dir == 3)) fail("ped wrap");
    for (int d = 0; d < 4; d++) begin
      checks += 2;
      if (ped_lamp[d].green  !== (d == p_dir && p_ph == 1) ||
          ped_lamp[d].yellow !== (d == p_dir && p_ph >= 2) ||
          ped_lamp[d].red    !== !(d == p_dir && p_ph >= 1))
        fail($sformatf("ped lamp %0d = %b", d, ped_lamp[d]));
      if (ped_walk[d].green !== (d == p_dir && p_ph == 3) ||
          ped_walk[d].red   !== !(d == p_dir && p_ph == 3))
        fail($sformatf("ped walk %0d = %b", d, ped_walk[d]));
    end
    // sequencer and decoder
    checks += 5;
    if (int'(seq_state) != q_state) fail($sformatf("seq state %0d expected %0d", seq_state, q_state));
    cur = 4'b0001 << q_state;
    nxt = 4'b0001 << ((q_state + 1) % 4);
    if (an !== 4'b1110) fail("an");
    if (grn !== cur) fail("grn");
    if (rd !== ~(cur | nxt)) fail("rd");
    if (ylw !== ~nxt) fail("ylw");
  endtask

  task automatic models_step();
    int nr, nr2;
    // sensor controller
    nr  = (s_state / 2 + 1) % 4;
    nr2 = (nr + 1) % 4;
    if (--s_left == 0) begin
      if (s_state % 2 == 0) begin
        s_state++; s_left = YT;
      end else begin
        if (!x[nr]) begin skips[nr]++; nr = nr2; end
        s_state = 2 * nr;
        s_left  = v[nr] ? GL : GS;
        if (v[nr]) longs++; else shorts++;
      end
    end
    // pedestrian controller
    if (--p_left == 0) begin
      if (p_ph == 3) begin
        walks[p_dir]++;
        if (p_dir == 3) wraps++;
        p_dir = (p_dir + 1) % 4; p_ph = 0;
      end else begin
        if (p_ph == 0) allreds++;
        p_ph++;
      end
      p_left = p_len(p_ph, p_dir);
      if (p_ph == 1) begin
        if (PMAIN[p_dir]) main_greens++; else side_greens++;
      end
    end
    // sequencer
    if (--q_left == 0) begin
      q_state = (q_state + 1) % 4;
      seqvis[q_state]++;
      q_left = (q_state % 2) ? QY : QG;
    end
  endtask

  task automatic run(input int cycles);
    logic tick;
    for (int cyc = 1; cyc <= cycles; cyc++) begin
      // value of the tick sampled at the coming edge
      tick = ((cyc - 1) % DIV == 0) && cyc > 1;
      if ($urandom_range(0, 15) == 0) x = 4'($urandom);
      if ($urandom_range(0, 15) == 0) v = 4'($urandom);
      #1;
      check_all(tick);
      @(posedge clk);
      if (tick) models_step();
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    // decoder blanking while reset is low
    checks += 3;
    if (grn !== 4'b0000 || rd !== 4'b1111 || ylw !== 4'b1111) fail("decoder not blanked in reset");
    else blanks++;
    if (an !== 4'b1110) fail("an in reset");
    if (sensor_state !== S0 || ped_dir !== DIR_N || seq_state !== HGRE_FRED) fail("reset state");
    models_reset();
    rst_n = 1'b1;
    run(20000);
    // reset in the middle of operation
    rst_n = 1'b0;
    #1;
    checks++;
    if (grn !== 4'b0000 || rd !== 4'b1111 || ylw !== 4'b1111) fail("decoder not blanked in reset");
    else blanks++;
    @(negedge clk);
    models_reset();
    rst_n = 1'b1;
    run(20000);
    // every mechanism must have happened
    for (int r = 0; r < 4; r++) begin
      checks += 3;
      if (skips[r] == 0)  fail($sformatf("road R%0d never skipped", r + 1));
      if (walks[r] == 0)  fail($sformatf("no pedestrian walk in dir %0d", r));
      if (seqvis[r] == 0) fail($sformatf("sequencer state %0d never entered", r));
    end
    checks += 5;
    if (longs == 0)   fail("no long green");
    if (shorts == 0)  fail("no short green");
    if (allreds == 0) fail("no all-red step");
    if (wraps == 0)   fail("no full round of directions");
    checks += 2;
    if (main_greens == 0) fail("no main-road green");
    if (side_greens == 0) fail("no side-road green");
    if (blanks < 2)   fail("decoder blanking not seen");
    $display("skips %0d %0d %0d %0d | long %0d short %0d | walks %0d %0d %0d %0d | all-red %0d rounds %0d main %0d side %0d | seq %0d %0d %0d %0d | blank %0d",
             skips[0], skips[1], skips[2], skips[3], longs, shorts, walks[0], walks[1], walks[2], walks[3],
             allreds, wraps, main_greens, side_greens, seqvis[0], seqvis[1], seqvis[2], seqvis[3], blanks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
