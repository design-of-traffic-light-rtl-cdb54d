// tb_tlc_top_defaults: the top at its default parameters for its first ticks.
//
// With the defaults (50 MHz clock divided to a 1 s tick, greens of 30 s and
// more) a whole signal round is several billion clock cycles, too long to
// simulate here. This test runs the first 2.4 s (120 million cycles): the
// internal tick must fire exactly at cycles 50,000,000 and 100,000,000 after
// reset, and every controller must stay in its first state (R1 green, North
// all-red, sequencer 00) with the matching lamps and decoder outputs, except
// that North leaves its 1 s all-red step for green on the first tick.
module tb_tlc_top_defaults;
  import tlc_pkg::*;

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
  int            checks = 0, failures = 0;

  tlc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (130_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_first_states(input int ticks);
    cnt_e  want_cnt;
    lamp_t want_n;
    want_cnt = (ticks == 0) ? CNT_ALL_RED : CNT_GREEN;
    want_n   = (ticks == 0) ? LAMP_RED : LAMP_GREEN;
    checks++;
    if (sensor_state !== S0 || sensor_road[0] !== LAMP_GREEN || sensor_road[1] !== LAMP_RED ||
        ped_dir !== DIR_N || ped_cnt !== want_cnt || ped_lamp[0] !== want_n ||
        seq_state !== HGRE_FRED || grn !== 4'b0001 || rd !== 4'b1100 || ylw !== 4'b1101 ||
        an !== 4'b1110) begin
      failures++;
      $display("%0t: left the first states too early", $time);
    end
  endtask

  initial begin
    int cyc = 0;
    int ticks = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (cyc < 120_000_000) begin
      @(posedge clk);
      cyc++;
      #1;
      if (cyc % 10_000_000 == 0) check_first_states(ticks);
      if (dut.tick) begin
        ticks++;
        checks++;
        if (cyc != ticks * 50_000_000) begin
          failures++;
          $display("tick %0d at cycle %0d", ticks, cyc);
        end
      end
    end
    checks++;
    if (ticks != 2) begin failures++; $display("%0d ticks in 2.4 s", ticks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
