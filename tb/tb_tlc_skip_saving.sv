// tb_tlc_skip_saving: how much skipping empty roads shortens the signal round.
//
// The road-skipping controller runs with equal greens (G = 6 ticks) and
// yellows (Y = 1 tick) and a tick every cycle, under fixed sensor patterns.
// For each pattern it measures the round length (S0 to the next S0) and the
// time R1 spends red. A fixed-time controller always needs 4 x (G + Y) = 28
// ticks per round, and R1 waits 21 of them. Expected values:
//   all roads occupied     : round 28, R1 red 21 (no saving)
//   R3 empty               : round 21, R1 red 14 (round 25 % shorter)
//   R2 and R4 empty        : round 14, R1 red  7 (round 50 % shorter)
//   only R1 occupied       : R1, R3 alternate (one skip per step): round 14
// Each measurement is taken over three rounds after the pattern has settled.
module tb_tlc_skip_saving;
  import tlc_pkg::*;

  localparam int G = 6, Y = 1;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [3:0]    x = 4'hf;
  lamp_t         road [4];
  sensor_state_e state;
  logic          skip;
  int            checks = 0, failures = 0;

  tlc_sensor_fsm #(.GREEN_SHORT(G), .GREEN_LONG(G), .YELLOW_TICKS(Y)) dut (
    .clk(clk), .rst_n(rst_n), .tick(1'b1), .x(x), .v(4'h0),
    .road(road), .state(state), .skip(skip));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Wait for the next entry into S0.
  task automatic sync();
    logic was;
    do begin
      was = (state == S0);
      @(posedge clk);
      #1;
    end while (!(state == S0 && !was));
  endtask

  // Called just after an entry into S0: cycles to the next entry, and how
  // many of them R1 was red.
  task automatic one_round(output int len, output int red);
    logic was;
    len = 0;
    red = 0;
    do begin
      if (road[0].red) red++;
      len++;
      was = (state == S0);
      @(posedge clk);
      #1;
    end while (!(state == S0 && !was));
  endtask

  task automatic measure(input logic [3:0] pattern, input int want_len, input int want_red,
                         input string name);
    int len, red;
    x = pattern;
    // settle: one round, then start at an entry into S0
    sync();
    sync();
    for (int i = 0; i < 3; i++) begin
      one_round(len, red);
      checks += 2;
      if (len != want_len) begin failures++; $display("%s: round %0d, expected %0d", name, len, want_len); end
      if (red != want_red) begin failures++; $display("%s: R1 red %0d, expected %0d", name, red, want_red); end
    end
    $display("%-20s round %0d ticks (fixed time %0d, %0d %% shorter), R1 red %0d ticks",
             name, len, 4 * (G + Y), 100 - 100 * len / (4 * (G + Y)), red);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    measure(4'b1111, 28, 21, "all occupied");
    measure(4'b1011, 21, 14, "R3 empty");
    measure(4'b0101, 14, 7,  "R2, R4 empty");
    measure(4'b0001, 14, 7,  "only R1 occupied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
