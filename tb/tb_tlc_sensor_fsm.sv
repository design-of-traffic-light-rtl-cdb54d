// tb_tlc_sensor_fsm: checks the road-skipping controller against a model.
//
// A behavioural model in this testbench keeps the expected state S0..S7 and
// the ticks left in it, and applies the rules of the junction: green -> yellow
// of the same road; at the end of a yellow the next road's green if its
// presence sensor is high, otherwise the green of the road after it; a green
// lasts GREEN_LONG ticks if the road's volume sensor was high when it was
// entered, else GREEN_SHORT; a yellow lasts YELLOW_TICKS. Ticks are given every
// 2 cycles and the sensors change at random. Every cycle the state, all twelve
// lamps and the skip pulse are compared. Coverage: each of the four skips and
// both green lengths must occur.
module tb_tlc_sensor_fsm;
  import tlc_pkg::*;

  localparam int GS = 2, GL = 5, YT = 1;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          tick = 1'b0;
  logic [3:0]    x = 4'hf, v = 4'h0;
  lamp_t         road [4];
  sensor_state_e state;
  logic          skip;
  int            checks = 0, failures = 0;
  int            skips [4] = '{0, 0, 0, 0};
  int            longs = 0, shorts = 0;

  tlc_sensor_fsm #(.GREEN_SHORT(GS), .GREEN_LONG(GL), .YELLOW_TICKS(YT)) dut (
    .clk(clk), .rst_n(rst_n), .tick(tick), .x(x), .v(v),
    .road(road), .state(state), .skip(skip));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_state, m_left;

  task automatic check_outputs(input logic exp_skip);
    checks++;
    if (int'(state) != m_state) begin
      failures++;
      $display("%0t: state S%0d expected S%0d", $time, state, m_state);
    end
    for (int r = 0; r < 4; r++) begin
      lamp_t want;
      if (m_state == 2 * r)          want = '{red: 0, yellow: 0, green: 1};
      else if (m_state == 2 * r + 1) want = '{red: 0, yellow: 1, green: 0};
      else                           want = '{red: 1, yellow: 0, green: 0};
      checks++;
      if (road[r] !== want) begin
        failures++;
        $display("%0t: R%0d lamps %b expected %b (S%0d)", $time, r + 1, road[r], want, m_state);
      end
    end
    checks++;
    if (skip !== exp_skip) begin
      failures++;
      $display("%0t: skip %b expected %b", $time, skip, exp_skip);
    end
  endtask

  initial begin
    int cyc = 0;
    int nr, nr2;
    logic exp_skip;
    m_state = 0;
    m_left  = GS;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (cyc < 20000) begin
      cyc++;
      tick = (cyc % 2 == 0);
      if ($urandom_range(0, 9) == 0) x = 4'($urandom);
      if ($urandom_range(0, 9) == 0) v = 4'($urandom);
      #1;
      nr  = (m_state / 2 + 1) % 4;
      nr2 = (nr + 1) % 4;
      exp_skip = tick && (m_left == 1) && (m_state % 2 == 1) && !x[nr];
      check_outputs(exp_skip);
      @(posedge clk);
      if (tick) begin
        m_left--;
        if (m_left == 0) begin
          if (m_state % 2 == 0) begin
            m_state++;
            m_left = YT;
          end else if (x[nr]) begin
            m_state = 2 * nr;
            m_left  = v[nr] ? GL : GS;
            if (v[nr]) longs++; else shorts++;
          end else begin
            skips[nr]++;
            m_state = 2 * nr2;
            m_left  = v[nr2] ? GL : GS;
            if (v[nr2]) longs++; else shorts++;
          end
        end
      end
      @(negedge clk);
    end
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (skips[r] == 0) begin failures++; $display("R%0d never skipped", r + 1); end
    end
    checks++;
    if (longs == 0 || shorts == 0) begin failures++; $display("green lengths not both seen"); end
    $display("skips R1..R4: %0d %0d %0d %0d, long greens %0d, short greens %0d",
             skips[0], skips[1], skips[2], skips[3], longs, shorts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
