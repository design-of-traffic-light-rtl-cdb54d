// tb_phase_timer: checks that phase_timer expires on the dur-th tick.
//
// Ticks arrive every 3 cycles. The testbench keeps its own count of ticks
// since the last expiry and changes dur (0..6, random) only after an expiry,
// as the state machines do. expire must be high exactly on the tick that
// makes the count reach dur (dur 0 counts as 1) and nowhere else.
module tb_phase_timer;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       tick = 1'b0;
  logic [7:0] dur = 8'd3;
  logic       expire;
  int         checks = 0, failures = 0;
  int         seen = 0, expiries = 0;

  phase_timer #(.W(8)) dut (.clk(clk), .rst_n(rst_n), .tick(tick), .dur(dur), .expire(expire));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc = 0;
    int target;
    logic exp_expire;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (expiries < 200) begin
      cyc++;
      tick = (cyc % 3 == 0);
      #1;
      target = (dur == 0) ? 1 : int'(dur);
      exp_expire = tick && (seen + 1 == target);
      checks++;
      if (expire !== exp_expire) begin
        failures++;
        $display("cycle %0d: expire=%0b expected %0b (seen %0d dur %0d)", cyc, expire, exp_expire, seen, dur);
      end
      @(posedge clk);
      if (exp_expire) begin
        seen = 0;
        expiries++;
      end else if (tick) begin
        seen++;
      end
      @(negedge clk);
      if (exp_expire) dur = 8'($urandom_range(0, 6));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
