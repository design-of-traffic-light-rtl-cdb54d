// tb_tick_divider: checks that tick_divider pulses once every DIV cycles.
//
// With DIV = 5 the first tick must come in the 5th cycle after reset is
// released, and every following tick exactly 5 cycles after the previous one,
// each lasting one cycle. A watchdog ends the run if it hangs.
module tb_tick_divider;
  localparam int unsigned DIV = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tick;
  int   checks = 0, failures = 0;

  tick_divider #(.DIV(DIV)) dut (.clk(clk), .rst_n(rst_n), .tick(tick));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    int ticks;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    cyc = 0;
    ticks = 0;
    // sample in the middle of each cycle
    while (ticks < 40) begin
      @(negedge clk);
      cyc++;
      checks++;
      if (tick !== (cyc % DIV == 0)) begin
        failures++;
        $display("cycle %0d: tick=%0b expected %0b", cyc, tick, cyc % DIV == 0);
      end
      if (tick) ticks++;
    end
    // reset in the middle restarts the count
    rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    repeat (DIV - 1) begin
      @(negedge clk);
      checks++;
      if (tick) begin failures++; $display("tick too early after reset"); end
    end
    @(negedge clk);
    checks++;
    if (!tick) begin failures++; $display("no tick DIV cycles after reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
