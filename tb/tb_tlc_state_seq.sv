// tb_tlc_state_seq: checks the four-state sequencer's order and timing.
//
// With GREEN_TICKS = 4, YELLOW_TICKS = 2 and a tick every 2 cycles, the state
// must walk 00 -> 01 -> 10 -> 11 -> 00 and stay 8 cycles in each green state
// (00, 10) and 4 in each yellow state (01, 11); the first state is timed from
// reset. Every cycle the state is compared with a cycle-count schedule.
module tb_tlc_state_seq;
  import tlc_pkg::*;

  localparam int GT = 4, YT = 2, TPER = 2;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       tick = 1'b0;
  seq_state_e state;
  int         checks = 0, failures = 0;

  tlc_state_seq #(.GREEN_TICKS(GT), .YELLOW_TICKS(YT)) dut (
    .clk(clk), .rst_n(rst_n), .tick(tick), .state(state));

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
    int round_len, pos, want;
    round_len = 2 * (GT + YT) * TPER;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    #1;
    checks++;
    if (state !== HGRE_FRED) begin failures++; $display("not in 00 after reset"); end
    while (cyc < 2000) begin
      @(negedge clk);
      // state seen after `cyc` edges; tick was high on even cycle numbers
      pos = cyc % round_len;
      if (pos < GT * TPER) want = 0;
      else if (pos < (GT + YT) * TPER) want = 1;
      else if (pos < (2 * GT + YT) * TPER) want = 2;
      else want = 3;
      checks++;
      if (int'(state) != want) begin
        failures++;
        $display("cycle %0d: state %b expected %0d", cyc, state, want);
      end
      cyc++;
      tick = (cyc % TPER == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
