// tb_tlc_waveform: replays the published 200 ns simulation of the lamp decoder.
//
// The state input steps every 20 ns through 00, 01, 01, 10, 11, 00, 01, 10,
// 11, 00, and reset is pulled low from 20 ns to 40 ns. In each 20 ns window
// the outputs are compared with the values of the published waveform, given
// here as literals: an stays 1110, and grn/rd/ylw are 0001/1100/1101 in state
// 00, 0010/1001/1011 in 01, 0100/0011/0111 in 10, 1000/0110/1110 in 11 and
// 0000/1111/1111 while reset is low.
module tb_tlc_waveform;
  logic [1:0] state;
  logic       reset;
  logic [3:0] an, grn, rd, ylw;
  int         checks = 0, failures = 0;

  typedef struct {
    logic [1:0] state;
    logic       reset;
    logic [3:0] grn, rd, ylw;
  } step_t;

  step_t steps [10] = '{
    '{2'b00, 1'b1, 4'b0001, 4'b1100, 4'b1101},
    '{2'b01, 1'b0, 4'b0000, 4'b1111, 4'b1111},
    '{2'b01, 1'b1, 4'b0010, 4'b1001, 4'b1011},
    '{2'b10, 1'b1, 4'b0100, 4'b0011, 4'b0111},
    '{2'b11, 1'b1, 4'b1000, 4'b0110, 4'b1110},
    '{2'b00, 1'b1, 4'b0001, 4'b1100, 4'b1101},
    '{2'b01, 1'b1, 4'b0010, 4'b1001, 4'b1011},
    '{2'b10, 1'b1, 4'b0100, 4'b0011, 4'b0111},
    '{2'b11, 1'b1, 4'b1000, 4'b0110, 4'b1110},
    '{2'b00, 1'b1, 4'b0001, 4'b1100, 4'b1101}
  };

  tlc_lamp_decoder dut (.state(state), .reset(reset), .an(an), .grn(grn), .rd(rd), .ylw(ylw));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10; i++) begin
      state = steps[i].state;
      reset = steps[i].reset;
      #10;  // middle of the 20 ns window
      checks += 4;
      if (an  !== 4'b1110)      begin failures++; $display("%0t ns: an %b", $time, an); end
      if (grn !== steps[i].grn) begin failures++; $display("%0t ns: grn %b expected %b", $time, grn, steps[i].grn); end
      if (rd  !== steps[i].rd)  begin failures++; $display("%0t ns: rd %b expected %b", $time, rd, steps[i].rd); end
      if (ylw !== steps[i].ylw) begin failures++; $display("%0t ns: ylw %b expected %b", $time, ylw, steps[i].ylw); end
      #10;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
