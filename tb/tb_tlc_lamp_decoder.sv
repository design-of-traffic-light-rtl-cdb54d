// tb_tlc_lamp_decoder: exhaustive check of the lamp decoder.
//
// All four states are applied with reset high and low. The expected values
// are the published truth table, written out as literals:
//   00 -> grn 0001 rd 1100 ylw 1101,  01 -> 0010 1001 1011,
//   10 -> 0100 0011 0111,             11 -> 1000 0110 1110,
// reset low -> grn 0000 rd 1111 ylw 1111; an = 1110 always.
module tb_tlc_lamp_decoder;
  logic [1:0] state;
  logic       reset;
  logic [3:0] an, grn, rd, ylw;
  int         checks = 0, failures = 0;

  logic [3:0] exp_grn [4] = '{4'b0001, 4'b0010, 4'b0100, 4'b1000};
  logic [3:0] exp_rd  [4] = '{4'b1100, 4'b1001, 4'b0011, 4'b0110};
  logic [3:0] exp_ylw [4] = '{4'b1101, 4'b1011, 4'b0111, 4'b1110};

  tlc_lamp_decoder dut (.state(state), .reset(reset), .an(an), .grn(grn), .rd(rd), .ylw(ylw));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [3:0] got, input logic [3:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("state %b reset %b: %s = %b, expected %b", state, reset, what, got, want);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      for (int s = 0; s < 4; s++) begin
        for (int r = 0; r < 2; r++) begin
          state = 2'(s);
          reset = 1'(r);
          #10;
          check(an, 4'b1110, "an");
          check(grn, r ? exp_grn[s] : 4'b0000, "grn");
          check(rd,  r ? exp_rd[s]  : 4'b1111, "rd");
          check(ylw, r ? exp_ylw[s] : 4'b1111, "ylw");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
