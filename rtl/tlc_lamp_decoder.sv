// tlc_lamp_decoder: lamp outputs of the four-way controller from its state.
//
// A purely combinational decoder. The 2-bit state s selects which of four
// lamp positions is released: grn is the one-hot code of s (00 -> 0001,
// 01 -> 0010, 10 -> 0100, 11 -> 1000). ylw is low only at position s+1
// (mod 4), and rd is low at positions s and s+1, high elsewhere:
//
//   state  grn   rd    ylw
//    00    0001  1100  1101
//    01    0010  1001  1011
//    10    0100  0011  0111
//    11    1000  0110  1110
//
// While `reset` is low the decoder blanks to grn 0000, rd 1111, ylw 1111.
// The an output is the constant 1110 (4'he) at all times. The table, the
// active-low reset and an = 4'he are those of the published schematic and
// simulation of this decoder; the lamp polarities are kept exactly as there,
// with no reinterpretation.
//
// Ports: state[1:0], reset (active low), an, grn, rd, ylw (4 bits each).
module tlc_lamp_decoder (
  input  logic [1:0] state,
  input  logic       reset,
  output logic [3:0] an,
  output logic [3:0] grn,
  output logic [3:0] rd,
  output logic [3:0] ylw
);

  logic [3:0] cur, nxt;

  always_comb begin
    cur = 4'b0001 << state;
    nxt = 4'b0001 << (state + 2'd1);
    an  = 4'he;
    if (!reset) begin
      grn = 4'b0000;
      rd  = 4'b1111;
      ylw = 4'b1111;
    end else begin
      grn = cur;
      rd  = ~(cur | nxt);
      ylw = ~nxt;
    end
  end

endmodule
