// tmr_voter: bitwise two-out-of-three majority of three copies of a W-bit word.
//
// This is the output voter that masks a fault in one of the three copies of a
// triplicated module. Each output bit is the majority of the same bit of the
// three inputs, so any number of bits may be wrong as long as they are wrong in
// one copy only. Purely combinational, no latency. The voter itself follows the
// design; the bitwise form is this implementation's choice.
module tmr_voter #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic [W-1:0] c_i,
  output logic [W-1:0] y_o
);

  always_comb y_o = (a_i & b_i) | (a_i & c_i) | (b_i & c_i);

endmodule
