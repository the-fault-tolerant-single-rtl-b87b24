// prm_model: behavioural stand-in for one copy of the payload circuit in its
// reconfigurable partition, for simulation only.
//
// The payload computes out = (in * 36'h1F3) ^ 36'h0F0F (registered, one cycle
// latency). A configuration upset is modelled by fault_mask_i, which is XORed
// onto the output while it is nonzero; the testbench clears it when the
// partition has been rewritten.
module prm_model #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 36
) (
  input  logic             clk_i,
  input  logic [IN_W-1:0]  in_i,
  input  logic [OUT_W-1:0] fault_mask_i,
  output logic [OUT_W-1:0] out_o
);

  logic [OUT_W-1:0] q;

  always_ff @(posedge clk_i) q <= (OUT_W'(in_i) * OUT_W'(12'h1F3)) ^ OUT_W'(16'h0F0F);

  assign out_o = q ^ fault_mask_i;

endmodule
