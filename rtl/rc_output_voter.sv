// rc_output_voter: the RC output voters of the triplicated reconfiguration
// controller.
//
// The three controller modules each drive a complete rc_bus_t (flash read
// request and address, ICAP write strobe and data, partition restart pulses).
// This block votes every bit of the three bundles, so a controller module that
// has failed, or that is itself being rewritten, cannot disturb the flash or
// the ICAP. Combinational, no latency. The voters follow the design; voting the
// whole bundle bit by bit is this implementation's choice.
module rc_output_voter
  import gpdrc_pkg::*;
(
  input  rc_bus_t rc_i [NUM_COPIES],
  output rc_bus_t rc_o
);

  logic [RC_BUS_W-1:0] voted;

  tmr_voter #(.W(RC_BUS_W)) u_vote (
    .a_i(rc_i[0]),
    .b_i(rc_i[1]),
    .c_i(rc_i[2]),
    .y_o(voted)
  );

  always_comb rc_o = rc_bus_t'(voted);

endmodule
