// fault_detection: finds which copy of the payload and which controller module
// has failed, and drives the PRM error bus of one GPDRC.
//
// It watches the outputs of the three payload PRMs and the output bundles of
// the three controller modules. A copy whose output differs from the bitwise
// majority of the three is marked faulty. A mark is sticky: it stays set until
// the controller acknowledges that it has rewritten that partition, so a
// fault seen for a single cycle still gets repaired.
//
// The marks are themselves kept in TMR: each detector takes the marks of all
// three detectors (err_all_i, its own included), votes them, and builds its
// next marks from the vote. The voted marks (err_vote_o) are what its GPDRC
// acts on. A detector that has just been rewritten and restarted with no
// marks therefore sees, and hands to its GPDRC, the same pending repairs as
// the other two from its first cycle on, and an upset mark heals itself in
// one cycle. ack_i is the voted restart mask of the controller, the same for
// all three detectors.
//
// err_o bit map (one bit per reconfigurable partition):
//   [0..2] payload PRM1..PRM3      [3..5] controller modules 1..3
//
// Timing: a mismatch at cycle t shows on err_o at t+1 (and on err_vote_o once
// two detectors have it). ack_i clears its bit at the next edge and wins over
// a mismatch seen in the same cycle: in that cycle the controller module
// being restarted is still out of step with the other two.
//
// That the detector compares the copies and feeds the error bus of the GPDRC
// follows the design; the comparison against the majority, the sticky marks,
// their voting and the acknowledge are this implementation's choices.
module fault_detection
  import gpdrc_pkg::*;
#(
  parameter int unsigned PRM_W = 36
) (
  input  logic             clk_i,
  input  logic             rst_i,
  input  logic [PRM_W-1:0] prm_i [NUM_COPIES],
  input  rc_bus_t          rc_i  [NUM_COPIES],
  input  rp_mask_t         err_all_i [NUM_COPIES],
  input  rp_mask_t         ack_i,
  output rp_mask_t         err_o,
  output rp_mask_t         err_vote_o
);

  logic [PRM_W-1:0]    prm_vote;
  logic [RC_BUS_W-1:0] rc_vote;
  rp_mask_t            mismatch;
  rp_mask_t            err_q;
  rp_mask_t            err_vote;

  tmr_voter #(.W(PRM_W)) u_prm_vote (
    .a_i(prm_i[0]), .b_i(prm_i[1]), .c_i(prm_i[2]), .y_o(prm_vote)
  );

  tmr_voter #(.W(RC_BUS_W)) u_rc_vote (
    .a_i(rc_i[0]), .b_i(rc_i[1]), .c_i(rc_i[2]), .y_o(rc_vote)
  );

  tmr_voter #(.W(NUM_RP)) u_err_vote (
    .a_i(err_all_i[0]), .b_i(err_all_i[1]), .c_i(err_all_i[2]), .y_o(err_vote)
  );

  always_comb begin
    for (int unsigned m = 0; m < NUM_COPIES; m++) begin
      mismatch[m]              = (prm_i[m] != prm_vote);
      mismatch[RC_RP_BASE + m] = (rc_i[m] != rc_vote);
    end
  end

  always_ff @(posedge clk_i) begin
    if (rst_i) err_q <= '0;
    else       err_q <= (err_vote | mismatch) & ~ack_i;
  end

  assign err_o      = err_q;
  assign err_vote_o = err_vote;

endmodule
