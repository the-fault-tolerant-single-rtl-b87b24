// rc_module: one controller module of the reconfiguration controller in
// coarse-grained TMR: a fault detection and the GPDRC it feeds, placed
// together in one reconfigurable partition.
//
// The fault detection compares the three payload copies and the three
// controller modules' output bundles and marks the faulty ones; the GPDRC
// repairs the partitions on the voted error bus. Three rc_module instances
// run in lock-step. Their rc_o bundles are voted before they reach the flash
// and the ICAP; the voted restart mask comes back on ack_i and clears the
// marks of the repaired partition in all three detectors.
//
// Reset: rst_i is the system reset. restart_i is this module's own restart
// after its partition has been rewritten (the voted restart pulse of that
// partition); it puts the GPDRC into idle and clears the detector's marks,
// exactly as at power-up. Because the GPDRC acts on the marks voted across
// the three detectors, the restarted module follows the same pending
// repairs as the other two from the next cycle on.
//
// Grouping one detector and one GPDRC per partition follows the design; the
// signals between them and the three modules are this implementation's choice.
module rc_module
  import gpdrc_pkg::*;
#(
  parameter int unsigned PRM_W      = 36,
  parameter int unsigned BS_WORDS   = 4096,
  parameter int unsigned FLASH_BASE = 0
) (
  input  logic             clk_i,
  input  logic             rst_i,
  input  logic             restart_i,
  input  logic [PRM_W-1:0] prm_i [NUM_COPIES],
  input  rc_bus_t          rc_all_i [NUM_COPIES],
  input  rp_mask_t         err_all_i [NUM_COPIES],
  input  rp_mask_t         ack_i,
  input  word_t            flash_data_i,
  input  logic             flash_valid_i,
  output rc_bus_t          rc_o,
  output rp_mask_t         err_o,
  output logic             busy_o
);

  logic     rst_local;
  rp_mask_t err;

  assign rst_local = rst_i | restart_i;

  fault_detection #(.PRM_W(PRM_W)) u_detect (
    .clk_i      (clk_i),
    .rst_i      (rst_local),
    .prm_i      (prm_i),
    .rc_i       (rc_all_i),
    .err_all_i  (err_all_i),
    .ack_i      (ack_i),
    .err_o      (err_o),
    .err_vote_o (err)
  );

  gpdrc #(.BS_WORDS(BS_WORDS), .FLASH_BASE(FLASH_BASE)) u_gpdrc (
    .clk_i         (clk_i),
    .rst_i         (rst_local),
    .err_i         (err),
    .flash_data_i  (flash_data_i),
    .flash_valid_i (flash_valid_i),
    .rc_o          (rc_o),
    .busy_o        (busy_o)
  );

endmodule
