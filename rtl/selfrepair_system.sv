// selfrepair_system: a payload circuit in TMR together with a self-repairing
// reconfiguration controller in coarse-grained TMR (CGTMR), all on one FPGA.
//
// The three copies of the payload (PRM1..PRM3) sit outside this module in
// their own reconfigurable partitions; their outputs come in on prm_i and are
// voted onto out_o, so one faulty copy is masked. Three controller modules
// (rc_module: fault detection + GPDRC) watch the payload copies and each
// other. When a copy disagrees with the majority, the controller copies that
// partition's partial bitstream from flash to the ICAP and then pulses the
// partition's restart. The three controller bundles are voted by the RC output
// voters before they reach the flash and the ICAP, so a faulty controller
// module is masked too, and the controller rewrites it like any payload copy:
// the voted restart pulse of a controller partition restarts that rc_module.
// The voted restart mask also acknowledges the repair to all three fault
// detections, and the detectors' marks are exchanged and voted, so a
// restarted module rejoins the other two in step.
//
// Interface: flash_* is a simple read port (one request, one word back on
// flash_valid_i some cycles later). icap_* follows the 32-bit Virtex-5 ICAP
// port: active-low chip enable and active-low write, one word per cycle with
// icap_ce_n_o low. prm_rst_o[k] is a one-cycle pulse after PRM k+1 has been
// rewritten. All outputs except out_o come from registers of the controller
// modules through the voters; out_o is combinational from prm_i.
//
// The structure (voted payload, three controller modules with their own fault
// detection, RC output voters, flash in, ICAP and flash out) follows the
// design. Port widths, the flash handshake and the restart pulses are this
// implementation's choices.
module selfrepair_system
  import gpdrc_pkg::*;
#(
  parameter int unsigned PRM_W      = 36,
  parameter int unsigned BS_WORDS   = 4096,
  parameter int unsigned FLASH_BASE = 0
) (
  input  logic             clk_i,
  input  logic             rst_i,
  // payload copies
  input  logic [PRM_W-1:0] prm_i [NUM_COPIES],
  output logic [PRM_W-1:0] out_o,
  output logic [NUM_COPIES-1:0] prm_rst_o,
  // flash memory
  output logic             flash_rd_o,
  output flash_addr_t      flash_addr_o,
  input  word_t            flash_data_i,
  input  logic             flash_valid_i,
  // ICAP
  output logic             icap_ce_n_o,
  output logic             icap_wr_n_o,
  output word_t            icap_data_o,
  // status of the voted controller
  output rp_mask_t         rc_err_o,
  output logic             rc_busy_o
);

  rc_bus_t  rc_each [NUM_COPIES];
  rc_bus_t  rc_voted;
  rp_mask_t err_each [NUM_COPIES];
  logic [NUM_COPIES-1:0] busy_each;

  // Payload output voter.
  tmr_voter #(.W(PRM_W)) u_out_vote (
    .a_i(prm_i[0]), .b_i(prm_i[1]), .c_i(prm_i[2]), .y_o(out_o)
  );

  // Controller modules in CGTMR.
  for (genvar m = 0; m < NUM_COPIES; m++) begin : g_rc
    rc_module #(
      .PRM_W(PRM_W), .BS_WORDS(BS_WORDS), .FLASH_BASE(FLASH_BASE)
    ) u_rc (
      .clk_i         (clk_i),
      .rst_i         (rst_i),
      .restart_i     (rc_voted.rp_reset[RC_RP_BASE + m]),
      .prm_i         (prm_i),
      .rc_all_i      (rc_each),
      .err_all_i     (err_each),
      .ack_i         (rc_voted.rp_reset),
      .flash_data_i  (flash_data_i),
      .flash_valid_i (flash_valid_i),
      .rc_o          (rc_each[m]),
      .err_o         (err_each[m]),
      .busy_o        (busy_each[m])
    );
  end

  // RC output voters.
  rc_output_voter u_rc_vote (
    .rc_i (rc_each),
    .rc_o (rc_voted)
  );

  // Status: majority of the three copies.
  tmr_voter #(.W(NUM_RP)) u_err_vote (
    .a_i(err_each[0]), .b_i(err_each[1]), .c_i(err_each[2]), .y_o(rc_err_o)
  );
  assign rc_busy_o = (busy_each[0] & busy_each[1]) | (busy_each[0] & busy_each[2])
                   | (busy_each[1] & busy_each[2]);

  assign flash_rd_o   = rc_voted.flash_rd;
  assign flash_addr_o = rc_voted.flash_addr;
  assign icap_ce_n_o  = ~rc_voted.icap_we;
  assign icap_wr_n_o  = ~rc_voted.icap_we;
  assign icap_data_o  = rc_voted.icap_data;
  assign prm_rst_o    = rc_voted.rp_reset[NUM_COPIES-1:0];

endmodule
