// gpdrc_pkg: constants and types shared by the self-repairing reconfiguration
// controller (GPDRC in coarse-grained TMR) and the voters around it.
//
// The system has six reconfigurable partitions (RPs): the three copies of the
// payload circuit (PRM1..PRM3, RP 0..2) and the three controller modules, each
// holding one GPDRC and its fault detection (RP 3..5). The triplication of both
// follows the design; the partition numbering, the flash and ICAP widths and
// the layout of the controller output bundle are this design's own choices.
package gpdrc_pkg;

  // Copies of every triplicated part (TMR).
  localparam int unsigned NUM_COPIES = 3;
  // Reconfigurable partitions: 3 payload PRMs + 3 controller modules.
  localparam int unsigned NUM_RP     = 2 * NUM_COPIES;
  // First RP index of the controller modules.
  localparam int unsigned RC_RP_BASE = NUM_COPIES;

  // Flash word address width and data width (32-bit ICAP port).
  localparam int unsigned FLASH_AW = 24;
  localparam int unsigned DATA_W   = 32;

  typedef logic [NUM_RP-1:0]   rp_mask_t;
  typedef logic [FLASH_AW-1:0] flash_addr_t;
  typedef logic [DATA_W-1:0]   word_t;

  // Everything one GPDRC drives out of its module: the flash read request,
  // the ICAP write and the restart pulse of the partition just rewritten.
  // Every field is zero while the controller is idle, so the three copies'
  // bundles can be compared at any time.
  typedef struct packed {
    logic        flash_rd;    // one-cycle read request for flash_addr
    flash_addr_t flash_addr;  // word address, zero unless flash_rd
    logic        icap_we;     // one configuration word for ICAP
    word_t       icap_data;   // zero unless icap_we
    rp_mask_t    rp_reset;    // one-cycle restart of the repaired RP
  } rc_bus_t;

  localparam int unsigned RC_BUS_W = $bits(rc_bus_t);

endpackage
