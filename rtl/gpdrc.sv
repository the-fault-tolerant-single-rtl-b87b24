// gpdrc: generic partial dynamic reconfiguration controller (one copy).
//
// The controller repairs a reconfigurable partition (RP) by rewriting it: when
// its error bus reports a faulty RP it copies that RP's partial bitstream,
// word by word, from the flash memory to the ICAP configuration port, and then
// restarts the RP. It is idle otherwise. Three copies of it run in lock-step,
// each in its own RP together with its fault detection; because the RPs of the
// controller modules are on the error bus too, the triplicated controller can
// rewrite any one of its own copies while that copy keeps running.
//
// Flash layout: the bitstream of RP k occupies BS_WORDS words from word address
// FLASH_BASE + k*BS_WORDS. Each bitstream is a complete partial bitstream,
// headers and commands included, so the controller only streams it.
//
// Operation (one word is moved at a time):
//   IDLE  : waits for a set bit in err_i; picks the RP to repair, controller
//           modules (RP 3..5) first, then the payload (RP 0..2), lower number
//           first within each group.
//   REQ   : one cycle, rc_o.flash_rd = 1 with rc_o.flash_addr.
//   WAIT  : waits for flash_valid_i, then holds flash_data_i.
//   WRITE : one cycle, rc_o.icap_we = 1 with rc_o.icap_data; then REQ for the
//           next word, or DONE after the last.
//   DONE  : one cycle, rc_o.rp_reset set on the repaired RP's bit. The voted
//           rp_reset is both the restart of that RP and the acknowledge
//           that clears its error mark.
// With a flash that answers L cycles after the request one word takes L+2
// cycles and a whole repair 1 + BS_WORDS*(L+2) + 1 cycles from the error bit.
// Every field of rc_o is zero outside the cycles above, so the three copies'
// outputs agree whenever they are healthy and in step.
//
// The function (error bus in, flash and ICAP out, repair of payload and of its
// own modules) follows the design. The state machine, the flash handshake, the
// order of repairs, the bitstream layout and the restart pulse are this
// implementation's choices.
module gpdrc
  import gpdrc_pkg::*;
#(
  parameter int unsigned BS_WORDS   = 4096,
  parameter int unsigned FLASH_BASE = 0
) (
  input  logic     clk_i,
  input  logic     rst_i,
  input  rp_mask_t err_i,
  input  word_t    flash_data_i,
  input  logic     flash_valid_i,
  output rc_bus_t  rc_o,
  output logic     busy_o
);

  typedef enum logic [2:0] {
    S_IDLE, S_REQ, S_WAIT, S_WRITE, S_DONE
  } state_e;

  localparam int unsigned RP_W  = $clog2(NUM_RP);
  localparam int unsigned CNT_W = (BS_WORDS > 1) ? $clog2(BS_WORDS) : 1;

  state_e            state_q;
  logic [RP_W-1:0]   rp_q;
  flash_addr_t       addr_q;
  logic [CNT_W-1:0]  cnt_q;
  word_t             data_q;

  // RP chosen for repair in IDLE.
  logic              pick_valid;
  logic [RP_W-1:0]   pick_rp;

  always_comb begin
    pick_valid = 1'b0;
    pick_rp    = '0;
    // Payload first in the loop, then controller modules, so the last match
    // (the highest priority) wins: controller modules, lower number first.
    for (int i = int'(RC_RP_BASE) - 1; i >= 0; i--) begin
      if (err_i[i]) begin
        pick_valid = 1'b1;
        pick_rp    = RP_W'(i);
      end
    end
    for (int i = int'(NUM_RP) - 1; i >= int'(RC_RP_BASE); i--) begin
      if (err_i[i]) begin
        pick_valid = 1'b1;
        pick_rp    = RP_W'(i);
      end
    end
  end

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      state_q <= S_IDLE;
      rp_q    <= '0;
      addr_q  <= '0;
      cnt_q   <= '0;
      data_q  <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (pick_valid) begin
          rp_q    <= pick_rp;
          addr_q  <= flash_addr_t'(FLASH_BASE + 32'(pick_rp) * BS_WORDS);
          cnt_q   <= '0;
          state_q <= S_REQ;
        end
        S_REQ:  state_q <= S_WAIT;
        S_WAIT: if (flash_valid_i) begin
          data_q  <= flash_data_i;
          state_q <= S_WRITE;
        end
        S_WRITE: begin
          if (cnt_q == CNT_W'(BS_WORDS - 1)) begin
            state_q <= S_DONE;
          end else begin
            cnt_q   <= cnt_q + 1'b1;
            addr_q  <= addr_q + 1'b1;
            state_q <= S_REQ;
          end
        end
        S_DONE:  state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    rc_o = '0;
    unique case (state_q)
      S_REQ: begin
        rc_o.flash_rd   = 1'b1;
        rc_o.flash_addr = addr_q;
      end
      S_WRITE: begin
        rc_o.icap_we    = 1'b1;
        rc_o.icap_data  = data_q;
      end
      S_DONE: begin
        rc_o.rp_reset[rp_q] = 1'b1;
      end
      default: ;
    endcase
  end

  assign busy_o = (state_q != S_IDLE);

endmodule
