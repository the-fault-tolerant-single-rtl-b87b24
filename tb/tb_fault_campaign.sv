// tb_fault_campaign: a random fault-injection run of the self-repairing system
// at its default size, in the spirit of an MTTF experiment.
//
// Faults arrive at random intervals (on average about one repair time apart)
// in random partitions: payload copies get a random output mask (a
// configuration upset), controller modules get either a one-cycle upset of
// their error bus, a few cycles of a dropped flash answer (harmless while the
// controller is idle), or a stuck flash data input that lasts until their own
// partition is rewritten (latent while the controller is idle). At most one
// controller fault is pending at a time, since two would defeat the
// controller's TMR; payload faults may overlap freely.
//
// Checked every cycle: the voted output equals the golden payload output
// XOR the bitwise majority of the three injected masks, so cycles in which
// two copies are wrong on the same bit are predicted, counted as system
// failure cycles and not as testbench failures. Every flash address and ICAP
// word is checked against the partition being rewritten. At the end every
// fault must have been repaired and the controller modules must be in step.
// The number of faults, repairs and failure cycles is printed.
module tb_fault_campaign;
  import gpdrc_pkg::*;
  localparam int unsigned PRM_W    = 36;
  localparam int unsigned IN_W     = 8;
  localparam int unsigned BS_WORDS = 4096;
  localparam int unsigned LAT      = 3;
  localparam int unsigned N_FAULTS = 40;
  localparam int unsigned T_REPAIR = 1 + BS_WORDS * (LAT + 2);

  logic clk = 0, rst = 1;
  logic [IN_W-1:0]  in_d;
  logic [PRM_W-1:0] prm [NUM_COPIES];
  logic [PRM_W-1:0] fault_mask [NUM_COPIES];
  logic [PRM_W-1:0] out, golden, mask_vote;
  logic [NUM_COPIES-1:0] prm_rst;
  logic        frd, fvalid, ce_n, wr_n, busy;
  flash_addr_t faddr;
  word_t       fdata, idata;
  rp_mask_t    err, restart;
  int unsigned freads, foverlap;
  int checks = 0, failures = 0;
  int n_fail_cycles = 0, n_payload_faults = 0, n_rc_faults = 0, n_repairs = 0;
  logic stuck_pending = 0;
  int   stuck_mod = 0;

  selfrepair_system dut (
    .clk_i(clk), .rst_i(rst),
    .prm_i(prm), .out_o(out), .prm_rst_o(prm_rst),
    .flash_rd_o(frd), .flash_addr_o(faddr), .flash_data_i(fdata), .flash_valid_i(fvalid),
    .icap_ce_n_o(ce_n), .icap_wr_n_o(wr_n), .icap_data_o(idata),
    .rc_err_o(err), .rc_busy_o(busy)
  );

  for (genvar m = 0; m < NUM_COPIES; m++) begin : g_prm
    prm_model #(.IN_W(IN_W), .OUT_W(PRM_W)) u_prm (
      .clk_i(clk), .in_i(in_d), .fault_mask_i(fault_mask[m]), .out_o(prm[m])
    );
  end

  flash_model #(.LAT(LAT)) u_flash (
    .clk_i(clk), .rst_i(rst), .rd_i(frd), .addr_i(faddr),
    .data_o(fdata), .valid_o(fvalid), .reads_o(freads), .overlap_o(foverlap)
  );

  always #5 clk = ~clk;

  function automatic word_t flash_word(int unsigned a);
    return (a * 32'h9E3779B1) ^ 32'h5A5A_0000;
  endfunction

  task automatic fail(string s);
    failures++;
    $display("FAIL: %s", s);
  endtask

  always_ff @(posedge clk) golden <= (PRM_W'(in_d) * PRM_W'(12'h1F3)) ^ PRM_W'(16'h0F0F);
  always_comb mask_vote = (fault_mask[0] & fault_mask[1]) | (fault_mask[0] & fault_mask[2])
                        | (fault_mask[1] & fault_mask[2]);
  always_comb restart = dut.rc_voted.rp_reset;

  int          cur_rp = -1;
  int unsigned widx = 0;

  always @(posedge clk) if (!rst) begin
    checks++;
    if (out != (golden ^ mask_vote)) fail($sformatf("voted output %h", out));
    if (mask_vote != '0) n_fail_cycles++;
    if (frd && cur_rp < 0) begin
      cur_rp = int'(32'(faddr) / BS_WORDS);
      widx   = 0;
    end
    if (frd) begin
      checks++;
      if (32'(faddr) != 32'(cur_rp) * BS_WORDS + widx) fail($sformatf("flash address %h", faddr));
    end
    if (!ce_n) begin
      checks++;
      if (idata != flash_word(cur_rp * BS_WORDS + widx)) fail($sformatf("ICAP word %0d", widx));
      widx++;
    end
    if (restart != '0) begin
      checks++;
      if (restart != rp_mask_t'(1 << cur_rp) || widx != BS_WORDS) fail("restart");
      n_repairs++;
      cur_rp = -1;
    end
  end

  always @(posedge clk) for (int m = 0; m < NUM_COPIES; m++) if (prm_rst[m]) fault_mask[m] <= '0;

  initial begin
    repeat (N_FAULTS * T_REPAIR * 4 + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) in_d <= IN_W'($urandom);

  // Release the stuck controller fault when its partition is rewritten.
  always @(posedge clk) if (stuck_pending && restart[RC_RP_BASE + stuck_mod]) begin
    case (stuck_mod)
      0: release dut.g_rc[0].u_rc.u_gpdrc.flash_data_i;
      1: release dut.g_rc[1].u_rc.u_gpdrc.flash_data_i;
      default: release dut.g_rc[2].u_rc.u_gpdrc.flash_data_i;
    endcase
    stuck_pending <= 0;
  end

  initial begin
    int q;
    for (int m = 0; m < NUM_COPIES; m++) fault_mask[m] = '0;
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    for (int f = 0; f < int'(N_FAULTS); f++) begin
      int kind, m;
      repeat ($urandom_range(1, 2 * T_REPAIR)) @(negedge clk);
      kind = $urandom_range(0, 4);
      m    = $urandom_range(0, 2);
      if (kind <= 1 || (stuck_pending && kind >= 2)) begin
        fault_mask[m] = fault_mask[m] | (PRM_W'(1) << $urandom_range(0, PRM_W - 1));
        n_payload_faults++;
      end else if (kind == 2) begin
        // one-cycle upset of module m's error bus
        case (m)
          0: force dut.g_rc[0].u_rc.err = rp_mask_t'(1 << $urandom_range(0, 5));
          1: force dut.g_rc[1].u_rc.err = rp_mask_t'(1 << $urandom_range(0, 5));
          default: force dut.g_rc[2].u_rc.err = rp_mask_t'(1 << $urandom_range(0, 5));
        endcase
        @(negedge clk);
        case (m)
          0: release dut.g_rc[0].u_rc.err;
          1: release dut.g_rc[1].u_rc.err;
          default: release dut.g_rc[2].u_rc.err;
        endcase
        n_rc_faults++;
        // wait for that repair before another controller fault (the mark
        // appears a few cycles after the upset)
        repeat (5) @(negedge clk);
        while (busy || err != '0) @(negedge clk);
      end else if (kind == 4) begin
        case (m)
          0: force dut.g_rc[0].u_rc.u_gpdrc.flash_valid_i = 1'b0;
          1: force dut.g_rc[1].u_rc.u_gpdrc.flash_valid_i = 1'b0;
          default: force dut.g_rc[2].u_rc.u_gpdrc.flash_valid_i = 1'b0;
        endcase
        repeat (LAT + 3) @(negedge clk);
        case (m)
          0: release dut.g_rc[0].u_rc.u_gpdrc.flash_valid_i;
          1: release dut.g_rc[1].u_rc.u_gpdrc.flash_valid_i;
          default: release dut.g_rc[2].u_rc.u_gpdrc.flash_valid_i;
        endcase
        n_rc_faults++;
        repeat (5) @(negedge clk);
        while (busy || err != '0) @(negedge clk);
      end else begin
        stuck_mod     = m;
        stuck_pending = 1;
        case (m)
          0: force dut.g_rc[0].u_rc.u_gpdrc.flash_data_i = word_t'($urandom);
          1: force dut.g_rc[1].u_rc.u_gpdrc.flash_data_i = word_t'($urandom);
          default: force dut.g_rc[2].u_rc.u_gpdrc.flash_data_i = word_t'($urandom);
        endcase
        n_rc_faults++;
      end
    end
    // A latent stuck fault needs a repair to show: inject one payload fault
    // if it is still pending, then wait until everything is quiet.
    if (stuck_pending) begin
      fault_mask[0] = fault_mask[0] | PRM_W'(1);
      n_payload_faults++;
    end
    q = 0;
    while (q < 50) begin
      @(negedge clk);
      if (!busy && err == '0 && !stuck_pending) q++; else q = 0;
    end
    checks += 5;
    for (int m = 0; m < NUM_COPIES; m++) if (fault_mask[m] != '0) fail($sformatf("PRM%0d not repaired", m + 1));
    if (dut.rc_each[0] != dut.rc_each[1] || dut.rc_each[0] != dut.rc_each[2]) fail("controllers out of step");
    if (dut.busy_each != '0) fail("controller busy at the end");
    if (foverlap != 0) fail("overlapping flash reads");
    if (n_repairs == 0) fail("no repair");
    $display("faults: payload=%0d controller=%0d, repairs=%0d, system failure cycles=%0d",
             n_payload_faults, n_rc_faults, n_repairs, n_fail_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
