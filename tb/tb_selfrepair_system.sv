// tb_selfrepair_system: end-to-end test of the self-repairing system at its
// default size (36-bit payload outputs, 4096-word partial bitstreams).
//
// Three payload copies (prm_model), the flash model and a scoreboard on the
// ICAP port surround the system. Faults are injected into payload copies (an
// output mask, cleared when the copy's partition has been rewritten) and into
// the controller modules (a one-cycle upset of one module's error bus, a
// stuck flash data input of another module's GPDRC, and a flash answer that
// one module misses). Checked every cycle: the voted payload output is always
// right; the flash is read in order and every ICAP word is the right word of
// the partition being rewritten; every restart pulse follows a complete
// bitstream of that partition; after each repair the three controller modules
// agree again and are idle. The repair latency of a payload fault is checked
// against 2 + BS_WORDS*(LAT+2) cycles. Each mechanism (payload fault masked,
// payload repair, controller fault masked, controller self-repair, a repair
// queued behind another, flash wait) is counted and must occur.
module tb_selfrepair_system;
  import gpdrc_pkg::*;
  localparam int unsigned PRM_W    = 36;
  localparam int unsigned IN_W     = 8;
  localparam int unsigned BS_WORDS = 4096;
  localparam int unsigned LAT      = 3;

  logic clk = 0, rst = 1;
  logic [IN_W-1:0]  in_d;
  logic [PRM_W-1:0] prm [NUM_COPIES];
  logic [PRM_W-1:0] fault_mask [NUM_COPIES];
  logic [PRM_W-1:0] out, golden;
  logic [NUM_COPIES-1:0] prm_rst;
  logic        frd, fvalid, ce_n, wr_n, busy;
  flash_addr_t faddr;
  word_t       fdata, idata;
  rp_mask_t    err;
  int unsigned freads, foverlap;
  int checks = 0, failures = 0;
  int cycle = 0;

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
    $display("FAIL @%0d: %s", cycle, s);
  endtask

  // Mechanism counters.
  int n_payload_masked = 0, n_payload_repair = 0, n_rc_masked = 0;
  int n_rc_repair = 0, n_queued = 0, n_flash_wait = 0;

  // Golden payload output: the same function, computed here.
  always_ff @(posedge clk) golden <= (PRM_W'(in_d) * PRM_W'(12'h1F3)) ^ PRM_W'(16'h0F0F);

  // Scoreboard.
  int          cur_rp = -1;
  int unsigned raddr = 0, widx = 0;
  logic        pend = 0;
  int          last_restart_cycle = 0;
  int          restarted [$];
  rp_mask_t    restart;

  always_comb restart = dut.rc_voted.rp_reset;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      checks++;
      if (out != golden) fail($sformatf("voted output %h expected %h", out, golden));
      if (fault_mask[0] != '0 || fault_mask[1] != '0 || fault_mask[2] != '0) n_payload_masked++;
      if (dut.rc_each[0] != dut.rc_each[1] || dut.rc_each[0] != dut.rc_each[2]) n_rc_masked++;
      if (busy && $countones(err) >= 2) n_queued++;
      if (pend && !fvalid) n_flash_wait++;
      if (fvalid) pend = 0;
      if (frd) begin
        checks++;
        if (cur_rp < 0) begin
          if (32'(faddr) % BS_WORDS != 0 || 32'(faddr) / BS_WORDS >= NUM_RP)
            fail($sformatf("repair starts at address %h", faddr));
          cur_rp = int'(32'(faddr) / BS_WORDS);
          raddr  = 32'(faddr);
          widx   = 0;
        end else if (faddr != flash_addr_t'(raddr + 1)) begin
          fail($sformatf("flash address %h after %h", faddr, raddr));
        end
        raddr = 32'(faddr);
        pend  = 1;
      end
      if (!ce_n) begin
        checks++;
        if (wr_n) fail("ICAP enabled for read");
        if (cur_rp < 0 || idata != flash_word(cur_rp * BS_WORDS + widx))
          fail($sformatf("ICAP word %0d of rp %0d = %h", widx, cur_rp, idata));
        widx++;
      end
      if (restart != '0) begin
        checks += 3;
        if (!$onehot(restart)) fail("restart not one-hot");
        if (cur_rp < 0 || restart != rp_mask_t'(1 << cur_rp)) fail($sformatf("restart %b", restart));
        if (widx != BS_WORDS) fail($sformatf("restart after %0d words", widx));
        if (restart[NUM_COPIES-1:0] != prm_rst) fail("payload restart port");
        if (cur_rp < int'(RC_RP_BASE)) n_payload_repair++; else n_rc_repair++;
        restarted.push_back(cur_rp);
        last_restart_cycle = cycle;
        cur_rp = -1;
      end
    end
  end

  // A rewritten payload partition loses its injected fault.
  always @(posedge clk) for (int m = 0; m < NUM_COPIES; m++) if (prm_rst[m]) fault_mask[m] <= '0;

  task automatic wait_quiet();
    int q;
    q = 0;
    while (q < 50) begin
      @(negedge clk);
      if (!busy && err == '0) q++; else q = 0;
    end
    checks += 3;
    if (dut.rc_each[0] != dut.rc_each[1] || dut.rc_each[0] != dut.rc_each[2])
      fail("controller modules disagree after repair");
    if (dut.busy_each != '0) fail($sformatf("controller busy %b after repair", dut.busy_each));
    if (dut.err_each[0] != '0 || dut.err_each[1] != '0 || dut.err_each[2] != '0)
      fail("error marks left after repair");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) in_d <= IN_W'($urandom);

  initial begin
    int c0;
    for (int m = 0; m < NUM_COPIES; m++) fault_mask[m] = '0;
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (busy || err != '0) fail("activity without a fault");

    // 1: persistent fault in payload copy PRM2; check the repair latency.
    fault_mask[1] = 36'h0_0000_0101;
    c0 = cycle;
    wait (restarted.size() == 1);
    checks += 2;
    if (restarted[0] != 1) fail($sformatf("phase 1 rewrote rp %0d", restarted[0]));
    if (last_restart_cycle - c0 != 2 + BS_WORDS * (LAT + 2))
      fail($sformatf("payload repair took %0d cycles, expected %0d",
                     last_restart_cycle - c0, 2 + BS_WORDS * (LAT + 2)));
    wait_quiet();

    // 2: transient upset of controller module 1's error bus: it starts a
    // repair of its own that the other two do not.
    @(negedge clk);
    force dut.g_rc[0].u_rc.err = 6'b000100;
    @(negedge clk);
    release dut.g_rc[0].u_rc.err;
    wait (restarted.size() == 2);
    checks++;
    if (restarted[1] != 3) fail($sformatf("phase 2 rewrote rp %0d", restarted[1]));
    wait_quiet();

    // 3: stuck fault in controller module 3 plus a fault in payload PRM1:
    // the controller fault shows once it writes, and waits behind PRM1.
    @(negedge clk);
    force dut.g_rc[2].u_rc.u_gpdrc.flash_data_i = 32'hDEAD_BEEF;
    fault_mask[0] = 36'h8_0000_0000;
    wait (restarted.size() == 4);
    checks += 2;
    if (restarted[2] != 0) fail($sformatf("phase 3 first rewrote rp %0d", restarted[2]));
    if (restarted[3] != 5) fail($sformatf("phase 3 then rewrote rp %0d", restarted[3]));
    wait_quiet();

    // 4: two payload copies fail together: PRM3 and PRM2 on different bits,
    // so the voter still masks them; both are repaired in turn.
    @(negedge clk);
    fault_mask[2] = 36'h0_0000_0010;
    fault_mask[1] = 36'h0_0001_0000;
    wait (restarted.size() == 6);
    checks += 2;
    if (restarted[4] != 1) fail($sformatf("phase 4 first rewrote rp %0d", restarted[4]));
    if (restarted[5] != 2) fail($sformatf("phase 4 then rewrote rp %0d", restarted[5]));
    wait_quiet();

    // 5: controller module 2 misses a flash answer during a payload repair.
    // It falls one word behind, is marked, and after the payload repair its
    // partition is rewritten; without its restart it would be left waiting
    // for a flash answer that never comes.
    @(negedge clk);
    fault_mask[2] = 36'h0_0100_0000;
    repeat (200) @(negedge clk);
    force dut.g_rc[1].u_rc.u_gpdrc.flash_valid_i = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    release dut.g_rc[1].u_rc.u_gpdrc.flash_valid_i;
    wait (restarted.size() == 8);
    checks += 2;
    if (restarted[6] != 2) fail($sformatf("phase 5 first rewrote rp %0d", restarted[6]));
    if (restarted[7] != 4) fail($sformatf("phase 5 then rewrote rp %0d", restarted[7]));
    wait_quiet();

    checks += 7;
    if (n_payload_masked == 0) fail("no payload fault was masked");
    if (n_payload_repair == 0) fail("no payload repair");
    if (n_rc_masked == 0)      fail("no controller fault was masked");
    if (n_rc_repair == 0)      fail("no controller self-repair");
    if (n_queued == 0)         fail("no repair was queued");
    if (n_flash_wait == 0)     fail("no flash wait");
    if (foverlap != 0)         fail("overlapping flash reads");
    $display("mechanisms: payload_masked=%0d payload_repair=%0d rc_masked=%0d rc_repair=%0d queued=%0d flash_wait=%0d",
             n_payload_masked, n_payload_repair, n_rc_masked, n_rc_repair, n_queued, n_flash_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Phase 3's stuck fault lasts until controller module 3 is rewritten.
  always @(posedge clk) if (restart[RC_RP_BASE + 2]) release dut.g_rc[2].u_rc.u_gpdrc.flash_data_i;

endmodule
