// tb_rc_module: self-checking test of one controller module (fault
// detection + GPDRC) with the flash model.
// The module's own bundle is fed back as all three controller copies, so the
// peers agree with it unless the testbench corrupts one of them. Checked: a
// wrong payload copy leads to the rewrite of exactly that partition (flash
// stream and restart pulse), a corrupted peer bundle leads to the rewrite of
// that controller partition, the error bus shows the mark until the repair
// ends, and nothing happens while the copies agree.
module tb_rc_module;
  import gpdrc_pkg::*;
  localparam int unsigned PRM_W    = 8;
  localparam int unsigned BS_WORDS = 8;
  localparam int unsigned LAT      = 2;

  logic clk = 0, rst = 1;
  logic [PRM_W-1:0] prm [NUM_COPIES];
  rc_bus_t  rc, peers [NUM_COPIES];
  rp_mask_t err;
  rp_mask_t err_all [NUM_COPIES];
  word_t    fdata;
  logic     fvalid, busy;
  logic     corrupt_peer;
  int       corrupt_which;
  int unsigned freads, foverlap;
  int checks = 0, failures = 0;

  rc_module #(.PRM_W(PRM_W), .BS_WORDS(BS_WORDS), .FLASH_BASE(0)) dut (
    .clk_i(clk), .rst_i(rst), .restart_i(rc.rp_reset[RC_RP_BASE]), .prm_i(prm),
    .rc_all_i(peers), .err_all_i(err_all), .ack_i(rc.rp_reset),
    .flash_data_i(fdata), .flash_valid_i(fvalid), .rc_o(rc), .err_o(err), .busy_o(busy)
  );

  flash_model #(.LAT(LAT)) u_flash (
    .clk_i(clk), .rst_i(rst), .rd_i(rc.flash_rd), .addr_i(rc.flash_addr),
    .data_o(fdata), .valid_o(fvalid), .reads_o(freads), .overlap_o(foverlap)
  );

  always_comb begin
    for (int m = 0; m < 3; m++) begin
      peers[m]   = rc;
      err_all[m] = err;
    end
    if (corrupt_peer) peers[corrupt_which].icap_data = ~rc.icap_data;
  end

  always #5 clk = ~clk;

  function automatic word_t flash_word(int unsigned a);
    return (a * 32'h9E3779B1) ^ 32'h5A5A_0000;
  endfunction

  int          words = 0;
  int          repaired [$];
  always @(posedge clk) if (!rst) begin
    if (rc.icap_we) words++;
    if (rc.rp_reset != '0) begin
      for (int i = 0; i < NUM_RP; i++) if (rc.rp_reset[i]) repaired.push_back(i);
      checks++;
      if (words != BS_WORDS) begin failures++; $display("FAIL %0d words", words); end
      words = 0;
    end
  end

  // Expected ICAP words of the partition under repair.
  int exp_rp = -1;
  int widx = 0;
  always @(posedge clk) if (!rst && rc.icap_we) begin
    checks++;
    if (exp_rp < 0 || rc.icap_data != flash_word(exp_rp * BS_WORDS + widx)) begin
      failures++;
      $display("FAIL ICAP word %0d = %h (rp %0d)", widx, rc.icap_data, exp_rp);
    end
    widx++;
  end

  task automatic expect_eq(int got, int want, string s);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s: %0d expected %0d", s, got, want); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    corrupt_peer = 0; corrupt_which = 0;
    for (int m = 0; m < 3; m++) prm[m] = 8'h5A;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    expect_eq(int'(busy), 0, "idle while copies agree");
    expect_eq(int'(err), 0, "no marks");

    // payload copy PRM3 wrong for two cycles
    exp_rp = 2; widx = 0;
    prm[2] = 8'h00;
    @(negedge clk);
    expect_eq(int'(err), 'b000100, "PRM3 marked");
    @(negedge clk) prm[2] = 8'h5A;
    expect_eq(int'(busy), 1, "repair started");
    wait (repaired.size() == 1);
    @(negedge clk);
    expect_eq(repaired[0], 2, "PRM3 rewritten");
    expect_eq(int'(err), 0, "mark cleared after repair");
    expect_eq(widx, BS_WORDS, "PRM3 words");

    // peer controller 2 bundle corrupted for one cycle while idle
    exp_rp = 4; widx = 0;
    repeat (3) @(negedge clk);
    corrupt_which = 1;
    corrupt_peer  = 1;
    @(negedge clk) corrupt_peer = 0;
    expect_eq(int'(err), 'b010000, "controller 2 marked");
    wait (repaired.size() == 2);
    @(negedge clk);
    expect_eq(repaired[1], 4, "controller 2 partition rewritten");
    expect_eq(widx, BS_WORDS, "controller 2 words");
    repeat (10) @(negedge clk);
    expect_eq(int'(busy), 0, "idle at the end");
    expect_eq(int'(foverlap), 0, "no overlapping reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
