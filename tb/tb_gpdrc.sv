// tb_gpdrc: self-checking test of one GPDRC with the flash model.
// The error bus is held in a sticky register in the testbench, cleared by the
// controller's restart pulse, as the fault detection does. Checked: the flash
// addresses and the ICAP word stream of every repair against the flash
// formula, the restart pulse and acknowledge of the right partition, the
// order of repairs (controller modules first, lower number first), the cycle
// count of a repair (1 + BS_WORDS*(LAT+2) cycles from the error bit to the
// restart pulse) and that the controller is silent when idle.
module tb_gpdrc;
  import gpdrc_pkg::*;
  localparam int unsigned BS_WORDS   = 16;
  localparam int unsigned FLASH_BASE = 'h100;
  localparam int unsigned LAT        = 3;

  logic clk = 0, rst = 1;
  rp_mask_t err_q, err_set, ack;
  assign ack = rc.rp_reset;
  rc_bus_t  rc;
  word_t    fdata;
  logic     fvalid, busy;
  int unsigned freads, foverlap;
  int checks = 0, failures = 0;
  int cycle = 0;

  gpdrc #(.BS_WORDS(BS_WORDS), .FLASH_BASE(FLASH_BASE)) dut (
    .clk_i(clk), .rst_i(rst), .err_i(err_q), .flash_data_i(fdata),
    .flash_valid_i(fvalid), .rc_o(rc), .busy_o(busy)
  );

  flash_model #(.LAT(LAT)) u_flash (
    .clk_i(clk), .rst_i(rst), .rd_i(rc.flash_rd), .addr_i(rc.flash_addr),
    .data_o(fdata), .valid_o(fvalid), .reads_o(freads), .overlap_o(foverlap)
  );

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst) err_q <= '0;
    else     err_q <= (err_q | err_set) & ~ack;
  end

  function automatic word_t flash_word(int unsigned a);
    return (a * 32'h9E3779B1) ^ 32'h5A5A_0000;
  endfunction

  // Scoreboard of the current repair.
  int          cur_rp = -1;
  int unsigned words = 0;
  int unsigned reqs = 0;
  int          start_cycle = 0;
  int          order [$];

  task automatic fail(string s);
    failures++;
    $display("FAIL @%0d: %s", cycle, s);
  endtask

  always @(posedge clk) if (!rst) begin
    if (rc.flash_rd) begin
      checks++;
      if (cur_rp < 0 || rc.flash_addr != flash_addr_t'(FLASH_BASE + cur_rp * BS_WORDS + reqs))
        fail($sformatf("flash address %h", rc.flash_addr));
      reqs++;
    end
    if (rc.icap_we) begin
      checks++;
      if (cur_rp < 0 || rc.icap_data != flash_word(FLASH_BASE + cur_rp * BS_WORDS + words))
        fail($sformatf("ICAP word %0d = %h", words, rc.icap_data));
      words++;
    end
    if (!busy && (rc != '0 || ack != '0)) fail("output while idle");
    if (ack != '0) begin
      checks += 3;
      if (!$onehot(ack)) fail("restart not one-hot");
      if (cur_rp < 0 || ack != rp_mask_t'(1 << cur_rp)) fail($sformatf("ack %b for rp %0d", ack, cur_rp));
      if (words != BS_WORDS || reqs != BS_WORDS) fail($sformatf("%0d words %0d reads", words, reqs));
      checks++;
      if (cycle - start_cycle != 1 + BS_WORDS * (LAT + 2))
        fail($sformatf("repair took %0d cycles", cycle - start_cycle));
      order.push_back(cur_rp);
      cur_rp = -1;
    end
  end

  // Which RP the controller will pick next: controller modules first.
  function automatic int expected_pick(rp_mask_t e);
    for (int i = RC_RP_BASE; i < NUM_RP; i++) if (e[i]) return i;
    for (int i = 0; i < RC_RP_BASE; i++) if (e[i]) return i;
    return -1;
  endfunction

  // Start of a repair: first cycle of busy after idle.
  logic busy_d = 0;
  always @(posedge clk) begin
    busy_d <= busy;
    if (!rst && busy && !busy_d) begin
      // the pick happened in the previous cycle; err_q was visible then
      words = 0; reqs = 0;
    end
  end
  always @(posedge clk) if (!rst && !busy && err_q != '0) begin
    cur_rp      = expected_pick(err_q);
    start_cycle = cycle;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    err_set = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (busy) fail("busy without error");

    // single repair of PRM2
    err_set = 6'b000010;
    @(negedge clk) err_set = '0;
    wait (order.size() == 1);
    checks++;
    if (order[0] != 1) fail("first repair not RP 1");

    // three at once: RP 0, RP 2, RP 4 -> expected order 4, 0, 2
    @(negedge clk);
    err_set = 6'b010101;
    @(negedge clk) err_set = '0;
    wait (order.size() == 4);
    checks += 3;
    if (order[1] != 4) fail($sformatf("order[1]=%0d", order[1]));
    if (order[2] != 0) fail($sformatf("order[2]=%0d", order[2]));
    if (order[3] != 2) fail($sformatf("order[3]=%0d", order[3]));

    // a new error during a repair is queued: RP 5 while RP 3 is in progress
    @(negedge clk);
    err_set = 6'b001000;
    @(negedge clk) err_set = '0;
    repeat (7) @(negedge clk);
    err_set = 6'b100000;
    @(negedge clk) err_set = '0;
    wait (order.size() == 6);
    checks += 2;
    if (order[4] != 3) fail($sformatf("order[4]=%0d", order[4]));
    if (order[5] != 5) fail($sformatf("order[5]=%0d", order[5]));
    repeat (5) @(negedge clk);
    checks += 2;
    if (busy) fail("busy after all repairs");
    if (foverlap != 0) fail("overlapping flash reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
