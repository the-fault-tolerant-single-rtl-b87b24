// tb_fault_detection: self-checking test of the fault detection.
// Directed cases: no fault, a one-cycle payload fault (the mark must stay
// until acknowledged), a controller-bundle fault, acknowledge winning over a
// mismatch of the same cycle, two faults at once, marks restored from the
// other two detectors after a reset. Then a random run against a reference
// model kept in the testbench: a copy is faulty when it differs from another
// copy that agrees with the third, and the next marks are the majority of the
// three detectors' marks plus the new faults, minus the acknowledged ones.
module tb_fault_detection;
  import gpdrc_pkg::*;
  localparam int unsigned PRM_W = 8;

  logic clk = 0, rst = 1;
  logic [PRM_W-1:0] prm [NUM_COPIES];
  rc_bus_t          rc  [NUM_COPIES];
  rp_mask_t         ack, err, err_vote, exp_err;
  rp_mask_t         err_all [NUM_COPIES];
  rp_mask_t         other1, other2;
  logic             peers_follow;
  int checks = 0, failures = 0;

  fault_detection #(.PRM_W(PRM_W)) dut (
    .clk_i(clk), .rst_i(rst), .prm_i(prm), .rc_i(rc), .err_all_i(err_all),
    .ack_i(ack), .err_o(err), .err_vote_o(err_vote)
  );

  // Detector 0 is the one under test; the other two either mirror it (as
  // healthy detectors in step would) or are driven by the testbench.
  always_comb begin
    err_all[0] = err;
    err_all[1] = peers_follow ? err : other1;
    err_all[2] = peers_follow ? err : other2;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: is copy m of three values different from the one the other
  // two share (or from all others when all differ)?
  function automatic logic odd_one(logic [63:0] v0, v1, v2, int m);
    logic [63:0] me, o1, o2;
    me = (m == 0) ? v0 : (m == 1) ? v1 : v2;
    o1 = (m == 0) ? v1 : v0;
    o2 = (m == 2) ? v1 : v2;
    // Bitwise: a bit of copy m is outvoted when both others disagree with it.
    return |((me ^ o1) & (me ^ o2));
  endfunction

  task automatic set_all_equal(logic [PRM_W-1:0] p, rc_bus_t r);
    for (int m = 0; m < 3; m++) begin prm[m] = p; rc[m] = r; end
  endtask

  task automatic expect_err(rp_mask_t e, string what);
    checks++;
    if (err !== e) begin
      failures++;
      $display("FAIL %s: err=%b expected %b", what, err, e);
    end
  endtask

  rc_bus_t idle_bus, busy_bus;

  initial begin
    idle_bus = '0;
    busy_bus = '0;
    busy_bus.flash_rd   = 1'b1;
    busy_bus.flash_addr = 24'h000123;
    ack = '0;
    peers_follow = 1; other1 = '0; other2 = '0;
    set_all_equal(8'h3C, idle_bus);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (3) @(negedge clk);
    expect_err('0, "no fault");

    // one-cycle fault on PRM2
    prm[1] = 8'h3D;
    @(negedge clk) prm[1] = 8'h3C;
    expect_err(6'b000010, "PRM2 marked");
    repeat (5) @(negedge clk);
    expect_err(6'b000010, "PRM2 mark sticky");
    ack = 6'b000010;
    @(negedge clk) ack = '0;
    expect_err('0, "PRM2 acknowledged");

    // controller module 3 bundle differs
    rc[2] = busy_bus;
    @(negedge clk);
    expect_err(6'b100000, "RC3 marked");
    rc[2] = idle_bus;
    // acknowledge wins over a mismatch in the same cycle
    rc[0] = busy_bus;
    ack   = 6'b100000;
    @(negedge clk);
    expect_err(6'b001000, "ack clears RC3, RC1 marked");
    ack   = 6'b001000;
    @(negedge clk);
    ack   = '0;
    expect_err('0, "ack wins over mismatch");
    rc[0] = idle_bus;
    @(negedge clk);
    expect_err('0, "quiet again");

    // two faults at once: PRM1 and controller 2
    prm[0] = 8'h00;
    rc[1]  = busy_bus;
    @(negedge clk);
    expect_err(6'b010001, "two faults");
    set_all_equal(8'h3C, idle_bus);
    ack = 6'b010001;
    @(negedge clk) ack = '0;
    expect_err('0, "two acknowledged");

    // reset clears
    prm[2] = 8'hFF;
    @(negedge clk) prm[2] = 8'h3C;
    rst = 1;
    @(negedge clk) rst = 0;
    expect_err('0, "reset clears");

    // after a reset the detector takes the marks the other two agree on
    peers_follow = 0;
    other1 = 6'b010010;
    other2 = 6'b010110;
    rst = 1;
    @(negedge clk) rst = 0;
    expect_err('0, "reset");
    checks++;
    if (err_vote != 6'b010010) begin failures++; $display("FAIL vote %b", err_vote); end
    @(negedge clk);
    expect_err(6'b010010, "marks restored from the vote");

    // random run against the reference
    rst = 1;
    @(negedge clk) rst = 0;
    exp_err = '0;
    for (int k = 0; k < 3000; k++) begin
      logic [PRM_W-1:0] base;
      rp_mask_t mm;
      base = PRM_W'($urandom);
      set_all_equal(base, idle_bus);
      if ($urandom_range(0, 3) == 0) prm[$urandom_range(0, 2)] = PRM_W'($urandom);
      if ($urandom_range(0, 3) == 0) rc[$urandom_range(0, 2)].icap_data = word_t'($urandom);
      if ($urandom_range(0, 9) == 0) rc[$urandom_range(0, 2)].rp_reset = rp_mask_t'($urandom);
      ack = ($urandom_range(0, 2) == 0) ? rp_mask_t'($urandom) : '0;
      other1 = ($urandom_range(0, 1) == 0) ? exp_err : rp_mask_t'($urandom);
      other2 = ($urandom_range(0, 1) == 0) ? exp_err : rp_mask_t'($urandom);
      #1;
      checks++;
      if (err_vote != ((exp_err & other1) | (exp_err & other2) | (other1 & other2))) begin
        failures++;
        $display("FAIL err_vote %b", err_vote);
      end
      for (int m = 0; m < 3; m++) begin
        mm[m]     = odd_one(64'(prm[0]), 64'(prm[1]), 64'(prm[2]), m);
        mm[3 + m] = odd_one(64'(rc[0]), 64'(rc[1]), 64'(rc[2]), m);
      end
      exp_err = (((exp_err & other1) | (exp_err & other2) | (other1 & other2)) | mm) & ~ack;
      @(negedge clk);
      expect_err(exp_err, "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
