// tb_rc_output_voter: self-checking test of the RC output voters.
// Three controller bundles are driven: equal ones, ones where a single copy
// is corrupted in some fields (it must be masked field by field) and random
// ones, checked against a bitwise majority computed in the testbench.
module tb_rc_output_voter;
  import gpdrc_pkg::*;
  rc_bus_t rc [NUM_COPIES];
  rc_bus_t y;
  int checks = 0, failures = 0;

  rc_output_voter dut (.rc_i(rc), .rc_o(y));

  function automatic rc_bus_t rnd_bus();
    rc_bus_t r;
    r.flash_rd   = 1'($urandom);
    r.flash_addr = flash_addr_t'($urandom);
    r.icap_we    = 1'($urandom);
    r.icap_data  = word_t'($urandom);
    r.rp_reset   = rp_mask_t'($urandom);
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 300; k++) begin
      rc_bus_t good, bad;
      int which;
      good  = rnd_bus();
      bad   = rnd_bus();
      which = k % 3;
      for (int m = 0; m < 3; m++) rc[m] = (m == which) ? bad : good;
      #1;
      checks++;
      if (y !== good) begin
        failures++;
        $display("FAIL k=%0d copy %0d not masked: y=%h good=%h", k, which, y, good);
      end
      checks++;
      if (y.icap_data !== good.icap_data || y.flash_addr !== good.flash_addr) begin
        failures++;
        $display("FAIL k=%0d field mismatch", k);
      end
    end
    for (int k = 0; k < 300; k++) begin
      logic [RC_BUS_W-1:0] a, b, c, r;
      for (int m = 0; m < 3; m++) rc[m] = rnd_bus();
      a = rc[0]; b = rc[1]; c = rc[2];
      for (int i = 0; i < int'(RC_BUS_W); i++)
        r[i] = (int'(a[i]) + int'(b[i]) + int'(c[i])) >= 2;
      #1;
      checks++;
      if (y !== rc_bus_t'(r)) begin failures++; $display("FAIL random k=%0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
