// tb_tmr_voter: self-checking test of the bitwise majority voter.
// Drives random words, words where one copy is corrupted and exhaustive
// single-bit patterns, and compares the output with a majority counted bit by
// bit in the testbench.
module tb_tmr_voter;
  localparam int unsigned W = 36;
  logic [W-1:0] a, b, c, y;
  int checks = 0, failures = 0;

  tmr_voter #(.W(W)) dut (.a_i(a), .b_i(b), .c_i(c), .y_o(y));

  function automatic logic [W-1:0] ref_vote(logic [W-1:0] x0, x1, x2);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++) begin
      int n;
      n = int'(x0[i]) + int'(x1[i]) + int'(x2[i]);
      r[i] = (n >= 2);
    end
    return r;
  endfunction

  task automatic check(string what);
    #1;
    checks++;
    if (y !== ref_vote(a, b, c)) begin
      failures++;
      $display("FAIL %s: a=%h b=%h c=%h y=%h", what, a, b, c, y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // all eight patterns on every bit
    for (int p = 0; p < 8; p++) begin
      a = {W{p[0]}}; b = {W{p[1]}}; c = {W{p[2]}};
      check("pattern");
    end
    // one corrupted copy must be masked
    for (int k = 0; k < 300; k++) begin
      logic [W-1:0] good, bad;
      good = W'({$urandom, $urandom});
      bad  = W'({$urandom, $urandom});
      case (k % 3)
        0: begin a = bad;  b = good; c = good; end
        1: begin a = good; b = bad;  c = good; end
        default: begin a = good; b = good; c = bad; end
      endcase
      check("one bad copy");
      checks++;
      if (y !== good) begin failures++; $display("FAIL masking k=%0d", k); end
    end
    // fully random
    for (int k = 0; k < 300; k++) begin
      a = W'({$urandom, $urandom}); b = W'({$urandom, $urandom}); c = W'({$urandom, $urandom});
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
