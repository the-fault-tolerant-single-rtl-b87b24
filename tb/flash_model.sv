// flash_model: behavioural model of the configuration flash memory, for
// simulation only (the real part is an external chip).
//
// It answers a one-cycle read request (rd_i with addr_i) with the word at that
// address on data_o, valid_o high for one cycle, LAT cycles later (LAT >= 1).
// Its content is computed, not stored: word(a) = (a * 32'h9E3779B1) ^ 32'h5A5A_0000,
// so a testbench can work out the expected ICAP stream on its own. One read is
// outstanding at a time; a new request while one is pending counts in
// overlap_o as a protocol error.
module flash_model
  import gpdrc_pkg::*;
#(
  parameter int unsigned LAT = 3
) (
  input  logic        clk_i,
  input  logic        rst_i,
  input  logic        rd_i,
  input  flash_addr_t addr_i,
  output word_t       data_o,
  output logic        valid_o,
  output int unsigned reads_o,
  output int unsigned overlap_o
);

  int unsigned cnt;
  flash_addr_t addr_q;
  logic        pend;

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      cnt       <= 0;
      pend      <= 1'b0;
      valid_o   <= 1'b0;
      data_o    <= '0;
      addr_q    <= '0;
      reads_o   <= 0;
      overlap_o <= 0;
    end else begin
      valid_o <= 1'b0;
      if (rd_i) begin
        if (pend) overlap_o <= overlap_o + 1;
        pend    <= 1'b1;
        addr_q  <= addr_i;
        cnt     <= 1;
        reads_o <= reads_o + 1;
        if (LAT == 1) begin
          pend    <= 1'b0;
          valid_o <= 1'b1;
          data_o  <= (32'(addr_i) * 32'h9E3779B1) ^ 32'h5A5A_0000;
        end
      end else if (pend) begin
        cnt <= cnt + 1;
        if (cnt + 1 >= LAT) begin
          pend    <= 1'b0;
          valid_o <= 1'b1;
          data_o  <= (32'(addr_q) * 32'h9E3779B1) ^ 32'h5A5A_0000;
        end
      end
    end
  end

endmodule
