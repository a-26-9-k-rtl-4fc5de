// codeword_fifo: the codeword buffer of the decoder, one bit per entry.
//
// Holds the hard decisions of a codeword while its syndromes, locators and
// error magnitudes are computed, and then plays them back to the corrector.
// The decoder uses a single codeword buffer (a single-stage pipeline): the
// bits of codeword k are read out while codeword k+1 is written, and the read
// of an entry is never later than the write that replaces it.
//
// Implementation: a DEPTH x 1 memory with a write pointer and a read pointer.
// wr_first / rd_first restart a pointer at entry 0 for a new codeword; both
// pointers wrap at DEPTH. Reads are synchronous: rd_data is valid the cycle
// after rd_en. A read and a write of the same entry in one cycle return the
// old value (read-first), which the overlap of codewords relies on. The memory
// itself needs no reset: every entry is written before it is read.
module codeword_fifo #(
  parameter int DEPTH = 32400,            // one codeword of N bits
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wr_en,
  input  logic wr_first,
  input  logic wr_data,
  input  logic rd_en,
  input  logic rd_first,
  output logic rd_data
);

  logic          mem [DEPTH];
  logic [AW-1:0] wp_q, rp_q;
  logic [AW-1:0] wa, ra;

  assign wa = wr_first ? '0 : wp_q;
  assign ra = rd_first ? '0 : rp_q;

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[ra];
    if (wr_en) mem[wa] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q <= '0;
      rp_q <= '0;
    end else begin
      if (wr_en) wp_q <= (wa == AW'(DEPTH - 1)) ? '0 : wa + 1'b1;
      if (rd_en) rp_q <= (ra == AW'(DEPTH - 1)) ? '0 : ra + 1'b1;
    end
  end

endmodule
