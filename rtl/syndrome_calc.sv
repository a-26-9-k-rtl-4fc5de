// syndrome_calc: the 2t syndrome cells of the soft BCH decoder.
//
// Cell i evaluates the received polynomial at alpha^i by Horner's rule while
// the hard decisions arrive serially, highest-order bit R_{N-1} first:
//   S_i <- S_i * alpha^i + R_j.
// Each cell is one register, one constant multiplier by alpha^i and one XOR,
// as in the decoder's published syndrome architecture. All 2t syndromes are
// computed (the Bjorck-Pereyra solver needs the even ones too).
//
// Interface: in_valid qualifies in_bit (the hard decision). in_first marks the
// first bit of a codeword: the cells then start from zero instead of their
// stored value, so no separate clear cycle is needed between codewords (a
// choice of this implementation). syn[i-1] holds S_i; it is final in the cycle
// after the last bit of a codeword and stays until the next in_first.
// Reset clears all cells.
module syndrome_calc
  import bch_pkg::*;
#(
  parameter int T = 12   // error-correcting capability t
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_first,
  input  logic                 in_bit,
  output gf16_t [2*T-1:0]      syn
);

  gf16_t [2*T-1:0] syn_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      syn_q <= '0;
    end else if (in_valid) begin
      for (int i = 1; i <= 2*T; i++) begin
        syn_q[i-1] <= (in_first ? gf16_t'(0) : gf_mul(syn_q[i-1], gf_alpha_pow(i)))
                      ^ gf16_t'(in_bit);
      end
    end
  end

  assign syn = syn_q;

endmodule
