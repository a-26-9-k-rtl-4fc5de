// error_locator_eval: picks the 2t least reliable bits of a codeword and
// records their error locators and locations, replacing the Chien search.
//
// Three register rows of 2t stages, as in the published architecture:
//   reliability part  rel[0..2t-1], kept sorted, smallest (least reliable) first
//   error locator part beta[i] = alpha^loc[i]
//   error location part loc[i]
// One comparator per stage compares the input magnitude with that stage's
// stored reliability. Stage i loads stage i-1 when the input is smaller than
// rel[i-1], loads the input when it is not smaller than rel[i-1] but smaller
// than rel[i], and otherwise holds: an insertion sort that costs one cycle per
// input bit. The locator of the current bit comes from register REG, which
// starts at alpha^(N-1) and is multiplied by alpha^-1 for every bit; its
// location comes from a down-counter that starts at N-1, because the bits
// arrive from R_{N-1} to R_0.
//
// Choices of this implementation: the reliability registers are one bit wider
// than the magnitude and start at 2^(W-1), above every magnitude, so the first
// 2t bits always enter; among equal magnitudes the earlier bit stays in front.
// in_first marks the first bit of a codeword and makes every stage start from
// its initial value, so no clear cycle is needed. Outputs are final the cycle
// after the last bit and hold until the next in_first. Reset loads the
// initial values.
module error_locator_eval
  import bch_pkg::*;
#(
  parameter int N  = 32400,            // code length
  parameter int T  = 12,               // error-correcting capability t
  parameter int W  = 7,                // soft input width: sign + (W-1) magnitude bits
  parameter int LW = $clog2(N)         // width of a location
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_first,
  input  logic [W-2:0]             in_mag,
  output logic [2*T-1:0][W-1:0]    rel,
  output gf16_t [2*T-1:0]          beta,
  output logic [2*T-1:0][LW-1:0]   loc
);

  localparam logic [W-1:0]  REL_INIT  = W'(1) << (W - 1);
  localparam gf16_t         ALPHA_TOP = gf_alpha_pow(N - 1);
  localparam gf16_t         ALPHA_INV = gf_alpha_pow(GF_ORDER - 1);
  localparam logic [LW-1:0] LOC_TOP   = LW'(N - 1);

  logic [2*T-1:0][W-1:0]  rel_q;
  gf16_t [2*T-1:0]        beta_q;
  logic [2*T-1:0][LW-1:0] loc_q;
  gf16_t                  reg_q;     // locator of the next bit (REG)
  logic [LW-1:0]          cnt_q;     // location of the next bit

  // Values the stages start from for this bit.
  logic [2*T-1:0][W-1:0]  rel_cur;
  gf16_t [2*T-1:0]        beta_cur;
  logic [2*T-1:0][LW-1:0] loc_cur;
  gf16_t                  reg_cur;
  logic [LW-1:0]          cnt_cur;
  logic [2*T-1:0]         lt;        // input magnitude smaller than stage value
  logic [W-1:0]           mag;

  always_comb begin
    mag = {1'b0, in_mag};
    for (int i = 0; i < 2*T; i++) begin
      rel_cur[i]  = in_first ? REL_INIT : rel_q[i];
      beta_cur[i] = in_first ? gf16_t'(0) : beta_q[i];
      loc_cur[i]  = in_first ? '0 : loc_q[i];
      lt[i]       = mag < rel_cur[i];
    end
    reg_cur = in_first ? ALPHA_TOP : reg_q;
    cnt_cur = in_first ? LOC_TOP : cnt_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 2*T; i++) begin
        rel_q[i]  <= REL_INIT;
        beta_q[i] <= '0;
        loc_q[i]  <= '0;
      end
      reg_q <= ALPHA_TOP;
      cnt_q <= LOC_TOP;
    end else if (in_valid) begin
      for (int i = 0; i < 2*T; i++) begin
        // SEL_i: 2'b10 shift from stage i-1, 2'b01 insert input, else hold
        if (i > 0 && lt[i-1]) begin
          rel_q[i]  <= rel_cur[i-1];
          beta_q[i] <= beta_cur[i-1];
          loc_q[i]  <= loc_cur[i-1];
        end else if (lt[i]) begin
          rel_q[i]  <= mag;
          beta_q[i] <= reg_cur;
          loc_q[i]  <= cnt_cur;
        end else begin
          rel_q[i]  <= rel_cur[i];
          beta_q[i] <= beta_cur[i];
          loc_q[i]  <= loc_cur[i];
        end
      end
      reg_q <= gf_mul(reg_cur, ALPHA_INV);
      cnt_q <= cnt_cur - 1'b1;
    end
  end

  assign rel  = rel_q;
  assign beta = beta_q;
  assign loc  = loc_q;

endmodule
