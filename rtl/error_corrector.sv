// error_corrector: forms the decoded codeword C^(x) by XORing each error
// magnitude gamma_i into the buffered bit at its location l_i.
//
// On `load` it latches the 2t locations, the 2t magnitudes and the solver's
// success flag for one codeword, and sets its position counter to N-1. Then
// every valid input bit (from the codeword buffer, highest position first) is
// compared with all 2t stored locations; the bit is inverted when a location
// with gamma_i = 1 matches, and the counter steps down. This is the only use
// of the locations: no Chien search is needed. When the solver failed (ok = 0)
// the bits pass unchanged, the hard decisions being the best estimate left;
// that policy, and the comparator-per-location structure, are this
// implementation's choices.
//
// Timing: combinational from in_bit to out_bit; out_first and out_last mark
// positions N-1 and 0. out_ok is the latched success flag.
module error_corrector #(
  parameter int N  = 32400,
  parameter int T  = 12,
  parameter int LW = $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic [2*T-1:0][LW-1:0]  loc_in,
  input  logic [2*T-1:0]          gamma_in,
  input  logic                    ok_in,
  input  logic                    in_valid,
  input  logic                    in_bit,
  output logic                    out_valid,
  output logic                    out_bit,
  output logic                    out_first,
  output logic                    out_last,
  output logic                    out_ok
);

  logic [2*T-1:0][LW-1:0] loc_q;
  logic [2*T-1:0]         gamma_q;
  logic                   ok_q;
  logic [LW-1:0]          pos_q;
  logic                   flip;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loc_q   <= '0;
      gamma_q <= '0;
      ok_q    <= 1'b0;
      pos_q   <= '0;
    end else if (load) begin
      loc_q   <= loc_in;
      gamma_q <= gamma_in;
      ok_q    <= ok_in;
      pos_q   <= LW'(N - 1);
    end else if (in_valid) begin
      pos_q   <= pos_q - 1'b1;
    end
  end

  always_comb begin
    flip = 1'b0;
    for (int i = 0; i < 2*T; i++)
      if (gamma_q[i] && loc_q[i] == pos_q) flip = 1'b1;
  end

  assign out_valid = in_valid;
  assign out_bit   = in_bit ^ (flip & ok_q);
  assign out_first = in_valid && pos_q == LW'(N - 1);
  assign out_last  = in_valid && pos_q == '0;
  assign out_ok    = ok_q;

endmodule
