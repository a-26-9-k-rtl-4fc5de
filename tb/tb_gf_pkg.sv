// tb_gf_pkg: reference GF(2^16) arithmetic for the testbenches.
//
// Deliberately built differently from the RTL's bch_pkg: exponent and
// logarithm tables of alpha are generated once by stepping an LFSR through the
// field (polynomial x^16 + x^5 + x^3 + x^2 + 1), and multiplication, inversion
// and powers are done through the tables. Call build() before any other
// function.
package tb_gf_pkg;

  localparam int Q = 65535;
  localparam longint unsigned QL = longint'(Q);
  int unsigned exp_t [0:2*Q-1];
  int unsigned log_t [0:Q];

  function automatic void build();
    int unsigned v = 1;
    for (int i = 0; i < Q; i++) begin
      exp_t[i]     = v;
      exp_t[i + Q] = v;
      log_t[v]     = i;
      v = v << 1;
      if (v[16]) v = (v ^ 32'h1002D) & 32'hFFFF;
    end
  endfunction

  function automatic logic [15:0] mul(logic [15:0] a, logic [15:0] b);
    if (a == 0 || b == 0) return 16'h0;
    return 16'(exp_t[log_t[a] + log_t[b]]);
  endfunction

  function automatic logic [15:0] inv(logic [15:0] a);
    if (a == 0) return 16'h0;
    return 16'(exp_t[(Q - log_t[a]) % Q]);
  endfunction

  // alpha^e
  function automatic logic [15:0] apow(longint unsigned e);
    return 16'(exp_t[17'(e % QL)]);
  endfunction

  // b^e for any nonzero b
  function automatic logic [15:0] pow(logic [15:0] b, int unsigned e);
    if (b == 0) return (e == 0) ? 16'h1 : 16'h0;
    return 16'(exp_t[17'((longint'(log_t[b]) * e) % QL)]);
  endfunction

endpackage
