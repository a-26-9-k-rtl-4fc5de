// bch_code_run: testbench harness that runs one BCH code through its own
// soft_bch_decoder instance and reports the outcome on its ports.
//
// It builds the code's generator polynomial (product of the minimal
// polynomials of alpha, alpha^3, ..., alpha^(2t-1), degree 16t) with the
// table-based reference field, encodes NCW random messages systematically and
// sends them back to back: codeword 0 with errors within t, codeword 1 with
// more than t errors, codeword 2 with an error on a reliable bit (must be
// rejected), all further ones within t. Correct bits get reliabilities 20..63,
// a set of up to 2t bits 0..15, and the errors sit in that set. Every decoded
// bit, the framing and out_ok are checked, and so is the distance between the
// first bits of consecutive codewords: N + 2(6t^2 - t) cycles with the
// register after the inverter, N + 6t^2 - t without it. The reference tables
// must be built (tb_gf_pkg::build) before `go` rises.
module bch_code_run #(
  parameter int N       = 400,
  parameter int T       = 12,
  parameter bit INV_REG = 1,
  parameter int NCW     = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output longint period
);
  import tb_gf_pkg::*;

  localparam int W = 7;
  localparam int D = 16 * T;
  localparam int PERIOD = N + (INV_REG ? 2 : 1) * (6 * T * T - T);

  logic in_valid = 0, in_ready;
  logic [W-1:0] in_llr = '0;
  logic out_valid, out_bit, out_first, out_last, out_ok;

  soft_bch_decoder #(.N(N), .T(T), .W(W), .INV_REG(INV_REG)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_llr,
    .out_valid, .out_bit, .out_first, .out_last, .out_ok
  );

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic cw  [NCW][N];
  logic rx  [NCW][N];
  int   mag [NCW][N];
  bit   exp_ok [NCW];
  logic [D:0] g;
  longint first_cycle [NCW];

  initial begin
    finished = 0;
    checks = 0;
    failures = 0;
    period = 0;
  end

  task automatic build_generator();
    logic [15:0] c [D+1];
    int deg = 0;
    logic [15:0] r;
    c[0] = 16'h1;
    for (int k = 1; k <= D; k++) c[k] = '0;
    for (int i = 1; i < 2 * T; i += 2) begin
      for (int j = 0; j < 16; j++) begin
        r = apow((longint'(i) << j) % QL);
        for (int k = deg + 1; k >= 1; k--) c[k] = c[k-1] ^ mul(c[k], r);
        c[0] = mul(c[0], r);
        deg++;
      end
    end
    for (int k = 0; k <= D; k++) begin
      checks++;
      if (c[k] > 16'h1) failures++;
      g[k] = c[k][0];
    end
  endtask

  task automatic make_codeword(int w);
    logic [D-1:0] rem = '0;
    logic fb;
    int e, nlow, p;
    bit used [N];
    int kind = (w < 3) ? w : 0;   // 0 <= t errors, 1 > t errors, 2 rejected
    for (int pos = N - 1; pos >= D; pos--) begin
      cw[w][pos] = 1'($urandom);
      fb = cw[w][pos] ^ rem[D-1];
      rem = {rem[D-2:0], 1'b0} ^ (fb ? g[D-1:0] : '0);
    end
    for (int pos = D - 1; pos >= 0; pos--) cw[w][pos] = rem[pos];
    for (int pos = 0; pos < N; pos++) begin
      rx[w][pos]  = cw[w][pos];
      mag[w][pos] = $urandom_range(20, 63);
      used[pos] = 0;
    end
    e = (kind == 1) ? $urandom_range(T + 1, 2 * T) : $urandom_range(1, T);
    nlow = $urandom_range(e, 2 * T);
    for (int i = 0; i < nlow; i++) begin
      do p = $urandom_range(0, N - 1); while (used[p]);
      used[p] = 1;
      mag[w][p] = $urandom_range(0, 15);
      if (i < e) rx[w][p] = ~cw[w][p];
    end
    exp_ok[w] = (kind != 2);
    if (kind == 2) begin
      do p = $urandom_range(0, N - 1); while (used[p]);
      rx[w][p] = ~cw[w][p];
    end
  endtask

  // driver
  initial begin
    int pos;
    wait (go);
    build_generator();
    for (int w = 0; w < NCW; w++) make_codeword(w);
    for (int w = 0; w < NCW; w++) begin
      for (int j = 0; j < N; j++) begin
        @(negedge clk);
        pos = N - 1 - j;
        in_valid = 1;
        in_llr = {~rx[w][pos], (W-1)'(mag[w][pos])};
        while (!in_ready) @(negedge clk);
        if (j == 0) first_cycle[w] = cycle;
      end
    end
    @(negedge clk);
    in_valid = 0;
  end

  // monitor
  initial begin
    int w, j;
    w = 0;
    j = 0;
    wait (go);
    while (w < NCW) begin
      @(negedge clk);
      if (!rst_n || !out_valid) continue;
      checks++;
      if (out_bit != (exp_ok[w] ? cw[w][N-1-j] : rx[w][N-1-j]) ||
          out_first != (j == 0) || out_last != (j == N - 1) || out_ok != exp_ok[w]) begin
        failures++;
      end
      j++;
      if (j == N) begin
        j = 0;
        w++;
      end
    end
    for (int c = 1; c < NCW; c++) begin
      checks++;
      if (first_cycle[c] - first_cycle[c-1] != longint'(PERIOD)) failures++;
    end
    period = first_cycle[1] - first_cycle[0];
    finished = 1;
  end
endmodule
