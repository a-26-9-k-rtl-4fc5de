// soft_bch_decoder_tb: end-to-end test of the soft BCH decoder.
//
// The testbench builds real BCH codewords: it forms the generator polynomial
// g(x) as the product of (x + alpha^(i*2^j)) over the conjugates of alpha^1,
// alpha^3, ..., alpha^(2t-1) (16t roots, so deg g = 16t and K = N - 16t), with
// the table-based reference field, and encodes random messages systematically
// (parity = m(x) x^(16t) mod g(x)). Each codeword becomes soft values: correct
// bits get high reliabilities, a chosen set of at most 2t positions gets low
// reliabilities, and errors are placed among them. The expected output is the
// transmitted codeword with out_ok = 1, or the received hard decisions with
// out_ok = 0 when an error is placed on a reliable bit.
//
// Mechanisms counted, each of which must occur: a clean codeword, errors
// within t, more than t errors (beyond a hard decoder), a rejected codeword,
// input held off while the solver runs, idle input cycles, and equal
// reliabilities. With continuous input the distance between the first bits of
// consecutive codewords must be N + 2*(6t^2 - t) cycles.
module soft_bch_decoder_tb;
  import tb_gf_pkg::*;

  localparam int N   = 400;
  localparam int T   = 12;
  localparam int W   = 7;
  localparam int NCW = 12;
  localparam int D   = 16 * T;        // parity bits
  localparam int K   = N - D;
  localparam int PERIOD = N + 2 * (6 * T * T - T);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [W-1:0] in_llr = '0;
  logic out_valid, out_bit, out_first, out_last, out_ok;
  int checks = 0, failures = 0;

  soft_bch_decoder #(.N(N), .T(T), .W(W)) dut (.*);

  always #5 clk = ~clk;

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat ((NCW + 3) * (PERIOD + 64)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitted codeword, received hard decision, reliability; index = position
  logic cw   [NCW][N];
  logic rx   [NCW][N];
  int   mag  [NCW][N];
  bit   exp_ok [NCW];
  logic [D:0] g;

  int n_clean = 0, n_le_t = 0, n_gt_t = 0, n_reject = 0, n_stall = 0, n_gap = 0, n_tie = 0;
  longint first_cycle [NCW];
  bit     gap_before [NCW];

  task automatic build_generator();
    logic [15:0] c [D+1];
    int deg = 0;
    logic [15:0] r;
    c[0] = 16'h1;
    for (int k = 1; k <= D; k++) c[k] = '0;
    for (int i = 1; i < 2 * T; i += 2) begin
      for (int j = 0; j < 16; j++) begin
        r = apow((longint'(i) << j) % QL);
        // multiply by (x + r)
        for (int k = deg + 1; k >= 1; k--) c[k] = c[k-1] ^ mul(c[k], r);
        c[0] = mul(c[0], r);
        deg++;
      end
    end
    for (int k = 0; k <= D; k++) begin
      checks++;
      if (c[k] > 16'h1) begin
        failures++;
        $display("generator coefficient %0d not binary", k);
      end
      g[k] = c[k][0];
    end
  endtask

  task automatic make_codeword(int w);
    logic [D-1:0] rem = '0;
    logic fb;
    int e, nlow, p;
    bit used [N];
    int kind = w % 6;   // 0 clean, 1/2 <= t errors, 3 > t errors, 4 reject, 5 ties
    for (int pos = N - 1; pos >= D; pos--) begin
      cw[w][pos] = 1'($urandom);
      fb = cw[w][pos] ^ rem[D-1];
      rem = {rem[D-2:0], 1'b0} ^ (fb ? g[D-1:0] : '0);
    end
    for (int pos = D - 1; pos >= 0; pos--) cw[w][pos] = rem[pos];
    for (int pos = 0; pos < N; pos++) begin
      rx[w][pos]  = cw[w][pos];
      mag[w][pos] = (kind == 5) ? 40 : $urandom_range(20, 63);
      used[pos] = 0;
    end
    case (kind)
      0: e = 0;
      1, 2: e = $urandom_range(1, T);
      3: e = $urandom_range(T + 1, 2 * T);
      4: e = $urandom_range(1, T);
      default: e = $urandom_range(1, 2 * T);
    endcase
    nlow = (kind == 3) ? 2 * T : $urandom_range(e, 2 * T);
    for (int i = 0; i < nlow; i++) begin
      do p = $urandom_range(0, N - 1); while (used[p]);
      used[p] = 1;
      mag[w][p] = (kind == 5) ? 3 : $urandom_range(0, 15);
      if (i < e) rx[w][p] = ~cw[w][p];
    end
    exp_ok[w] = 1;
    if (kind == 4) begin
      do p = $urandom_range(0, N - 1); while (used[p]);
      rx[w][p] = ~cw[w][p];   // an error on a reliable bit
      exp_ok[w] = 0;
    end
    if (kind == 0) n_clean++;
    else if (kind == 4) n_reject++;
    else if (e <= T) n_le_t++;
    else n_gt_t++;
    if (kind == 5) n_tie++;
  endtask

  // driver
  initial begin
    int pos;
    build();
    build_generator();
    for (int w = 0; w < NCW; w++) make_codeword(w);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < NCW; w++) begin
      gap_before[w] = 0;
      for (int j = 0; j < N; j++) begin
        @(negedge clk);
        pos = N - 1 - j;
        if (w == 3 && j > 10 && $urandom_range(0, 7) == 0) begin
          in_valid = 0;
          n_gap++;
          gap_before[w] = 1;
          j--;
          continue;
        end
        in_valid = 1;
        in_llr = {~rx[w][pos], (W-1)'(mag[w][pos])};
        while (!in_ready) begin
          n_stall++;
          @(negedge clk);
        end
        if (j == 0) first_cycle[w] = cycle;
      end
    end
    @(negedge clk);
    in_valid = 0;
  end

  // monitor
  initial begin
    int w, j, bad;
    w = 0;
    j = 0;
    bad = 0;
    while (w < NCW) begin
      @(negedge clk);
      if (!rst_n || !out_valid) continue;
      checks++;
      if (out_bit != (exp_ok[w] ? cw[w][N-1-j] : rx[w][N-1-j]) ||
          out_first != (j == 0) || out_last != (j == N - 1) || out_ok != exp_ok[w]) begin
        failures++;
        bad++;
        if (bad < 10)
          $display("codeword %0d bit %0d (position %0d): out %0d ok %0d first %0d last %0d",
                   w, j, N - 1 - j, out_bit, out_ok, out_first, out_last);
      end
      j++;
      if (j == N) begin
        j = 0;
        w++;
      end
    end
    for (int c = 1; c < NCW; c++) begin
      if (c != 4) begin   // codeword 3 has idle input cycles
        checks++;
        if (first_cycle[c] - first_cycle[c-1] != longint'(PERIOD)) begin
          failures++;
          $display("codeword %0d started %0d cycles after the previous one, expected %0d",
                   c, first_cycle[c] - first_cycle[c-1], PERIOD);
        end
      end
    end
    $display("clean %0d, <=t errors %0d, >t errors %0d, rejected %0d, ties %0d, stall cycles %0d, idle cycles %0d",
             n_clean, n_le_t, n_gt_t, n_reject, n_tie, n_stall, n_gap);
    $display("codeword period %0d cycles: %0d information bits per %0d cycles",
             first_cycle[1] - first_cycle[0], K, PERIOD);
    checks++;
    if (n_clean == 0 || n_le_t == 0 || n_gt_t == 0 || n_reject == 0 || n_tie == 0 ||
        n_stall == 0 || n_gap == 0) begin
      failures++;
      $display("a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
