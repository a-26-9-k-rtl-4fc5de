// error_locator_eval_tb: self-checking test of the least-reliable-bit sorter.
//
// Feeds words of N soft magnitudes (drawn from a small range, so that ties are
// frequent) and checks the 2t stages against a reference: a stable sort of
// the positions by magnitude in arrival order, keeping the first 2t. For each
// stage the magnitude, the location l and the locator alpha^l (from the
// table-based reference field) are compared. The words follow each other
// without idle cycles, so in_first must restart the sorter; one word has idle
// cycles in it. Outputs must be final the cycle after the last bit.
module error_locator_eval_tb;
  import tb_gf_pkg::*;

  localparam int N  = 300;
  localparam int T  = 12;
  localparam int W  = 7;
  localparam int LW = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0;
  logic [W-2:0] in_mag = '0;
  logic [2*T-1:0][W-1:0]  rel;
  logic [2*T-1:0][15:0]   beta;
  logic [2*T-1:0][LW-1:0] loc;
  int checks = 0, failures = 0;

  error_locator_eval #(.N(N), .T(T), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mags [4][N];

  task automatic check_word(int w);
    int order [N];
    int tmp, pos, p;
    for (int j = 0; j < N; j++) order[j] = j;   // arrival index
    // stable insertion sort by magnitude
    for (int a = 1; a < N; a++) begin
      tmp = order[a];
      p = a - 1;
      while (p >= 0 && mags[w][order[p]] > mags[w][tmp]) begin
        order[p + 1] = order[p];
        p--;
      end
      order[p + 1] = tmp;
    end
    for (int s = 0; s < 2*T; s++) begin
      pos = N - 1 - order[s];
      checks++;
      if (rel[s] != W'(mags[w][order[s]]) || loc[s] != LW'(pos) || beta[s] != apow(longint'(pos))) begin
        failures++;
        $display("word %0d stage %0d: rel %0d loc %0d beta %h, expected %0d %0d %h",
                 w, s, rel[s], loc[s], beta[s], mags[w][order[s]], pos, apow(longint'(pos)));
      end
    end
  endtask

  initial begin
    build();
    for (int w = 0; w < 4; w++)
      for (int j = 0; j < N; j++)
        mags[w][j] = (w == 2) ? 63 - (j % 64) : $urandom_range(0, (w == 3) ? 63 : 12);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 4; w++) begin
      for (int j = 0; j < N; j++) begin
        while (w == 1 && $urandom_range(0, 4) == 0) begin
          @(negedge clk);
          in_valid = 0;
        end
        @(negedge clk);
        if (j == 0 && w > 0) check_word(w - 1);   // previous word still held
        in_valid = 1;
        in_first = (j == 0);
        in_mag   = (W-1)'(mags[w][j]);
      end
    end
    @(negedge clk);
    in_valid = 0;
    check_word(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
