// syndrome_calc_tb: self-checking test of the syndrome cells.
//
// Streams random words of LEN bits (highest position first, with random idle
// cycles) into the 2t = 24 cells and compares every syndrome with the direct
// sum S_i = sum over set bits at position p of alpha^(i*p), computed with the
// table-based reference field. Back-to-back words check that in_first
// restarts the cells. One bit per cycle: the syndromes must be final in the
// cycle after the last bit.
module syndrome_calc_tb;
  import tb_gf_pkg::*;

  localparam int T   = 12;
  localparam int LEN = 300;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_bit = 0;
  logic [2*T-1:0][15:0] syn;
  int checks = 0, failures = 0;

  syndrome_calc #(.T(T)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic bits [LEN];
    logic [15:0] ref_s;
    build();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 4; w++) begin
      for (int j = 0; j < LEN; j++) bits[j] = (w == 3) ? (j == 5) : 1'($urandom);
      for (int j = 0; j < LEN; j++) begin
        while (w == 1 && $urandom_range(0, 3) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_first <= (j == 0);
        in_bit   <= bits[j];
        @(posedge clk);
      end
      in_valid <= 0;
      in_first <= 0;
      @(negedge clk);
      for (int i = 1; i <= 2*T; i++) begin
        ref_s = '0;
        for (int j = 0; j < LEN; j++)
          if (bits[j]) ref_s ^= apow(longint'(i) * (longint'(LEN) - longint'(j) - 1));
        checks++;
        if (syn[i-1] !== ref_s) begin
          failures++;
          $display("word %0d S_%0d = %h, expected %h", w, i, syn[i-1], ref_s);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
