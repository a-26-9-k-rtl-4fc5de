// error_corrector_tb: self-checking test of the bit corrector.
//
// Loads 2t random distinct locations with random magnitudes, streams N random
// bits (positions N-1 down to 0, with idle cycles) and checks that exactly the
// bits at locations with gamma = 1 are inverted, that out_first / out_last
// mark positions N-1 and 0, and that with ok = 0 no bit is changed.
module error_corrector_tb;

  localparam int N  = 100;
  localparam int T  = 3;
  localparam int LW = $clog2(N);

  logic clk = 0, rst_n = 0, load = 0, ok_in = 0;
  logic [2*T-1:0][LW-1:0] loc_in;
  logic [2*T-1:0] gamma_in;
  logic in_valid = 0, in_bit = 0;
  logic out_valid, out_bit, out_first, out_last, out_ok;
  int checks = 0, failures = 0, flips = 0;

  error_corrector #(.N(N), .T(T)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic err [N];
    bit dup;
    logic b, expect_bit;
    loc_in = '0;
    gamma_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 6; w++) begin
      for (int p = 0; p < N; p++) err[p] = 0;
      for (int i = 0; i < 2*T; i++) begin
        do begin
          loc_in[i] = LW'($urandom_range(0, N - 1));
          dup = 0;
          for (int j = 0; j < i; j++) if (loc_in[j] == loc_in[i]) dup = 1;
        end while (dup);
        gamma_in[i] = 1'($urandom);
        if (gamma_in[i]) err[loc_in[i]] = 1;
      end
      ok_in = (w != 4);
      @(negedge clk);
      load = 1;
      @(negedge clk);
      load = 0;
      ok_in = 0;
      for (int p = N - 1; p >= 0; p--) begin
        while ($urandom_range(0, 5) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        b = 1'($urandom);
        in_valid = 1;
        in_bit = b;
        #1;
        expect_bit = b ^ (err[p] && w != 4);
        checks++;
        if (out_bit != expect_bit || !out_valid || out_first != (p == N - 1) ||
            out_last != (p == 0) || out_ok != (w != 4)) begin
          failures++;
          $display("word %0d pos %0d: out %0d first %0d last %0d ok %0d, expected %0d",
                   w, p, out_bit, out_first, out_last, out_ok, expect_bit);
        end
        if (out_bit != b) flips++;
        @(negedge clk);
      end
      in_valid = 0;
    end
    checks++;
    if (flips == 0) failures++;
    $display("bits corrected: %0d", flips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
