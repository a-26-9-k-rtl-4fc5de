// soft_bch_decoder_modes_tb: runs every DVB-S2 normal-frame BCH code through
// the decoder, one decoder instance per code, all sharing one clock.
//
// The eleven (N, K, t) codes of the DVB-S2 normal frame, from 16200/16008 to
// 58320/58192, each get three codewords (errors within t, more than t errors,
// a rejected word; see bch_code_run). A twelfth instance runs the
// (32400, 32208) code without the register after the inverter, and two more
// run short codes with t = 1 and t = 2 without it, where the solver takes
// 6t^2 - t = 5 and 22 cycles. The decoder
// holds one code at a time, fixed by its N and T parameters; the codes of the
// normal frame all share GF(2^16) and N - K = 16t. Each instance checks its
// codeword period, N + 2(6t^2 - t) cycles (for 58320/58192 with t = 8:
// 59072), or N + 6t^2 - t without the register (33252).
module soft_bch_decoder_modes_tb;
  import tb_gf_pkg::*;

  localparam int NC = 14;
  localparam int CODE_N [NC] = '{16200, 21600, 25920, 32400, 38880, 43200,
                                 48600, 51840, 54000, 57600, 58320, 32400, 400, 400};
  localparam int CODE_T [NC] = '{12, 12, 12, 12, 12, 10, 12, 12, 10, 8, 8, 12, 1, 2};
  localparam bit CODE_R [NC] = '{1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 0, 0, 0};

  logic clk = 0, rst_n = 0, go = 0;
  logic   fin  [NC];
  int     chk  [NC];
  int     fail [NC];
  longint per  [NC];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar c = 0; c < NC; c++) begin : g_code
    bch_code_run #(.N(CODE_N[c]), .T(CODE_T[c]), .INV_REG(CODE_R[c]), .NCW(3)) u_run (
      .clk, .rst_n, .go,
      .finished (fin[c]),
      .checks   (chk[c]),
      .failures (fail[c]),
      .period   (per[c])
    );
  end

  initial begin
    repeat (4 * 60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    build();
    repeat (3) @(posedge clk);
    rst_n = 1;
    go = 1;
    do begin
      @(negedge clk);
      all = 1;
      for (int c = 0; c < NC; c++) if (!fin[c]) all = 0;
    end while (!all);
    for (int c = 0; c < NC; c++) begin
      $display("(%0d,%0d) t=%0d%s: period %0d cycles, %0d checks, %0d failures",
               CODE_N[c], CODE_N[c] - 16 * CODE_T[c], CODE_T[c],
               CODE_R[c] ? "" : " no inverter register", per[c], chk[c], fail[c]);
      checks += chk[c];
      failures += fail[c];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
