// bp_ems_tb: self-checking test of the Bjorck-Pereyra error magnitude solver.
//
// Each trial draws 2t distinct locations l_i in [0, 32399], beta_i = alpha^l_i,
// and a random binary error pattern gamma (weights 0, 1, t, 2t and random),
// builds the syndromes S_j = sum_i gamma_i * beta_i^j with the table-based
// reference field, and checks that the solver returns gamma with ok = 1.
// Trials with syndromes that do not come from errors in the candidate set
// (one error outside it, or random syndromes) must end with ok = 0. Every run
// must take exactly 2*(6t^2 - t) cycles from start to done (1704 for t = 12)
// with the register after the inverter, and 6t^2 - t (852) without it: a
// second solver with INV_REG = 0 runs every trial alongside the first.
module bp_ems_tb;
  import tb_gf_pkg::*;

  localparam int T  = 12;
  localparam int NN = 2 * T;
  localparam int CYCLES = 2 * (6 * T * T - T);

  logic clk = 0, rst_n = 0, start = 0;
  logic [NN-1:0][15:0] syn, beta;
  logic busy, done, ok;
  logic [NN-1:0] gamma;
  logic busy0, done0, ok0;
  logic [NN-1:0] gamma0;
  int checks = 0, failures = 0;
  int n_ok = 0, n_fail = 0;

  bp_ems #(.T(T)) dut (.*);
  bp_ems #(.T(T), .INV_REG(1'b0)) dut0 (
    .clk, .rst_n, .start, .syn, .beta,
    .busy(busy0), .done(done0), .ok(ok0), .gamma(gamma0)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_trial(int kind);
    int unsigned locs [NN];
    logic [NN-1:0] g;
    logic [15:0] extra;
    bit dup;
    int cyc, cyc0;
    for (int i = 0; i < NN; i++) begin
      do begin
        locs[i] = $urandom_range(0, 32399);
        dup = 0;
        for (int j = 0; j < i; j++) if (locs[j] == locs[i]) dup = 1;
      end while (dup);
      beta[i] = apow(longint'(locs[i]));
    end
    case (kind)
      0: g = '0;
      1: g = NN'(1) << $urandom_range(0, NN - 1);
      2: g = {T{2'b01}};
      3: g = '1;
      default: g = NN'({$urandom, $urandom});
    endcase
    // an error outside the candidate set (kind 5) or random syndromes (kind 6)
    do begin
      extra = apow(longint'($urandom_range(0, 32399)));
      dup = 0;
      for (int i = 0; i < NN; i++) if (beta[i] == extra) dup = 1;
    end while (dup);
    for (int j = 1; j <= NN; j++) begin
      syn[j-1] = '0;
      for (int i = 0; i < NN; i++) if (g[i]) syn[j-1] ^= pow(beta[i], j);
      if (kind == 5) syn[j-1] ^= pow(extra, j);
      if (kind == 6) syn[j-1] = 16'($urandom);
    end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    cyc0 = 0;
    while (!done) begin
      if (done0) cyc0 = cyc;
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    if (cyc != CYCLES || cyc0 != CYCLES / 2) begin
      failures++;
      $display("trial kind %0d: %0d and %0d cycles, expected %0d and %0d",
               kind, cyc, cyc0, CYCLES, CYCLES / 2);
    end
    checks += 2;
    if (kind < 5) begin
      if (!ok || gamma != g || !ok0 || gamma0 != g) begin
        failures++;
        $display("trial kind %0d: ok %0d/%0d gamma %h/%h, expected %h",
                 kind, ok, ok0, gamma, gamma0, g);
      end
      n_ok++;
    end else begin
      if (ok || ok0) begin
        failures++;
        $display("trial kind %0d: solver reported success", kind);
      end
      n_fail++;
    end
  endtask

  initial begin
    build();
    syn = '0;
    beta = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) run_trial(r % 7);
    checks++;
    if (n_ok == 0 || n_fail == 0) failures++;
    $display("solved %0d, rejected %0d", n_ok, n_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
