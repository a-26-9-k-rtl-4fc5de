// bp_ems: Bjorck-Pereyra error magnitude solver (BP-EMS).
//
// Solves the Vandermonde system  sum_j beta_j^i * gamma_j = S_i, i = 1..2t,
// for the error magnitudes gamma_j of the 2t least reliable locations, in
// place on a copy of the syndromes, with one GF(2^16) multiplier, one
// composite-field inversion unit and XOR adders. The operations, 1-based:
//   1) for k = 1..2t-1, i = 2t downto k+1:  S_i <- S_i + beta_k * S_{i-1}
//   2) for k = 2t-1 downto 1:
//        for i = k+1..2t:   S_i <- S_i / (beta_i + beta_{i-k})
//        for i = k..2t-1:   S_i <- S_i + S_{i+1}
//   3) for k = 1..2t:  S_k <- S_k / beta_k ; S_k must be 0 or 1
// that is 2t^2-t, 4t^2-2t and 2t operations, 6t^2-t in all (852 for t = 12).
// Division is inversion followed by the shared multiplier. The binary check
// of step 4 is made on each S_k as step 3 writes it, so it costs no cycle.
//
// Timing, INV_REG = 1 (default, the 333 MHz configuration): a register sits
// after the inversion unit, so every operation takes two cycles: phase A
// selects the multiplier's field operand (beta_k, or the inverse of
// beta_i + beta_{i-k} or of beta_k) and registers it, phase B multiplies, adds
// and writes S. The cycle of `start` is phase A of the first operation;
// `done` pulses 2*(6t^2-t) cycles after `start` (1704 for t = 12).
// INV_REG = 0 (the 166 MHz configuration): no register, one operation per
// cycle, the first one in the cycle of `start` (working on syn directly);
// `done` pulses 6t^2-t cycles after `start` (852). gamma and ok are final when
// done pulses and hold until the next start.
//
// Interface: syn is copied on start; beta is read from the error locator
// evaluator throughout and must hold until done. gamma[j] is gamma_{j+1};
// ok is 1 when every solved magnitude is binary (the decoding succeeded).
// The operation order, the single multiplier and inverter, and both cycle
// totals follow the paper; that the subtractions of step 2 take slots of
// their own is this design's reading of its cycle counts.
module bp_ems
  import bch_pkg::*;
#(
  parameter int T       = 12,  // error-correcting capability t
  parameter bit INV_REG = 1    // register after the inversion unit
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  gf16_t [2*T-1:0]   syn,
  input  gf16_t [2*T-1:0]   beta,
  output logic              busy,
  output logic              done,
  output logic              ok,
  output logic [2*T-1:0]    gamma
);

  localparam int NN = 2 * T;
  localparam int IW = $clog2(NN + 2);

  typedef enum logic [2:0] {
    ST_IDLE, ST_STEP1, ST_DIV2, ST_SUB2, ST_STEP3
  } step_e;

  step_e           step_q, step_eff;
  logic            phase_b_q;   // 0: phase A, 1: phase B (INV_REG = 1)
  logic [IW-1:0]   k_q, i_q;    // 1-based loop indices; k = 1, i = 2t when idle
  gf16_t [NN-1:0]  s_q, s_src;
  gf16_t           x_q;         // registered multiplier operand
  logic            ok_q, done_q;
  logic            idle, exec_a, exec_b, last_op;

  gf16_t inv_in, inv_out, x_next, x_op, y_op, prod, wr_val;
  // 0-based register indices, kept in range outside the steps that use them
  logic [IW-1:0] ix_k, ix_i, ix_im1, ix_ip1, ix_ik;

  assign idle = (step_q == ST_IDLE);
  // While idle the datapath is set up for the first operation (step 1).
  assign step_eff = idle ? ST_STEP1 : step_q;
  assign s_src    = idle ? syn : s_q;
  assign exec_a   = INV_REG && ((idle && start) || (!idle && !phase_b_q));
  assign exec_b   = INV_REG ? (!idle && phase_b_q) : (start || !idle);
  assign last_op  = (step_eff == ST_STEP3) && (k_q == IW'(NN));

  always_comb begin
    ix_k   = (k_q >= IW'(1)) ? k_q - 1'b1 : '0;
    ix_i   = (i_q >= IW'(1)) ? i_q - 1'b1 : '0;
    ix_im1 = (i_q >= IW'(2)) ? i_q - IW'(2) : '0;
    ix_ip1 = (i_q < IW'(NN)) ? i_q : IW'(NN - 1);
    ix_ik  = (i_q > k_q) ? i_q - k_q - 1'b1 : '0;
  end

  composite_inv u_inv (.a(inv_in), .y(inv_out));

  // Phase A: operand of the multiplier (inversion path or beta_k).
  always_comb begin
    if (step_eff == ST_STEP3)
      inv_in = beta[ix_k];
    else
      inv_in = beta[ix_i] ^ beta[ix_ik];
    x_next = (step_eff == ST_STEP1) ? beta[ix_k] : inv_out;
    x_op   = INV_REG ? x_q : x_next;
  end

  // Phase B: multiplier and adders.
  always_comb begin
    unique case (step_eff)
      ST_STEP1: y_op = s_src[ix_im1];
      ST_STEP3: y_op = s_src[ix_k];
      default:  y_op = s_src[ix_i];
    endcase
    prod = gf_mul(x_op, y_op);
    unique case (step_eff)
      ST_STEP1: wr_val = s_src[ix_i] ^ prod;
      ST_SUB2:  wr_val = s_src[ix_i] ^ s_src[ix_ip1];
      default:  wr_val = prod;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_q    <= ST_IDLE;
      phase_b_q <= 1'b0;
      k_q       <= IW'(1);
      i_q       <= IW'(NN);
      s_q       <= '0;
      x_q       <= '0;
      ok_q      <= 1'b0;
      done_q    <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (idle && start) begin
        s_q    <= syn;
        ok_q   <= 1'b1;
        step_q <= ST_STEP1;
      end
      if (exec_a) begin
        x_q       <= x_next;
        phase_b_q <= 1'b1;
      end
      if (exec_b) begin
        phase_b_q <= 1'b0;
        if (step_eff == ST_STEP3) begin
          s_q[ix_k] <= wr_val;
          if (wr_val > gf16_t'(1)) ok_q <= 1'b0;
        end else begin
          s_q[ix_i] <= wr_val;
        end
        unique case (step_eff)
          ST_STEP1: begin
            if (i_q > k_q + 1'b1) begin
              i_q <= i_q - 1'b1;
            end else if (k_q < IW'(NN - 1)) begin
              k_q <= k_q + 1'b1;
              i_q <= IW'(NN);
            end else begin
              step_q <= ST_DIV2;
              k_q    <= IW'(NN - 1);
              i_q    <= IW'(NN);
            end
          end
          ST_DIV2: begin
            if (i_q < IW'(NN)) begin
              i_q <= i_q + 1'b1;
            end else begin
              step_q <= ST_SUB2;
              i_q    <= k_q;
            end
          end
          ST_SUB2: begin
            if (i_q < IW'(NN - 1)) begin
              i_q <= i_q + 1'b1;
            end else if (k_q > IW'(1)) begin
              step_q <= ST_DIV2;
              k_q    <= k_q - 1'b1;
              i_q    <= k_q;          // (k-1) + 1
            end else begin
              step_q <= ST_STEP3;
              k_q    <= IW'(1);
            end
          end
          default: begin             // ST_STEP3
            if (!last_op) begin
              k_q <= k_q + 1'b1;
            end else begin
              step_q <= ST_IDLE;
              done_q <= 1'b1;
              k_q    <= IW'(1);
              i_q    <= IW'(NN);
            end
          end
        endcase
      end
    end
  end

  always_comb begin
    for (int j = 0; j < NN; j++) gamma[j] = s_q[j][0];
  end

  assign busy = !idle;
  assign done = done_q;
  assign ok   = ok_q;

  // A new problem may only be started while the solver is idle.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
