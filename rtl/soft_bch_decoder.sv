// soft_bch_decoder: soft-decision (N, N-16t) BCH decoder for the DVB-S2
// outer code, by default the (32400, 32208), t = 12 code over GF(2^16).
//
// Instead of solving the key equation and running a Chien search, the decoder
// trusts the soft output of the LDPC decoder: it keeps the 2t least reliable
// bit positions of the codeword as the only candidate error locations and
// solves the 2t x 2t Vandermonde system  B * Gamma = S  for their error
// magnitudes with the Bjorck-Pereyra method. A binary solution Gamma is the
// error pattern; anything else means an error lies outside the candidates and
// the codeword is passed on uncorrected with out_ok = 0. Up to 2t errors are
// corrected when all of them are among the 2t least reliable bits.
//
// Datapath: syndrome_calc and error_locator_eval take the serial input in
// parallel with the codeword_fifo; bp_ems then solves for Gamma; the
// error_corrector XORs Gamma into the bits played back from the FIFO.
//
// Interface: one soft bit per cycle on in_llr when in_valid && in_ready, highest
// position R_{N-1} first. in_llr is sign-magnitude: bit W-1 is the sign, the
// other bits the reliability; the hard decision is the inverse of the sign bit,
// as in the published syndrome cell, so a set sign bit means a received 0. The
// decoded bits leave on out_bit when out_valid, one per cycle without
// back-pressure, with out_first/out_last framing and out_ok for the codeword.
//
// Timing (continuous input): the N input cycles are followed by 2*(6t^2-t)
// solver cycles (in_ready low), after which the next codeword is accepted in
// the very cycle the solver finishes, so one codeword takes N + 12t^2 - 2t
// cycles: 34104 for the default code, 32208 information bits per 34104 cycles.
// This is the paper's 333 MHz configuration, with a register after the
// inversion unit. INV_REG = 0 gives its 166 MHz configuration: 6t^2-t solver
// cycles, N + 852 = 33252 cycles per codeword.
// The corrected bits of a codeword are read out during the input of the next
// one, starting one cycle after the solver finishes. The overlap of read-out
// with the next input, the sign-magnitude format and the handshake are this
// implementation's choices; the block structure, the single codeword buffer
// and the cycle counts follow the paper.
module soft_bch_decoder
  import bch_pkg::*;
#(
  parameter int N  = 32400,   // BCH code length N_BCH
  parameter int T  = 12,      // error-correcting capability t
  parameter int W  = 7,       // soft input width (sign + W-1 magnitude bits)
  parameter bit INV_REG = 1   // 1: register after the solver's inverter
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_llr,
  output logic         out_valid,
  output logic         out_bit,
  output logic         out_first,
  output logic         out_last,
  output logic         out_ok
);

  localparam int LW = $clog2(N);

  typedef enum logic {S_INPUT, S_SOLVE} state_e;

  state_e        state_q;
  logic [LW-1:0] cnt_q;       // index of the next input bit within the codeword
  logic [LW-1:0] rd_cnt_q;    // bits still to be read from the FIFO
  logic          rd_act_q;
  logic          start_q;     // solver start, the cycle after the last input
  logic          rd_valid_q;

  logic in_fire, in_first, in_last, in_bit;
  logic ems_busy, ems_done, ems_ok;
  logic rd_en, rd_first, rd_data;

  gf16_t [2*T-1:0]        syn;
  gf16_t [2*T-1:0]        beta;
  logic [2*T-1:0][LW-1:0] loc;
  logic [2*T-1:0][W-1:0]  rel;     // sorted reliabilities, only needed inside the sorter
  logic [2*T-1:0]         gamma;

  assign in_ready = (state_q == S_INPUT) || ems_done;
  assign in_fire  = in_valid && in_ready;
  assign in_first = in_fire && cnt_q == '0;
  assign in_last  = in_fire && cnt_q == LW'(N - 1);
  assign in_bit   = ~in_llr[W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_INPUT;
      cnt_q   <= '0;
      start_q <= 1'b0;
    end else begin
      start_q <= in_last;
      if (in_fire) cnt_q <= in_last ? '0 : cnt_q + 1'b1;
      if (in_last)
        state_q <= S_SOLVE;
      else if (ems_done)
        state_q <= S_INPUT;
    end
  end

  syndrome_calc #(.T(T)) u_syn (
    .clk, .rst_n,
    .in_valid (in_fire),
    .in_first (in_first),
    .in_bit   (in_bit),
    .syn      (syn)
  );

  error_locator_eval #(.N(N), .T(T), .W(W), .LW(LW)) u_ele (
    .clk, .rst_n,
    .in_valid (in_fire),
    .in_first (in_first),
    .in_mag   (in_llr[W-2:0]),
    .rel      (rel),
    .beta     (beta),
    .loc      (loc)
  );

  bp_ems #(.T(T), .INV_REG(INV_REG)) u_ems (
    .clk, .rst_n,
    .start (start_q),
    .syn   (syn),
    .beta  (beta),
    .busy  (ems_busy),
    .done  (ems_done),
    .ok    (ems_ok),
    .gamma (gamma)
  );

  // Read-out of the buffered codeword starts when the solver is done.
  assign rd_first = ems_done;
  assign rd_en    = ems_done || rd_act_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_act_q   <= 1'b0;
      rd_cnt_q   <= '0;
      rd_valid_q <= 1'b0;
    end else begin
      rd_valid_q <= rd_en;
      if (ems_done) begin
        rd_act_q <= (N > 1);
        rd_cnt_q <= LW'(N - 2);
      end else if (rd_act_q) begin
        if (rd_cnt_q == '0) rd_act_q <= 1'b0;
        rd_cnt_q <= rd_cnt_q - 1'b1;
      end
    end
  end

  codeword_fifo #(.DEPTH(N)) u_fifo (
    .clk, .rst_n,
    .wr_en    (in_fire),
    .wr_first (in_first),
    .wr_data  (in_bit),
    .rd_en    (rd_en),
    .rd_first (rd_first),
    .rd_data  (rd_data)
  );

  error_corrector #(.N(N), .T(T), .LW(LW)) u_cor (
    .clk, .rst_n,
    .load      (ems_done),
    .loc_in    (loc),
    .gamma_in  (gamma),
    .ok_in     (ems_ok),
    .in_valid  (rd_valid_q),
    .in_bit    (rd_data),
    .out_valid (out_valid),
    .out_bit   (out_bit),
    .out_first (out_first),
    .out_last  (out_last),
    .out_ok    (out_ok)
  );

  // The solver is started only once per codeword, while it is idle.
  assert property (@(posedge clk) disable iff (!rst_n) start_q |-> !ems_busy);

endmodule
