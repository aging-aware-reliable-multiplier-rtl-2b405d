// Aging-aware variable-latency multiplier with adaptive hold logic.
//
// An m x m unsigned multiplier whose clock period is shorter than its worst
// case path. Bypassing multipliers are fast when the operand that steers
// bypassing has many zero bits, so each operation is given one clock cycle
// or two depending on that operand's zero count:
//
//   operand registers -> bypassing multiplier -> Hamming encoder
//        -> 2m (+ check bits) Razor flip-flops -> Hamming decoder -> product
//
// The adaptive hold logic (AHL) inspects the registered operand. For a
// two-cycle pattern it drops `gating` for one cycle, which holds the operand
// registers and the result stage (the clock gate of the operand registers is
// written here as a clock enable). The Razor flip-flops catch the case where
// a pattern judged to need one cycle was in fact too slow: the shadow
// latches on the delayed clock clk_del hold the correct result, the error
// (`reexecute`) stalls the operand registers for one cycle and the result is
// repaired from the shadow latches. The AHL counts these errors; when they
// exceed its threshold in a window of operations it switches to a stricter
// zero-count judge (n+1 instead of n), so that an aged, slower circuit gives
// two cycles to more patterns. The Hamming code around the Razor stage
// corrects a single flipped bit of the stored result.
//
// Interface (all sampled on the rising edge of clk):
//   in_valid, md, mr  operation offered; taken when in_ready is 1
//   in_ready          the operand registers load at this edge
//   product, product_valid   result of the operation that completed last
//   reexecute         Razor timing error in this cycle (one cycle stall)
//   two_cycle         the operation in the operand registers takes 2 cycles
//   aged              aging indicator output
//   ecc_corrected, ecc_uncorrectable   Hamming decoder status
//   zero_count        number of zero bits of the judged operand
// clk_del is the delayed clock of the Razor shadow latches: a copy of clk
// delayed by less than half a period, supplied from outside.
// Latency: an operation taken at edge t completes at t+1 (one-cycle pattern)
// or t+2 (two-cycle pattern); its product is valid in the following cycle,
// or one cycle later still after a Razor repair.
//
// From the original architecture: the block structure, the AHL with two judges and an
// aging indicator, the Razor flip-flops, ECC encoding and decoding around
// them, and the choice of judged operand per bypassing style. The clock
// enable in place of a gated clock, the in_valid/in_ready handshake, the
// repair of a Razor error by a one-cycle stall, and the values of JUDGE_N,
// AGING_WINDOW and AGING_THRESHOLD are this design's choices.
module aging_aware_multiplier
  import amm_pkg::*;
#(
  parameter int      M               = 16,
  parameter bypass_e BYPASS          = BYPASS_COLUMN,
  parameter int      JUDGE_N         = 7,
  parameter int      AGING_WINDOW    = 128,
  parameter int      AGING_THRESHOLD = 8
) (
  input  logic           clk,
  input  logic           clk_del,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [M-1:0]   md,
  input  logic [M-1:0]   mr,
  output logic           in_ready,
  output logic [2*M-1:0] product,
  output logic           product_valid,
  output logic           reexecute,
  output logic           two_cycle,
  output logic           aged,
  output logic           ecc_corrected,
  output logic           ecc_uncorrectable,
  output logic [$clog2(M+1)-1:0] zero_count
);

  localparam int K = 2 * M;
  localparam int R = hamming_parity_bits(K);
  localparam int N = K + R;

  logic           gating, error, load;
  logic [M-1:0]   opd_md, opd_mr, judged;
  logic           opd_valid, res_tag;
  logic [K-1:0]   mult_product;
  logic [N-1:0]   enc_code, razor_d, razor_q, dec_code;
  logic           bank_valid;

  // operand registers, enabled by the AHL and stalled by a Razor error
  assign load = gating & ~error;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      opd_md    <= '0;
      opd_mr    <= '0;
      opd_valid <= 1'b0;
    end else if (load) begin
      opd_md    <= md;
      opd_mr    <= mr;
      opd_valid <= in_valid;
    end
  end

  assign judged = (BYPASS == BYPASS_COLUMN) ? opd_md : opd_mr;

  ahl #(
    .W(M), .JUDGE_N(JUDGE_N),
    .AGING_WINDOW(AGING_WINDOW), .AGING_THRESHOLD(AGING_THRESHOLD)
  ) u_ahl (
    .clk, .rst_n,
    .operand(judged),
    .op_done(load & opd_valid),
    .error,
    .gating,
    .aged,
    .zeros(zero_count)
  );

  if (BYPASS == BYPASS_COLUMN) begin : g_mult
    column_bypass_multiplier #(.W(M)) u_mult (
      .md(opd_md), .mr(opd_mr), .product(mult_product)
    );
  end else begin : g_mult
    row_bypass_multiplier #(.W(M)) u_mult (
      .md(opd_md), .mr(opd_mr), .product(mult_product)
    );
  end

  hamming_encoder #(.K(K)) u_enc (.data(mult_product), .code(enc_code));

  // path from the encoder into the Razor stage
  assign razor_d = enc_code;

  razor_bank #(.W(N)) u_razor (
    .clk, .clk_del, .rst_n,
    .en(load),
    .d(razor_d),
    .q(razor_q),
    .error,
    .valid(bank_valid)
  );

  // marks whether the word in the Razor stage belongs to an offered operation
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    res_tag <= 1'b0;
    else if (load) res_tag <= opd_valid;
  end

  // path from the Razor stage into the decoder
  assign dec_code = razor_q;

  hamming_decoder #(.K(K)) u_dec (
    .code(dec_code),
    .data(product),
    .corrected(ecc_corrected),
    .uncorrectable(ecc_uncorrectable)
  );

  assign in_ready      = load;
  assign product_valid = bank_valid & res_tag;
  assign reexecute     = error;
  assign two_cycle     = ~gating;

endmodule
