// Hamming single-error-correcting decoder.
//
// Recomputes every check of the code word built by hamming_encoder. The
// failing checks, read as a binary number, form the syndrome: the 1-based
// position of a single flipped bit, or 0 if all checks pass. The bit at that
// position is inverted and the data bits are taken from the positions that
// are not powers of two. A syndrome beyond the code word length (possible
// only with several flipped bits) corrects nothing and is reported through
// `uncorrectable`.
//
// Interface: code (N bits) in; data (K bits), corrected (a single bit was
// repaired) and uncorrectable out; combinational.
//
// The check sets follow the original architecture; the syndrome decoding is the standard
// one for this code and the uncorrectable flag is this design's addition.
module hamming_decoder
  import amm_pkg::*;
#(
  parameter int K = 32,
  parameter int R = hamming_parity_bits(K),
  parameter int N = K + R
) (
  input  logic [N-1:0] code,
  output logic [K-1:0] data,
  output logic         corrected,
  output logic         uncorrectable
);

  logic [R-1:0] syndrome;
  logic [N-1:0] fixed;

  always_comb begin
    syndrome = '0;
    for (int i = 0; i < R; i++) begin
      for (int p = 1; p <= N; p++) begin
        if (((p >> i) & 1) == 1) syndrome[i] ^= code[p-1];
      end
    end
  end

  always_comb begin
    int j;
    fixed = code;
    for (int p = 1; p <= N; p++) begin
      if (int'(syndrome) == p) fixed[p-1] = ~code[p-1];
    end
    data = '0;
    j = 0;
    for (int p = 1; p <= N; p++) begin
      if ((p & (p - 1)) != 0) begin
        data[j] = fixed[p-1];
        j++;
      end
    end
  end

  assign corrected     = (syndrome != '0) && (int'(syndrome) <= N);
  assign uncorrectable = (int'(syndrome) > N);

endmodule
