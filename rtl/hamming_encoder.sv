// Hamming single-error-correcting encoder.
//
// Builds an N = K + R bit code word from K data bits. Numbering the code
// word positions from 1, the check bits sit at the powers of two (1, 2, 4,
// 8, ...) and the data bits fill the remaining positions in ascending order,
// data bit 0 first. The check bit at position 2**i makes the number of ones
// even over every position whose index has bit i set. Code word position p
// is bit p-1 of `code`.
//
// Interface: data (K bits) in, code (N bits) out; combinational. With the
// default K = 32 (a 16 x 16 product) R = 6 and N = 38.
//
// Placement of the check bits and even parity follow the original architecture; the bit
// ordering of the code word vector is this design's choice.
module hamming_encoder
  import amm_pkg::*;
#(
  parameter int K = 32,
  parameter int R = hamming_parity_bits(K),
  parameter int N = K + R
) (
  input  logic [K-1:0] data,
  output logic [N-1:0] code
);

  always_comb begin
    int j;
    code = '0;
    j = 0;
    // place data bits at the positions that are not powers of two
    for (int p = 1; p <= N; p++) begin
      if ((p & (p - 1)) != 0) begin
        code[p-1] = data[j];
        j++;
      end
    end
    // each check bit covers the positions whose index has its bit set
    for (int i = 0; i < R; i++) begin
      for (int p = 1; p <= N; p++) begin
        if (((p >> i) & 1) == 1 && p != (1 << i)) begin
          code[(1 << i) - 1] ^= code[p-1];
        end
      end
    end
  end

endmodule
