// ldpc_encoder: systematic (24,16) LDPC encoder, one frame per cycle.
//
// Computes c = d * G with G = [I16 | P]: the codeword carries the 16 data bits
// unchanged in bits 15:0 and, in bit 16+m, the even parity of the data bits
// that check m of H covers (H = [P^T | I8], see hsbf_pkg). Every codeword it
// produces satisfies c * H^T = 0. The systematic form follows the document;
// the contents of P are this design's choice.
//
// Interface: data_i (16 bits) in, code_o (24 bits) out.
// Timing: purely combinational; the surrounding logic registers it.
module ldpc_encoder
  import hsbf_pkg::*;
(
  input  data_t data_i,
  output code_t code_o
);

  always_comb begin
    code_o[K-1:0] = data_i;
    for (int unsigned m = 0; m < M; m++)
      code_o[K+m] = ^(data_i & h_row(m)[K-1:0]);
  end

endmodule
