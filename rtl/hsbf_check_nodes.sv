// hsbf_check_nodes: the M check nodes of the (24,16) code.
//
// Forms the syndrome S = Z * H^T of a hard-decision word: check m is the
// exclusive OR of the code bits its row of H covers, so S_m = 1 marks an
// unsatisfied parity check. An all-zero syndrome means Z is a codeword.
//
// Interface: word_i (24 bits) in, synd_o (8 bits) out. Combinational.
module hsbf_check_nodes
  import hsbf_pkg::*;
(
  input  code_t word_i,
  output synd_t synd_o
);

  always_comb
    for (int unsigned m = 0; m < M; m++)
      synd_o[m] = ^(word_i & h_row(m));

endmodule
