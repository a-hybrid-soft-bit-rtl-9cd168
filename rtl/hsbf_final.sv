// hsbf_final: error correction and detection stage after the decoder.
//
// Takes the decoder's word and the hard decision of the received word and
// reports, for one 16-bit frame:
//   data_o          the 16 data bits of the decoded word (parity dropped),
//   err_detected_o  the received word failed a parity check,
//   uncorrectable_o the decoded word still fails a check: data_o is not
//                   trustworthy,
//   n_flipped_o     how many code bits the decoder changed.
// It recomputes both syndromes itself rather than trusting the decoder's
// status. The document names this stage and its 16-bit output only; the
// flags are this design's reading of "error correction and detect".
//
// Interface and timing: combinational, inputs code_i, rx_hard_i (24 bits each).
module hsbf_final
  import hsbf_pkg::*;
(
  input  code_t                 code_i,
  input  code_t                 rx_hard_i,
  output data_t                 data_o,
  output logic                  err_detected_o,
  output logic                  uncorrectable_o,
  output logic [$clog2(N+1)-1:0] n_flipped_o
);

  synd_t synd_rx, synd_code;

  hsbf_check_nodes u_chk_rx   (.word_i(rx_hard_i), .synd_o(synd_rx));
  hsbf_check_nodes u_chk_code (.word_i(code_i),    .synd_o(synd_code));

  always_comb begin
    data_o          = code_i[K-1:0];
    err_detected_o  = |synd_rx;
    uncorrectable_o = |synd_code;
    n_flipped_o     = '0;
    for (int unsigned n = 0; n < N; n++)
      n_flipped_o += ($clog2(N+1))'(code_i[n] ^ rx_hard_i[n]);
  end

endmodule
