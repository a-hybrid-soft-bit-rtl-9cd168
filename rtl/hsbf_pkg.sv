// hsbf_pkg: code constants shared by the encoder and the hybrid soft bit
// flipping (HSBF) decoder.
//
// The code is a systematic (24,16) low-density parity-check code: 16 data bits,
// 8 parity bits, parity-check matrix H = [P^T | I8] and generator G = [I16 | P].
// Codeword bit n is c[n]; bits 0..15 are the data, bit 16+m is the parity bit of
// check m. The 16-bit frame and the 24-bit codeword follow the frame sizes of the
// four-lane 64-bit codec; the contents of P are this design's own choice.
//
// Choice of P: every data column of H has weight 2 and every parity column
// weight 1, and no two columns share more than one check (the row-column
// constraint of Euclidean-geometry LDPC codes). Data bit i (0..7) is checked by
// checks i and (i+1) mod 8, data bit 8+i by checks i and (i+2) mod 8. Each check
// therefore covers 4 data bits and its own parity bit (row weight 5). A single
// bit error is always the unique bit with the largest unweighted error term.
package hsbf_pkg;

  localparam int unsigned N = 24;        // code length
  localparam int unsigned K = 16;        // data bits per frame
  localparam int unsigned M = N - K;     // checks (parity bits)

  typedef logic [N-1:0] code_t;
  typedef logic [K-1:0] data_t;
  typedef logic [M-1:0] synd_t;

  // Column n of H as an M-bit mask: bit m set when check m covers code bit n.
  function automatic synd_t h_col(int unsigned n);
    synd_t c;
    c = '0;
    if (n < 8) begin
      c[n] = 1'b1;
      c[(n + 1) % 8] = 1'b1;
    end else if (n < K) begin
      c[n - 8] = 1'b1;
      c[(n - 8 + 2) % 8] = 1'b1;
    end else begin
      c[n - K] = 1'b1;
    end
    return c;
  endfunction

  // Row m of H as an N-bit mask over the codeword.
  function automatic code_t h_row(int unsigned m);
    code_t r;
    for (int unsigned n = 0; n < N; n++) r[n] = h_col(n)[m];
    return r;
  endfunction

endpackage
