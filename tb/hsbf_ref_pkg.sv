// hsbf_ref_pkg: reference model of the (24,16) code and of the HSBF decoding
// algorithm, written independently of the RTL for the testbenches.
//
// The parity-check matrix is spelled out column by column as literal masks,
// the reliability weights as a literal table (for Q = 4), and decoding is a
// plain sequential loop: syndrome, weighted error terms, flip of the lowest
// index holding the largest positive term, repeat. The model also predicts the
// number of cycles the pipelined decoder needs.
package hsbf_ref_pkg;

  // Column n of H, bit m = check m. Data columns: checks {i, i+1} for bits
  // 0..7, checks {i, i+2} for bits 8..15; parity bit 16+m: check m only.
  localparam logic [7:0] HCOL [24] = '{
    8'h03, 8'h06, 8'h0C, 8'h18, 8'h30, 8'h60, 8'hC0, 8'h81,
    8'h05, 8'h0A, 8'h14, 8'h28, 8'h50, 8'hA0, 8'h41, 8'h82,
    8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80};

  // t for |y| = 0..8 with 4-bit soft values.
  localparam int TTAB [9] = '{8, 8, 4, 2, 2, 1, 1, 1, 1};

  localparam int MAX_ITER = 8;

  typedef struct {
    logic [23:0] code;
    logic [23:0] rx_hard;
    bit          ok;
    int          iters;
    int          cycles;   // start cycle to done cycle
    bit          stuck;    // ended because no error term was positive
  } result_t;

  function automatic logic [7:0] syndrome(logic [23:0] w);
    logic [7:0] s = '0;
    for (int n = 0; n < 24; n++) if (w[n]) s ^= HCOL[n];
    return s;
  endfunction

  // Unsatisfied minus satisfied checks on bit n, i.e. the sum of (2*S_m - 1).
  function automatic int vote(int n, logic [7:0] s);
    logic [7:0] col = HCOL[n];
    return 2 * $countones(col & s) - $countones(col);
  endfunction

  function automatic logic [23:0] encode(logic [15:0] d);
    logic [23:0] c = {8'h00, d};
    logic [7:0]  s = syndrome(c);
    c[23:16] = s;  // parity bit 16+m cancels check m
    return c;
  endfunction

  function automatic int tval(logic signed [3:0] y);
    int mag = (y < 0) ? -int'(y) : int'(y);
    return TTAB[mag];
  endfunction

  // Soft value for a transmitted bit b with confidence mag (1..8); flip sends
  // the wrong sign (a channel error).
  function automatic logic signed [3:0] chan(bit b, int mag, bit flip);
    int v = (b ^ flip) ? -mag : mag;
    if (v == 8) v = 7;
    return 4'(v);
  endfunction

  function automatic result_t decode(logic signed [3:0] y [24], int max_iter = MAX_ITER);
    result_t r;
    logic [23:0] z;
    int t [24];
    int e [24];
    logic [7:0] s;
    int best, bi;
    for (int n = 0; n < 24; n++) begin
      z[n] = y[n] < 0;
      t[n] = tval(y[n]);
    end
    r.rx_hard = z;
    r.iters = 0;
    r.ok = 0;
    r.stuck = 0;
    forever begin
      s = syndrome(z);
      if (s == 0) begin r.ok = 1; r.cycles = 7 * r.iters + 2; break; end
      if (r.iters == max_iter) begin r.cycles = 7 * r.iters + 2; break; end
      for (int n = 0; n < 24; n++) e[n] = vote(n, s) * t[n];
      best = e[0]; bi = 0;
      for (int n = 1; n < 24; n++) if (e[n] > best) begin best = e[n]; bi = n; end
      if (best <= 0) begin r.stuck = 1; r.cycles = 7 * r.iters + 8; break; end
      z[bi] = ~z[bi];
      r.iters++;
    end
    r.code = z;
    return r;
  endfunction

endpackage
