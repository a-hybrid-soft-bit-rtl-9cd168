// hsbf_t_lut: per-bit channel front end of a variable node.
//
// Splits one received soft value y (Q-bit two's complement, positive for a
// transmitted 0, negative for a transmitted 1) into its hard decision z and
// the weight t = 1/|y| that the error term uses, read from a small look-up
// table instead of a divider. With TMAX = 2^(Q-1) the table holds
// t = floor(TMAX / |y|) for |y| >= 1 and t = TMAX for |y| = 0, so an unreliable
// bit (small |y|) gets a large weight and is flipped first.
// For Q = 4: |y| = 0..8 gives t = 8, 8, 4, 2, 2, 1, 1, 1, 1.
//
// Interface: y_i in, z_o and t_o (Q bits, unsigned) out. Combinational.
module hsbf_t_lut #(
  parameter int unsigned Q = 4
) (
  input  logic signed [Q-1:0] y_i,
  output logic                z_o,
  output logic        [Q-1:0] t_o
);

  localparam int unsigned TMAX = 2 ** (Q - 1);

  logic [Q-1:0] tab [TMAX+1];
  logic [Q-1:0] mag;

  for (genvar i = 0; i <= TMAX; i++) begin : g_tab
    assign tab[i] = (i == 0) ? Q'(TMAX) : Q'(TMAX / i);
  end

  always_comb begin
    z_o = y_i[Q-1];
    mag = y_i[Q-1] ? Q'(-y_i) : Q'(y_i);
    t_o = tab[mag];
  end

endmodule
