// hsbf_vpu: variable-node processing unit of the HSBF decoder.
//
// Holds, for each of the N code bits, the current hard decision z_n and the
// reliability weight t_n = 1/|y_n|. The received values enter one per cycle
// and pass through a single shared look-up table (hsbf_t_lut), so the whole
// frame needs only one reciprocal unit; each node keeps t_n and z_n, never the
// soft value itself, as the document describes. On request it computes
// every error term in parallel,
//     E_n = sum over the checks m covering n of (2*S_m - 1) * t_n,
// so each unsatisfied check adds +t_n and each satisfied one -t_n, and
// registers them. A flip command inverts one hard decision.
//
// Interface:
//   load_i + load_idx_i + y_i: capture hard decision and weight of bit load_idx_i
//   calc_i   + synd_i: register the error terms e_o from the syndrome
//   flip_i   + flip_idx_i: invert z[flip_idx_i]
// Timing: each command takes effect at the next rising clock edge; load has
// priority over a flip of the same bit. z_o and e_o are register outputs. Reset clears them.
// The error-term formula, the serial input through one look-up table and the
// per-node storage of t_n follow the document;
// widths and the command interface are this design's choice.
module hsbf_vpu
  import hsbf_pkg::*;
#(
  parameter int unsigned Q   = 4,
  parameter int unsigned E_W = Q + 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load_i,
  input  logic [$clog2(N)-1:0]    load_idx_i,
  input  logic signed [Q-1:0]     y_i,
  input  logic                    calc_i,
  input  synd_t                   synd_i,
  input  logic                    flip_i,
  input  logic [$clog2(N)-1:0]    flip_idx_i,
  output code_t                   z_o,
  output logic signed [E_W-1:0]   e_o [N]
);

  logic         z_in;
  logic [Q-1:0] t_in;
  logic [Q-1:0] t_q  [N];
  logic signed [E_W-1:0] e_d [N];

  hsbf_t_lut #(.Q(Q)) u_lut (.y_i(y_i), .z_o(z_in), .t_o(t_in));

  for (genvar n = 0; n < N; n++) begin : g_node
    // Vote of the checks on bit n: +1 per unsatisfied, -1 per satisfied check.
    always_comb begin
      logic signed [3:0] vote;
      vote = '0;
      for (int unsigned m = 0; m < M; m++)
        if (h_col(n)[m]) vote += synd_i[m] ? 4'sd1 : -4'sd1;
      e_d[n] = E_W'(vote) * E_W'($signed({1'b0, t_q[n]}));
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        z_o[n]  <= 1'b0;
        t_q[n]  <= '0;
        e_o[n]  <= '0;
      end else begin
        if (load_i && load_idx_i == ($clog2(N))'(n)) begin
          z_o[n] <= z_in;
          t_q[n] <= t_in;
        end else if (flip_i && flip_idx_i == ($clog2(N))'(n)) begin
          z_o[n] <= ~z_o[n];
        end
        if (calc_i) e_o[n] <= e_d[n];
      end
    end
  end

endmodule
