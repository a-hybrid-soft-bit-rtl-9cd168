// hsbf_fpu: flip processing unit of the HSBF decoder.
//
// The partner of the variable-node unit (hsbf_vpu). It receives the current
// hard decisions and error terms from the VPU and returns what the VPU needs
// next:
//   * the syndrome S = Z * H^T from the check nodes (hsbf_check_nodes), and
//   * the position and value of the largest error term E_n, the bit that the
//     flip step inverts (hsbf_argmax_tree, lowest index on a tie).
// The document names this unit only; its split into syndrome and flip
// selection is this design's reading of the decoding steps.
//
// Interface: z_i (hard word) -> synd_o, combinational.
//            sel_start_i + e_i[N] -> sel_valid_o, sel_max_o, sel_idx_o.
// Timing: sel_valid_o rises clog2(N)-1 = 4 clock edges after sel_start_i.
module hsbf_fpu
  import hsbf_pkg::*;
#(
  parameter int unsigned E_W = 7
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  code_t                  z_i,
  output synd_t                  synd_o,
  input  logic                   sel_start_i,
  input  logic signed [E_W-1:0]  e_i [N],
  output logic                   sel_valid_o,
  output logic signed [E_W-1:0]  sel_max_o,
  output logic [$clog2(N)-1:0]   sel_idx_o
);

  hsbf_check_nodes u_checks (
    .word_i (z_i),
    .synd_o (synd_o)
  );

  hsbf_argmax_tree #(.N(N), .W(E_W)) u_argmax (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid_i  (sel_start_i),
    .val_i       (e_i),
    .out_valid_o (sel_valid_o),
    .max_o       (sel_max_o),
    .idx_o       (sel_idx_o)
  );

endmodule
