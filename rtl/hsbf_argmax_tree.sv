// hsbf_argmax_tree: pipelined search for the largest of N signed error terms.
//
// A binary comparison tree of L = clog2(N) levels. Each level halves the number
// of candidates (an odd one out passes through unchanged); on a tie the
// candidate with the lower bit index wins, so the result is the lowest index
// holding the maximum. Levels 1..L-1 are registered; the last comparison is
// combinational so that its result can drive a flip in the same cycle.
//
// Interface: in_valid_i with val_i[N]; out_valid_o with max_o and idx_o.
// Timing: out_valid_o rises L-1 clock edges after in_valid_i (4 for N = 24).
module hsbf_argmax_tree #(
  parameter int unsigned N   = 24,
  parameter int unsigned W   = 7
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid_i,
  input  logic signed [W-1:0]   val_i [N],
  output logic                  out_valid_o,
  output logic signed [W-1:0]   max_o,
  output logic [$clog2(N)-1:0]  idx_o
);

  localparam int unsigned L  = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  // Number of candidates left after level l.
  function automatic int unsigned cnt(int unsigned l);
    return (N + (1 << l) - 1) >> l;
  endfunction

  // nv/ni[l]: result of the comparisons of level l (cnt(l) candidates).
  // vq/iq[l]: the registered copy of level l (l = 1..L-1) feeding level l+1.
  logic signed [W-1:0] nv [L+1][N];
  logic [IW-1:0]       ni [L+1][N];
  logic signed [W-1:0] vq [L+1][N];
  logic [IW-1:0]       iq [L+1][N];
  logic [L:0]          vld_q;
  logic signed [W-1:0] a_v, b_v;
  logic [IW-1:0]       a_i, b_i;

  always_comb begin
    for (int unsigned l = 0; l <= L; l++)
      for (int unsigned j = 0; j < N; j++) begin
        nv[l][j] = '0;
        ni[l][j] = '0;
      end
    for (int unsigned l = 1; l <= L; l++)
      for (int unsigned j = 0; j < cnt(l); j++) begin
        a_v = (l == 1) ? val_i[2*j] : vq[l-1][2*j];
        a_i = (l == 1) ? IW'(2*j)   : iq[l-1][2*j];
        if (2 * j + 1 < cnt(l - 1)) begin
          b_v = (l == 1) ? val_i[2*j+1] : vq[l-1][2*j+1];
          b_i = (l == 1) ? IW'(2*j+1)   : iq[l-1][2*j+1];
        end else begin
          b_v = a_v;
          b_i = a_i;
        end
        // Strictly greater: the lower index keeps a tie.
        if (b_v > a_v) begin
          nv[l][j] = b_v;
          ni[l][j] = b_i;
        end else begin
          nv[l][j] = a_v;
          ni[l][j] = a_i;
        end
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q <= '0;
      for (int unsigned l = 0; l <= L; l++)
        for (int unsigned j = 0; j < N; j++) begin
          vq[l][j] <= '0;
          iq[l][j] <= '0;
        end
    end else begin
      vld_q[0] <= 1'b0;
      vld_q[1] <= in_valid_i;
      for (int unsigned l = 2; l <= L; l++) vld_q[l] <= vld_q[l-1];
      for (int unsigned l = 1; l < L; l++)
        for (int unsigned j = 0; j < cnt(l); j++) begin
          vq[l][j] <= nv[l][j];
          iq[l][j] <= ni[l][j];
        end
    end
  end

  // The last level is combinational on the registered level L-1.
  assign out_valid_o = (L == 1) ? in_valid_i : vld_q[L-1];
  assign max_o       = nv[L][0];
  assign idx_o       = ni[L][0];

endmodule
