// hsbf_decoder: iterative hybrid soft bit flipping decoder for one (24,16) frame.
//
// A frame arrives as 24 soft values, one per accepted cycle, bit 0 first
// (LOAD). Each passes through the VPU's single reliability look-up table; the
// decoder keeps only hard decisions and weights. It then repeats one flip per
// iteration:
//   SYN  : the check nodes form the syndrome S of the current word. S = 0 ends
//          decoding with success; a non-zero S after MAX_ITER flips ends it
//          with failure. Otherwise S is registered.
//   ERR  : the VPU computes and registers all error terms E_n from S.
//   SEL  : the FPU's comparison tree looks for the largest E_n (4 cycles).
//   FLIP : the last comparison picks bit n*; if E_n* > 0, i.e. most of the
//          weighted checks on it fail, z[n*] is inverted and the next iteration
//          starts. If no error term is positive, no flip can help and decoding
//          ends with failure.
// One iteration therefore takes 2 + clog2(N) = 7 cycles, the figure the
// document gives for this decoder. The serial input, the flip rule, the error
// term and the stopping rule follow the document; MAX_ITER, the soft-value
// format and the handshake are this design's choices.
//
// Interface: in_valid_i with in_y_i (Q-bit two's complement, negative = bit 1)
// is accepted while in_ready_o is high; the 24th accepted value starts
// decoding. done_o pulses for one cycle; with it and until the next frame
// starts to load, code_o holds the decoded word, rx_hard_o the hard decision of
// the received word, ok_o whether code_o satisfies all checks and iter_o the
// number of flips made.
// Timing: counted from the cycle that delivers the 24th value, done_o comes
// 7*F + 2 cycles later when decoding ends on a zero syndrome after F flips (or
// on the iteration limit, F = MAX_ITER), and 7*F + 8 cycles later when it stops
// in FLIP with no positive error term.
module hsbf_decoder
  import hsbf_pkg::*;
#(
  parameter int unsigned Q        = 4,
  parameter int unsigned MAX_ITER = 8,
  parameter int unsigned ITER_W   = $clog2(MAX_ITER + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid_i,
  input  logic signed [Q-1:0]  in_y_i,
  output logic                 in_ready_o,
  output logic                 done_o,
  output code_t                code_o,
  output code_t                rx_hard_o,
  output logic                 ok_o,
  output logic [ITER_W-1:0]    iter_o
);

  localparam int unsigned E_W = Q + 3;
  localparam int unsigned SEL_CYCLES = $clog2(N) - 1;

  typedef enum logic [2:0] {S_LOAD, S_SYN, S_ERR, S_SEL, S_FLIP, S_DONE} state_t;

  state_t                 state_q;
  logic [2:0]             sel_cnt_q;
  logic [$clog2(N)-1:0]   load_cnt_q;
  logic [ITER_W-1:0]      iter_q;
  logic                   ok_q;
  synd_t                  synd, synd_q;
  code_t                  z;
  logic signed [E_W-1:0]  e [N];
  logic                   sel_valid;
  logic signed [E_W-1:0]  sel_max;
  logic [$clog2(N)-1:0]   sel_idx;
  logic                   load, calc, flip;

  assign load = (state_q == S_LOAD) && in_valid_i;
  assign calc = (state_q == S_ERR);
  assign flip = (state_q == S_FLIP) && (sel_max > 0);

  hsbf_vpu #(.Q(Q), .E_W(E_W)) u_vpu (
    .clk        (clk),
    .rst_n      (rst_n),
    .load_i     (load),
    .load_idx_i (load_cnt_q),
    .y_i        (in_y_i),
    .calc_i     (calc),
    .synd_i     (synd_q),
    .flip_i     (flip),
    .flip_idx_i (sel_idx),
    .z_o        (z),
    .e_o        (e)
  );

  hsbf_fpu #(.E_W(E_W)) u_fpu (
    .clk         (clk),
    .rst_n       (rst_n),
    .z_i         (z),
    .synd_o      (synd),
    .sel_start_i (state_q == S_SEL && sel_cnt_q == '0),
    .e_i         (e),
    .sel_valid_o (sel_valid),
    .sel_max_o   (sel_max),
    .sel_idx_o   (sel_idx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_LOAD;
      sel_cnt_q  <= '0;
      load_cnt_q <= '0;
      iter_q    <= '0;
      ok_q      <= 1'b0;
      synd_q    <= '0;
      rx_hard_o <= '0;
    end else begin
      unique case (state_q)
        S_LOAD: if (in_valid_i) begin
          rx_hard_o[load_cnt_q] <= in_y_i[Q-1];
          if (load_cnt_q == '0) begin
            iter_q <= '0;
            ok_q   <= 1'b0;
          end
          if (load_cnt_q == ($clog2(N))'(N - 1)) begin
            load_cnt_q <= '0;
            state_q    <= S_SYN;
          end else begin
            load_cnt_q <= load_cnt_q + 1'b1;
          end
        end
        S_SYN: begin
          synd_q <= synd;
          if (synd == '0) begin
            ok_q    <= 1'b1;
            state_q <= S_DONE;
          end else if (iter_q == ITER_W'(MAX_ITER)) begin
            state_q <= S_DONE;
          end else begin
            state_q <= S_ERR;
          end
        end
        S_ERR: begin
          state_q   <= S_SEL;
          sel_cnt_q <= '0;
        end
        S_SEL: begin
          sel_cnt_q <= sel_cnt_q + 3'd1;
          if (sel_cnt_q == 3'(SEL_CYCLES - 1)) state_q <= S_FLIP;
        end
        S_FLIP: begin
          if (flip) begin
            iter_q  <= iter_q + 1'b1;
            state_q <= S_SYN;
          end else begin
            state_q <= S_DONE;
          end
        end
        S_DONE: state_q <= S_LOAD;
        default: state_q <= S_LOAD;
      endcase
    end
  end

  assign in_ready_o = (state_q == S_LOAD);
  assign done_o  = (state_q == S_DONE);
  assign code_o  = z;
  assign ok_o    = ok_q;
  assign iter_o  = iter_q;

  // The comparison tree must deliver its result exactly when FLIP uses it.
  a_sel_in_flip: assert property (@(posedge clk) disable iff (!rst_n)
    state_q == S_FLIP |-> sel_valid);
  a_load_cnt: assert property (@(posedge clk) disable iff (!rst_n)
    load_cnt_q < ($clog2(N))'(N));

endmodule
