// hsbf_top: 64-bit LDPC codec built from four (24,16) lanes.
//
// A 64-bit word is split into four 16-bit frames, d[15:0], d[31:16], d[47:32]
// and d[63:48]; frame i goes through its own encoder, decoder and error
// correction and detection stage, as in the four-lane organisation the
// document describes. The channel between encoder and decoder is not part of
// the design: the encoded words leave through tx_code_o and the receiver takes
// the soft values back through rx_y_i.
//
// Transmit side: tx_valid_i with tx_data_i; one cycle later tx_valid_o with
//   tx_code_o[i], the 24-bit codeword of frame i (bits 15:0 data, 23:16 parity).
// Receive side: the soft values enter one code bit at a time, as the document
//   feeds the received sequence: each cycle with rx_valid_i and rx_ready_o
//   high carries rx_y_i[i], the value of the next code bit (0 first) of frame
//   i (Q-bit two's complement, negative = bit 1). After 24 such cycles the four
//   decoders run independently; when the last one finishes, rx_done_o pulses
//   for one cycle and rx_data_o plus the per-frame flags and flip counts hold
//   until the next rx_done_o. From the 24th value to rx_done_o takes 7 cycles
//   per flip of the slowest lane, plus 3.
// LANES, Q and MAX_ITER are parameters; the frame split and lane count follow
// the document, the handshake is this design's choice.
module hsbf_top
  import hsbf_pkg::*;
#(
  parameter int unsigned LANES    = 4,
  parameter int unsigned Q        = 4,
  parameter int unsigned MAX_ITER = 8,
  parameter int unsigned ITER_W   = $clog2(MAX_ITER + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // transmit
  input  logic                      tx_valid_i,
  input  logic [LANES*K-1:0]        tx_data_i,
  output logic                      tx_valid_o,
  output code_t                     tx_code_o [LANES],
  // receive
  input  logic                      rx_valid_i,
  input  logic signed [Q-1:0]       rx_y_i [LANES],
  output logic                      rx_ready_o,
  output logic                      rx_done_o,
  output logic [LANES*K-1:0]        rx_data_o,
  output logic [LANES-1:0]          rx_err_detected_o,
  output logic [LANES-1:0]          rx_uncorrectable_o,
  output logic [$clog2(N+1)-1:0]    rx_n_flipped_o [LANES],
  output logic [ITER_W-1:0]         rx_iter_o [LANES]
);

  logic [LANES-1:0] lane_ready, lane_done, lane_ok, fin_q;
  logic             busy_q;
  code_t            code [LANES];
  code_t            rx_hard [LANES];
  code_t            enc [LANES];
  data_t            data [LANES];
  logic [LANES-1:0] det, unc;
  logic [$clog2(N+1)-1:0] nfl [LANES];
  logic [ITER_W-1:0] iter [LANES];

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    ldpc_encoder u_enc (
      .data_i (tx_data_i[i*K +: K]),
      .code_o (enc[i])
    );

    hsbf_decoder #(.Q(Q), .MAX_ITER(MAX_ITER), .ITER_W(ITER_W)) u_dec (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid_i (rx_valid_i && rx_ready_o),
      .in_y_i    (rx_y_i[i]),
      .in_ready_o (lane_ready[i]),
      .done_o    (lane_done[i]),
      .code_o    (code[i]),
      .rx_hard_o (rx_hard[i]),
      .ok_o      (lane_ok[i]),
      .iter_o    (iter[i])
    );

    hsbf_final u_final (
      .code_i          (code[i]),
      .rx_hard_i       (rx_hard[i]),
      .data_o          (data[i]),
      .err_detected_o  (det[i]),
      .uncorrectable_o (unc[i]),
      .n_flipped_o     (nfl[i])
    );
  end

  // Transmit register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_valid_o <= 1'b0;
      for (int unsigned i = 0; i < LANES; i++) tx_code_o[i] <= '0;
    end else begin
      tx_valid_o <= tx_valid_i;
      if (tx_valid_i)
        for (int unsigned i = 0; i < LANES; i++) tx_code_o[i] <= enc[i];
    end
  end

  // Receive side: wait for every lane, then capture the results.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q             <= 1'b0;
      fin_q              <= '0;
      rx_done_o          <= 1'b0;
      rx_data_o          <= '0;
      rx_err_detected_o  <= '0;
      rx_uncorrectable_o <= '0;
      for (int unsigned i = 0; i < LANES; i++) begin
        rx_n_flipped_o[i] <= '0;
        rx_iter_o[i]      <= '0;
      end
    end else begin
      rx_done_o <= 1'b0;
      // busy_q: a frame has started to load and not all lanes have finished.
      if (!busy_q) begin
        if (rx_valid_i && rx_ready_o) begin
          busy_q <= 1'b1;
          fin_q  <= '0;
        end
      end else if (&(fin_q | lane_done)) begin
        // All lanes are finished and their outputs hold still.
        busy_q             <= 1'b0;
        rx_done_o          <= 1'b1;
        rx_err_detected_o  <= det;
        rx_uncorrectable_o <= unc;
        for (int unsigned i = 0; i < LANES; i++) begin
          rx_data_o[i*K +: K] <= data[i];
          rx_n_flipped_o[i]   <= nfl[i];
          rx_iter_o[i]        <= iter[i];
        end
      end else begin
        fin_q <= fin_q | lane_done;
      end
    end
  end

  // Every lane loads in step; a lane that has finished waits for the others.
  assign rx_ready_o = &lane_ready;

  // A lane's status flag and the final stage's recomputed check must agree.
  for (genvar i = 0; i < LANES; i++) begin : g_chk
    a_ok_matches: assert property (@(posedge clk) disable iff (!rst_n)
      lane_done[i] |-> lane_ok[i] == !unc[i]);
  end

endmodule
