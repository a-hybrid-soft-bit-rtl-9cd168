// tb_hsbf_top: end-to-end test of the 64-bit codec at its default parameters.
// Each round sends a random 64-bit word through the transmit side, passes the
// four codewords through a modelled channel (random confidence per bit,
// wrong-sign errors) and decodes them. Codewords, decoded data, per-frame
// flags, flip counts and the cycles from the last received value to done are
// compared with the reference model. The received values are fed one code bit
// per cycle with random pauses. It counts, and requires at least once: a pause
// while loading, an error-free
// frame, a one-flip correction, a multi-flip correction, a frame whose
// decoding is steered by the soft weights (the unweighted rule would flip a
// different first bit), a frame decoded to a wrong codeword, and a round in
// which the lanes finish at different times.
module tb_hsbf_top;
  import hsbf_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic tx_valid = 0, tx_valid_o;
  logic [63:0] tx_data = '0;
  logic [23:0] tx_code [4];
  logic rx_valid = 0, rx_ready, rx_done;
  logic signed [3:0] rx [4][24];
  logic signed [3:0] rx_y [4];
  logic [63:0] rx_data;
  logic [3:0] det, unc;
  logic [4:0] nfl [4];
  logic [3:0] iter [4];
  int checks = 0, failures = 0;
  int n_pause = 0, n_clean = 0, n_one = 0, n_multi = 0, n_soft = 0, n_wrong = 0, n_skew = 0;

  always #5 clk = ~clk;

  hsbf_top dut (
    .clk(clk), .rst_n(rst_n),
    .tx_valid_i(tx_valid), .tx_data_i(tx_data), .tx_valid_o(tx_valid_o), .tx_code_o(tx_code),
    .rx_valid_i(rx_valid), .rx_y_i(rx_y), .rx_ready_o(rx_ready), .rx_done_o(rx_done),
    .rx_data_o(rx_data), .rx_err_detected_o(det), .rx_uncorrectable_o(unc),
    .rx_n_flipped_o(nfl), .rx_iter_o(iter));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // First bit the decoder would flip with all weights equal to one.
  function automatic int first_flip_unweighted(logic signed [3:0] y [24]);
    logic [23:0] z;
    logic [7:0] s;
    int best, bi;
    foreach (y[n]) z[n] = y[n] < 0;
    s = syndrome(z);
    best = vote(0, s);
    bi = 0;
    for (int n = 1; n < 24; n++)
      if (vote(n, s) > best) begin
        best = vote(n, s);
        bi = n;
      end
    return bi;
  endfunction

  // First bit the weighted rule flips: the one that one iteration changes.
  function automatic int first_flip_weighted(logic signed [3:0] y [24]);
    result_t r;
    logic [23:0] z;
    r = decode(y, 1);
    foreach (y[n]) z[n] = y[n] < 0;
    for (int n = 0; n < 24; n++) if (r.code[n] != z[n]) return n;
    return -1;
  endfunction

  // Send the four received frames, code bit by code bit, with random pauses.
  task automatic send_frames();
    for (int n = 0; n < 24; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 7) == 0) begin
        rx_valid = 0;
        foreach (rx_y[i]) rx_y[i] = 4'($urandom);
        n_pause++;
        @(negedge clk);
      end
      check(rx_ready, "ready while loading");
      rx_valid = 1;
      foreach (rx_y[i]) rx_y[i] = rx[i][n];
    end
    @(negedge clk);
    rx_valid = 0;
    foreach (rx_y[i]) rx_y[i] = 4'($urandom);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] c [4];
    logic signed [3:0] y [24];
    result_t r [4];
    int nerr, cyc, exp_cyc, mn;
    bit [23:0] emask;
    foreach (rx[i, n]) rx[i][n] = '0;
    foreach (rx_y[i]) rx_y[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 600; round++) begin
      // transmit
      @(negedge clk);
      tx_data = {$urandom, $urandom};
      tx_valid = 1;
      @(negedge clk);
      tx_valid = 0;
      check(tx_valid_o, "tx valid");
      for (int i = 0; i < 4; i++) begin
        c[i] = encode(tx_data[16*i +: 16]);
        check(tx_code[i] == c[i], $sformatf("codeword lane %0d", i));
      end
      // channel
      for (int i = 0; i < 4; i++) begin
        case ((round + i) % 4)
          0: nerr = 0;
          1: nerr = 1;
          2: nerr = $urandom_range(2, 3);
          default: nerr = $urandom_range(3, 8);
        endcase
        emask = '0;
        for (int k = 0; k < nerr; k++) emask[$urandom_range(0, 23)] = 1'b1;
        foreach (y[n]) y[n] = chan(tx_code[i][n], $urandom_range(1, 8), emask[n]);
        rx[i] = y;
        r[i] = decode(y);
        if (r[i].iters > 0 && first_flip_weighted(y) != first_flip_unweighted(y)) n_soft++;
      end
      // receive
      send_frames();
      cyc = 1;
      while (!rx_done && cyc < 300) begin
        @(negedge clk);
        cyc++;
      end
      exp_cyc = 0;
      mn = 1000;
      for (int i = 0; i < 4; i++) begin
        if (r[i].cycles > exp_cyc) exp_cyc = r[i].cycles;
        if (r[i].cycles < mn) mn = r[i].cycles;
      end
      check(rx_done, "done");
      check(cyc == exp_cyc + 1, $sformatf("latency %0d vs %0d", cyc, exp_cyc + 1));
      if (mn != exp_cyc) n_skew++;
      for (int i = 0; i < 4; i++) begin
        check(rx_data[16*i +: 16] == r[i].code[15:0], $sformatf("data lane %0d", i));
        check(det[i] == (syndrome(r[i].rx_hard) != 0), "detected flag");
        check(unc[i] == !r[i].ok, "uncorrectable flag");
        check(int'(nfl[i]) == $countones(r[i].code ^ r[i].rx_hard), "flip count");
        check(int'(iter[i]) == r[i].iters, "iterations");
        if (r[i].iters == 0) n_clean++;
        if (r[i].iters == 1) n_one++;
        if (r[i].iters > 1) n_multi++;
        if (r[i].ok && r[i].code != c[i]) n_wrong++;
      end
      @(negedge clk);
      check(!rx_done, "done one pulse");
    end
    $display("mechanisms: pauses=%0d clean=%0d one-flip=%0d multi-flip=%0d soft-steered=%0d wrong-codeword=%0d lane-skew=%0d",
             n_pause, n_clean, n_one, n_multi, n_soft, n_wrong, n_skew);
    check(n_pause > 0, "pause while loading seen");
    check(n_clean > 0, "clean frame seen");
    check(n_one > 0, "one-flip correction seen");
    check(n_multi > 0, "multi-flip correction seen");
    check(n_soft > 0, "soft-steered flip seen");
    check(n_wrong > 0, "wrong codeword seen");
    check(n_skew > 0, "lane skew seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
