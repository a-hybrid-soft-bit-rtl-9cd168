// tb_hsbf_top_limit: the 64-bit codec with the iteration limit lowered to 2.
// At the default limit of 8 every frame reaches a codeword (each flip removes
// at least one of the 8 unsatisfied checks), so the limit and the
// uncorrectable flag only show with a smaller limit. Frames with 2 to 6 wrong
// bits are decoded and the data, flags, flip counts and latency are compared
// with the reference model; frames stopped by the limit must be seen. The
// received values are fed one code bit per cycle, with random pauses.
module tb_hsbf_top_limit;
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
  logic [1:0] iter [4];
  int checks = 0, failures = 0, n_limit = 0;

  always #5 clk = ~clk;

  hsbf_top #(.LANES(4), .Q(4), .MAX_ITER(2)) dut (
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

  // Send the four received frames, code bit by code bit, with random pauses.
  task automatic send_frames();
    for (int n = 0; n < 24; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 7) == 0) begin
        rx_valid = 0;
        foreach (rx_y[i]) rx_y[i] = 4'($urandom);
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [3:0] y [24];
    result_t r [4];
    int cyc, exp_cyc;
    bit [23:0] emask;
    foreach (rx[i, n]) rx[i][n] = '0;
    foreach (rx_y[i]) rx_y[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 300; round++) begin
      @(negedge clk);
      tx_data = {$urandom, $urandom};
      tx_valid = 1;
      @(negedge clk);
      tx_valid = 0;
      exp_cyc = 0;
      for (int i = 0; i < 4; i++) begin
        emask = '0;
        for (int k = $urandom_range(2, 6); k > 0; k--) emask[$urandom_range(0, 23)] = 1'b1;
        foreach (y[n]) y[n] = chan(tx_code[i][n], $urandom_range(1, 8), emask[n]);
        rx[i] = y;
        r[i] = decode(y, 2);
        if (r[i].cycles > exp_cyc) exp_cyc = r[i].cycles;
      end
      send_frames();
      cyc = 1;
      while (!rx_done && cyc < 300) begin
        @(negedge clk);
        cyc++;
      end
      check(cyc == exp_cyc + 1, $sformatf("latency %0d vs %0d", cyc, exp_cyc + 1));
      for (int i = 0; i < 4; i++) begin
        check(rx_data[16*i +: 16] == r[i].code[15:0], "data");
        check(det[i] == (syndrome(r[i].rx_hard) != 0), "detected flag");
        check(unc[i] == !r[i].ok, "uncorrectable flag");
        check(int'(nfl[i]) == $countones(r[i].code ^ r[i].rx_hard), "flip count");
        check(int'(iter[i]) == r[i].iters, "iterations");
        if (!r[i].ok) n_limit++;
      end
    end
    $display("frames stopped by the iteration limit: %0d", n_limit);
    check(n_limit > 0, "iteration limit seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
