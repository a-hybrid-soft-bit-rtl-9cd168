// tb_hsbf_decoder: checks the iterative decoder against the reference model.
// Random data words are encoded, sent over a modelled channel (random
// confidence per bit, 0 to 9 bits received with the wrong sign) and decoded.
// The decoded word, success flag, flip count, received hard word and the exact
// number of cycles from the last input value to done must match the
// reference. Values are fed one per cycle with random idle cycles between. Also checks
// that every single-bit error at equal confidence is corrected with one flip,
// and that each reachable way of ending (clean word, corrected, iteration
// limit) happened; a second decoder with MAX_ITER = 2 exercises the limit.
module tb_hsbf_decoder;
  import hsbf_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic vin = 0;
  logic signed [3:0] yin = '0;
  logic ready, done, ok;
  logic [23:0] code, rxh;
  logic [3:0] iter;
  int checks = 0, failures = 0;
  int n_clean = 0, n_fixed = 0, n_limit = 0, n_stuck = 0, n_multi = 0;

  always #5 clk = ~clk;

  // A second decoder with a low iteration limit runs on the same frames so
  // that the limit is reached often.
  logic ready2, done2, ok2;
  logic [23:0] code2, rxh2;
  logic [1:0] iter2;
  hsbf_decoder #(.Q(4), .MAX_ITER(2)) dut2 (
    .clk(clk), .rst_n(rst_n), .in_valid_i(vin), .in_y_i(yin), .in_ready_o(ready2),
    .done_o(done2), .code_o(code2), .rx_hard_o(rxh2), .ok_o(ok2), .iter_o(iter2));

  hsbf_decoder #(.Q(4), .MAX_ITER(8)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid_i(vin), .in_y_i(yin), .in_ready_o(ready),
    .done_o(done), .code_o(code), .rx_hard_o(rxh), .ok_o(ok), .iter_o(iter));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run(logic signed [3:0] y [24]);
    result_t r, r2;
    int cyc, cyc2;
    r = decode(y);
    r2 = decode(y, 2);
    for (int n = 0; n < 24; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        vin = 0;
        yin = 4'($urandom);  // not sampled while vin is low
        @(negedge clk);
      end
      check(ready && ready2, "ready while loading");
      vin = 1;
      yin = y[n];
    end
    @(negedge clk);
    vin = 0;
    yin = 4'($urandom);
    cyc = 1;
    cyc2 = 0;
    while (!done && cyc < 200) begin
      if (done2) cyc2 = cyc;
      @(negedge clk);
      cyc++;
    end
    if (done2) cyc2 = cyc;
    check(cyc2 == r2.cycles, $sformatf("limited latency %0d vs %0d", cyc2, r2.cycles));
    check(code2 == r2.code && ok2 == r2.ok && int'(iter2) == r2.iters,
          "limited decoder result");
    if (!r2.ok && !r2.stuck) n_limit++;
    check(done, "done");
    check(code == r.code, $sformatf("code %h vs %h", code, r.code));
    check(ok == r.ok, "ok");
    check(int'(iter) == r.iters, $sformatf("iter %0d vs %0d", iter, r.iters));
    check(rxh == r.rx_hard, "rx_hard");
    check(cyc == r.cycles, $sformatf("latency %0d vs %0d", cyc, r.cycles));
    if (r.ok && r.iters == 0) n_clean++;
    if (r.ok && r.iters > 0) n_fixed++;
    if (r.ok && r.iters > 1) n_multi++;
    if (r.stuck) n_stuck++;
    @(negedge clk);
    check(!done, "done is one pulse");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [3:0] y [24];
    logic [23:0] c;
    int nerr;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Every single error at equal confidence is corrected in one flip.
    for (int b = 0; b < 24; b++) begin
      c = encode(16'($urandom));
      foreach (y[n]) y[n] = chan(c[n], 5, n == b);
      run(y);
      checks++;
      if (code != c || iter != 1) begin
        failures++;
        $display("FAIL single error at bit %0d", b);
      end
    end
    // Random channel.
    for (int i = 0; i < 1500; i++) begin
      bit [23:0] emask;
      c = encode(16'($urandom));
      nerr = (i % 5 == 4) ? $urandom_range(4, 9) : $urandom_range(0, 3);
      emask = '0;
      for (int k = 0; k < nerr; k++) emask[$urandom_range(0, 23)] = 1'b1;
      foreach (y[n]) y[n] = chan(c[n], $urandom_range(1, 8), emask[n]);
      run(y);
    end
    $display("endings: clean=%0d corrected=%0d multi-flip=%0d limit=%0d stuck=%0d",
             n_clean, n_fixed, n_multi, n_limit, n_stuck);
    // With this code a non-zero syndrome always leaves a parity bit with a
    // positive error term, so the "no positive term" ending cannot occur.
    check(n_clean > 0 && n_fixed > 0 && n_multi > 0 && n_limit > 0 && n_stuck == 0,
          "every ending seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
