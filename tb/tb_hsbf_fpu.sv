// tb_hsbf_fpu: checks the flip processing unit.
// The syndrome output is compared with the reference syndrome for random
// words. The selection path gets random error terms (many ties) and must
// return the largest value at its lowest index exactly 4 cycles after the
// start pulse, with the valid flag low otherwise.
module tb_hsbf_fpu;
  import hsbf_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [23:0] z = '0;
  logic [7:0] s;
  logic start = 0;
  logic signed [6:0] e [24];
  logic vld;
  logic signed [6:0] mx;
  logic [4:0] idx;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hsbf_fpu #(.E_W(7)) dut (
    .clk(clk), .rst_n(rst_n), .z_i(z), .synd_o(s), .sel_start_i(start),
    .e_i(e), .sel_valid_o(vld), .sel_max_o(mx), .sel_idx_o(idx));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best, bi, range_;
    foreach (e[n]) e[n] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      z = 24'($urandom);
      #1;
      check(s == syndrome(z), "syndrome");
    end
    for (int i = 0; i < 2000; i++) begin
      range_ = (i % 3 == 0) ? 3 : 32;
      foreach (e[n]) e[n] = 7'($signed($urandom_range(0, 2 * range_)) - range_);
      best = e[0]; bi = 0;
      for (int n = 1; n < 24; n++) if (e[n] > best) begin best = e[n]; bi = n; end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int c = 1; c < 4; c++) begin
        check(!vld, "valid early");
        @(negedge clk);
      end
      check(vld, "valid at 4 cycles");
      check(int'(mx) == best && int'(idx) == bi, $sformatf("argmax %0d@%0d vs %0d@%0d", mx, idx, best, bi));
      @(negedge clk);
      check(!vld, "valid one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
