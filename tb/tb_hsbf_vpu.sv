// tb_hsbf_vpu: checks the variable-node unit.
// Loads random soft frames one value per cycle, in a random bit order, and
// checks the captured hard decisions, then feeds
// random syndromes and checks every registered error term against
// (unsatisfied - satisfied checks) * t from the reference tables. Also checks
// single-bit flips and that loading a bit overrides a flip of that bit.
module tb_hsbf_vpu;
  import hsbf_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load = 0, calc = 0, flip = 0;
  logic signed [3:0] rx [24];
  logic signed [3:0] y = '0;
  logic [4:0] lidx = '0;
  logic [7:0] synd = '0;
  logic [4:0] fidx = '0;
  logic [23:0] z;
  logic signed [6:0] e [24];
  logic [23:0] zexp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hsbf_vpu #(.Q(4)) dut (
    .clk(clk), .rst_n(rst_n), .load_i(load), .load_idx_i(lidx), .y_i(y), .calc_i(calc),
    .synd_i(synd), .flip_i(flip), .flip_idx_i(fidx), .z_o(z), .e_o(e));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Write rx into the unit, one value per cycle; optionally in reverse order
  // and with idle cycles in between.
  task automatic load_frame(bit scrambled);
    for (int k = 0; k < 24; k++) begin
      lidx = scrambled ? 5'(23 - k) : 5'(k);
      y = rx[lidx];
      load = 1;
      @(posedge clk); #1;
      load = 0;
      if (scrambled && $urandom_range(0, 3) == 0) begin
        y = 4'($urandom);  // ignored while load is low
        @(posedge clk); #1;
      end
    end
  endtask

  initial begin
    foreach (rx[n]) rx[n] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 300; trial++) begin
      foreach (rx[n]) rx[n] = 4'($urandom);
      load_frame(trial % 2 == 1);
      foreach (rx[n]) zexp[n] = rx[n] < 0;
      check(z == zexp, "hard decisions");
      for (int k = 0; k < 4; k++) begin
        synd = 8'($urandom);
        calc = 1;
        @(posedge clk); #1;
        calc = 0;
        for (int n = 0; n < 24; n++) begin
          automatic int v = vote(n, synd);
          check(int'(e[n]) == v * tval(rx[n]), $sformatf("E[%0d] %0d vs %0d (v=%0d y=%0d)", n, e[n], v * tval(rx[n]), v, rx[n]));
        end
      end
      // flip one bit
      fidx = 5'($urandom_range(0, 23));
      flip = 1;
      @(posedge clk); #1;
      flip = 0;
      zexp[fidx] = ~zexp[fidx];
      check(z == zexp, "flip");
      // loading a bit wins over flipping it
      rx[fidx] = 4'($urandom);
      lidx = fidx;
      y = rx[fidx];
      load = 1; flip = 1;
      @(posedge clk); #1;
      load = 0; flip = 0;
      zexp[fidx] = rx[fidx] < 0;
      check(z == zexp, "load priority");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
