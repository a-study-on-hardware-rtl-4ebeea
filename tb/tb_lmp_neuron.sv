// tb_lmp_neuron: checks one neuron module of the layer-multiplexed network
// against an exact model: random input lists of 1..8 values, back to back
// and with gaps, the enable held low for some sums (the module must then
// produce f(0)), and the output timing (result four cycles after the last
// input).
module tb_lmp_neuron;
  import tb_lmp_ref_pkg::*;

  localparam int AW = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en = 0, x_valid = 0, first = 0, last = 0, lut_we = 0, y_valid;
  logic signed [15:0] x = 0, w = 0;
  logic [AW-1:0] lut_addr = 0;
  logic [15:0] lut_data = 0, y;

  lmp_neuron dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t %s", $time, what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected results, with the cycle they must appear in
  int exp_y [$], exp_cyc [$];
  int n_sums = 0, n_disabled = 0, n_sat = 0;

  always @(posedge clk) if (rst_n) begin
    if (y_valid) begin
      check(exp_y.size() > 0, "unexpected result");
      if (exp_y.size() > 0) begin
        check(y == 16'(exp_y[0]), $sformatf("y %0d expected %0d", y, exp_y[0]));
        check(cyc == exp_cyc[0], $sformatf("result at cycle %0d expected %0d", cyc, exp_cyc[0]));
        void'(exp_y.pop_front());
        void'(exp_cyc.pop_front());
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < (1 << AW); k++) begin
      @(negedge clk);
      lut_we = 1; lut_addr = AW'(k); lut_data = 16'(lut_word(k, AW));
    end
    @(negedge clk);
    lut_we = 0;
    for (int s = 0; s < 60; s++) begin
      int n;
      bit e;
      longint acc;
      n = $urandom_range(1, 8);
      e = ($urandom_range(0, 4) != 0);
      acc = 0;
      for (int i = 0; i < n; i++) begin
        int xi, wi;
        xi = to_q12(rand_real(-1.0, 1.0));
        wi = to_q12(rand_real(-3.0, 3.0));
        if (s % 7 == 3) begin xi = 32767; wi = 32767; end  // drive the sum out of range
        @(negedge clk);
        en = e; x_valid = 1; first = (i == 0); last = (i == n - 1);
        x = 16'(xi); w = 16'(wi);
        if (e) acc += longint'(xi) * longint'(wi);
        if (i == n - 1) begin
          exp_y.push_back(lut_word(lut_index(acc, AW), AW));
          exp_cyc.push_back(cyc + 4);
        end
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          x_valid = 0; x = 16'($urandom); w = 16'($urandom);
        end
      end
      n_sums++;
      if (!e) n_disabled++;
      if (acc >= (64'sd1 <<< 27)) n_sat++;
    end
    @(negedge clk);
    x_valid = 0;
    repeat (10) @(posedge clk);
    check(exp_y.size() == 0, "all results seen");
    check(n_disabled > 0 && n_sat > 0, "disabled and saturated sums exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
