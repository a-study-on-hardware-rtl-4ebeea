// tb_nocnn_neuron: checks the neuron's weighted sum against a fixed-point
// reference: random weights and inputs (including unused-neuron and
// saturation cases), the three-cycle delay from the last input to the
// updated sum, and clearing between patterns.
module tb_nocnn_neuron;
  import nocnn_pkg::*;
  import tb_nocnn_ref_pkg::*;

  localparam int WDEPTH = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en = 1, clear = 0, wr_en = 0, x_valid = 0;
  logic [4:0] wr_addr = 0, rd_addr = 0;
  fix_t wr_data = 0, x = 0, sum;

  nocnn_neuron #(.WDEPTH(WDEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t %s", $time, what); end
  endtask

  int w [WDEPTH];
  int xs [WDEPTH];

  task automatic run(int n, bit use_en, real wmax, real xmax);
    longint acc, acc_prev;
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    en = use_en;
    for (int i = 0; i < n; i++) begin
      w[i] = to_fix(rand_real(-wmax, wmax));
      @(negedge clk);
      wr_en = 1; wr_addr = 5'(i); wr_data = w[i];
    end
    @(negedge clk);
    wr_en = 0;
    acc = 0;
    for (int i = 0; i < n; i++) begin
      xs[i] = to_fix(rand_real(-xmax, xmax));
      acc_prev = acc;
      acc += mul_fix(w[i], xs[i]);
      @(negedge clk);
      x_valid = 1; rd_addr = 5'(i); x = xs[i];
    end
    @(negedge clk);
    x_valid = 0;
    // last input was taken at the edge before; the sum is final 3 cycles after it
    @(negedge clk);
    check(sum == (use_en ? sat32(acc_prev) : 0), "two cycles after the last input the sum lacks its last product");
    @(negedge clk);
    check(sum == (use_en ? sat32(acc) : 0), $sformatf("sum %h expected %h", sum, use_en ? sat32(acc) : 0));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) run($urandom_range(1, 20), 1, 1.0, 2.0);
    run(20, 0, 1.0, 1.0);          // unused neuron accumulates nothing
    run(20, 1, 60.0, 60.0);        // saturation
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
