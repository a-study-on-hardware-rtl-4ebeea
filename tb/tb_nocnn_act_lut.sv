// tb_nocnn_act_lut: loads the log-sigmoid table and checks that a sum in
// [-64, 64) selects the entry of its 1/8-wide interval one cycle later,
// including both ends of the range.
module tb_nocnn_act_lut;
  import nocnn_pkg::*;
  import tb_nocnn_ref_pkg::*;

  localparam int AW = 10;

  logic clk = 0;
  always #5 clk = ~clk;

  logic wr_en = 0;
  logic [AW-1:0] wr_addr = 0;
  fix_t wr_data = 0, sum = 0, dout;

  nocnn_act_lut #(.AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t %s", $time, what); end
  endtask

  task automatic probe(real v);
    int s, k;
    real step;
    s = (v >= 64.0) ? 32'h7fffffff : to_fix(v);
    // interval index computed from the real value
    step = 128.0 / 1024.0;
    k = $rtoi((real'(s) / SCALE + 64.0) / step);
    @(negedge clk);
    sum = s;
    @(negedge clk);
    check(dout == fix_t'(lut_word(k, AW)), $sformatf("f(%f) index %0d", v, k));
  endtask

  initial begin
    for (int a = 0; a < (1 << AW); a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = lut_word(a, AW);
    end
    @(negedge clk);
    wr_en = 0;
    probe(-64.0);
    probe(64.0);
    probe(0.0);
    probe(-0.01);
    for (int i = 0; i < 200; i++) probe(rand_real(-64.0, 63.99));
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
