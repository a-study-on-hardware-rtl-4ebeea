// tb_nocnn_pe: processing-element test. The PE is configured with a
// neuron mask, weights, the sigmoid table and destination headers, then
// receives its inputs as packets in any order and with gaps. The test
// checks the packets it sends (one per destination: the stored header with
// the UN field set to the neuron mask, then one payload per used neuron,
// each equal to the fixed-point reference), back-pressure on out_ready,
// that no input is accepted while the PE computes or sends, the result
// path to the host when no destination is set, and the done pulse.
module tb_nocnn_pe;
  import nocnn_pkg::*;
  import tb_nocnn_ref_pkg::*;

  localparam int LUT_AW = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we = 0;
  cfg_sel_e cfg_sel = CFG_REG;
  logic [1:0] cfg_neuron = 0;
  logic [9:0] cfg_addr = 0;
  flit_t cfg_data = 0;
  logic in_valid = 0, in_ready, out_valid, out_host, out_ready = 1, done;
  flit_t in_flit = 0, out_flit;

  nocnn_pe dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t %s", $time, what); end
  endtask

  task automatic cfg(cfg_sel_e sel, int n, int a, flit_t d);
    @(negedge clk);
    cfg_we = 1; cfg_sel = sel; cfg_neuron = 2'(n); cfg_addr = 10'(a); cfg_data = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic put(flit_t f);
    @(negedge clk);
    in_valid = 1; in_flit = f;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
    if ($urandom % 2) @(negedge clk);
  endtask

  int w [4][8];
  int x [8];
  int exp_o [4];
  flit_t hdrs [2];
  int stall_pct = 0;
  int busy_in = 0, dones = 0;

  always @(negedge clk) out_ready = ($urandom % 100) >= stall_pct;
  always @(posedge clk) if (rst_n) begin
    if (dut.state != dut.S_ACC && in_ready) busy_in++;
    if (done) dones++;
  end

  flit_t got [$];
  logic  got_host [$];
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    got.push_back(out_flit);
    got_host.push_back(out_host);
  end

  task automatic pattern(logic [3:0] mask, int nin, int ndest);
    int order [2];
    for (int n = 0; n < 4; n++) begin
      longint acc;
      acc = 0;
      for (int i = 0; i < nin; i++) acc += mul_fix(w[n][i], x[i]);
      exp_o[n] = lut_word(lut_index(sat32(acc), LUT_AW), LUT_AW);
    end
    got.delete();
    got_host.delete();
    // second half of the inputs first
    order = '{nin / 2, 0};
    for (int p = 0; p < 2; p++) begin
      int b, np;
      flit_t h;
      b = order[p];
      np = (p == 0) ? nin - nin / 2 : nin / 2;
      h = '0;
      h[H_FT_HI -: 2] = FT_HEAD;
      h[H_UN_LO +: 4] = 4'((1 << np) - 1);
      h[H_PCI_LO +: 15] = 15'(b);
      put(h);
      for (int i = 0; i < np; i++) put(make_payload(x[b + i]));
    end
    repeat (60) @(posedge clk);
    begin
      int k, npay, nd;
      npay = $countones(mask);
      nd = (ndest == 0) ? 1 : ndest;
      check(got.size() == nd * (1 + npay), $sformatf("flits sent %0d expected %0d", got.size(), nd * (1 + npay)));
      k = 0;
      for (int d = 0; d < nd && k < got.size(); d++) begin
        flit_t eh;
        eh = hdrs[d];
        eh[H_FT_HI -: 2] = FT_HEAD;
        eh[H_UN_LO +: 4] = mask;
        check(got[k] == eh, $sformatf("header %0d", d));
        check(got_host[k] == (ndest == 0), "host flag");
        k++;
        for (int n = 0; n < 4; n++) if (mask[n] && k < got.size()) begin
          check(got[k] == make_payload(exp_o[n]), $sformatf("dest %0d neuron %0d output %h expected %h", d, n, got[k][31:0], exp_o[n]));
          k++;
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < (1 << LUT_AW); a++) cfg(CFG_LUT, 0, a, flit_t'(lut_word(a, LUT_AW)));
    for (int n = 0; n < 4; n++)
      for (int i = 0; i < 8; i++) begin
        w[n][i] = to_fix(rand_real(-1.0, 1.0));
        cfg(CFG_WEIGHT, n, i, flit_t'(w[n][i]));
      end
    for (int d = 0; d < 2; d++) begin
      hdrs[d] = flit_t'({$urandom, $urandom});
      cfg(CFG_HDR, 0, d, hdrs[d]);
    end
    // three neurons used, six inputs, two destinations, 40 % output stalls
    cfg(CFG_REG, 0, 0, flit_t'({4'd2, 8'd6, 4'b0111}));
    stall_pct = 40;
    for (int i = 0; i < 8; i++) x[i] = to_fix(rand_real(-2.0, 2.0));
    pattern(4'b0111, 6, 2);
    // all four neurons, eight inputs, results to the host
    cfg(CFG_REG, 0, 0, flit_t'({4'd0, 8'd8, 4'b1111}));
    stall_pct = 0;
    for (int i = 0; i < 8; i++) x[i] = to_fix(rand_real(-2.0, 2.0));
    pattern(4'b1111, 8, 0);
    check(busy_in == 0, "input accepted while busy");
    check(dones == 2, $sformatf("done pulses %0d", dones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
