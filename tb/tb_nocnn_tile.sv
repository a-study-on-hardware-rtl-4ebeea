// tb_nocnn_tile: one tile with the test bench acting as its four
// neighbours and the host. It checks that the PE's packets leave on the
// links their headers name (with the address list shifted by one hop), that
// input values can reach the PE both from the host and from a neighbour in
// the same pattern, that a packet passing through the tile comes out on the
// right link unchanged apart from the shift, that results leave on the host
// port when the PE has no destination, and that every flit the tile took
// from a neighbour is answered by one credit.
module tb_nocnn_tile;
  import nocnn_pkg::*;
  import tb_nocnn_ref_pkg::*;

  localparam int LUT_AW = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_t          nb_in [4], nb_out [4];
  logic [NVC-1:0] nb_cr_out [4], nb_cr_in [4];
  logic cfg_we = 0;
  cfg_sel_e cfg_sel = CFG_REG;
  logic [1:0] cfg_neuron = 0;
  logic [9:0] cfg_addr = 0;
  flit_t cfg_data = 0;
  logic host_valid = 0, host_ready, res_valid, done;
  flit_t host_flit = 0, res_flit;

  nocnn_tile dut (.*);

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

  // neighbours: record flits, return a credit one cycle later
  flit_t rx [4][$];
  logic  rx_vc [4][$];
  int credits_back = 0, flits_in = 0;
  always @(posedge clk) begin
    for (int p = 0; p < 4; p++) begin
      nb_cr_in[p] <= '0;
      if (rst_n && nb_out[p].valid) begin
        rx[p].push_back(nb_out[p].flit);
        rx_vc[p].push_back(nb_out[p].vc);
        nb_cr_in[p] <= NVC'(1) << nb_out[p].vc;
      end
      if (rst_n) credits_back += $countones(nb_cr_out[p]);
    end
  end
  flit_t res [$];
  always @(posedge clk) if (rst_n && res_valid) res.push_back(res_flit);

  task automatic host_put(flit_t f);
    @(negedge clk);
    host_valid = 1; host_flit = f;
    @(posedge clk);
    while (!host_ready) @(posedge clk);
    @(negedge clk);
    host_valid = 0;
  endtask

  task automatic nb_put(int p, flit_t f);
    @(negedge clk);
    nb_in[p] = '{valid: 1'b1, vc: 1'b0, flit: f};
    flits_in++;
    @(negedge clk);
    nb_in[p] = '0;
  endtask

  function automatic flit_t hdr(logic [3:0] un, int base, logic [11:0] da);
    flit_t h = '0;
    h[H_FT_HI -: 2] = FT_HEAD;
    h[H_UN_LO +: 4] = un;
    h[H_PCI_LO +: 15] = 15'(base);
    h[11:0] = da;
    return h;
  endfunction

  int w [2][2];
  int x [2];
  int e [2];

  task automatic expect_outputs();
    for (int n = 0; n < 2; n++)
      e[n] = lut_word(lut_index(sat32(mul_fix(w[n][0], x[0]) + mul_fix(w[n][1], x[1])), LUT_AW), LUT_AW);
  endtask

  initial begin
    for (int p = 0; p < 4; p++) begin nb_in[p] = '0; nb_cr_in[p] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < (1 << LUT_AW); a++) cfg(CFG_LUT, 0, a, flit_t'(lut_word(a, LUT_AW)));
    for (int n = 0; n < 2; n++)
      for (int i = 0; i < 2; i++) begin
        w[n][i] = to_fix(rand_real(-1.0, 1.0));
        cfg(CFG_WEIGHT, n, i, flit_t'(w[n][i]));
      end
    // destinations: east then south; north then PE
    cfg(CFG_HDR, 0, 0, hdr(4'b0, 0, {3'(P_E), 3'(P_S), 3'(P_PE), 3'(P_PE)}));
    cfg(CFG_HDR, 0, 1, hdr(4'b0, 2, {3'(P_N), 3'(P_PE), 3'(P_PE), 3'(P_PE)}) | (flit_t'(1) << H_VCN));
    cfg(CFG_REG, 0, 0, flit_t'({4'd2, 8'd2, 4'b0011}));

    // ---- pattern 1: inputs from the host, outputs to two neighbours
    x[0] = to_fix(0.75); x[1] = to_fix(-1.5);
    expect_outputs();
    host_put(hdr(4'b0011, 0, '0));
    host_put(make_payload(x[0]));
    host_put(make_payload(x[1]));
    repeat (40) @(posedge clk);
    check(rx[int'(P_E)].size() == 3 && rx[int'(P_N)].size() == 3, "one packet on E and one on N");
    if (rx[int'(P_E)].size() == 3) begin
      check(rx[int'(P_E)][0][11:0] == {3'(P_S), 3'(P_PE), 3'(P_PE), 3'(P_PE)}, "E header shifted");
      check(rx_vc[int'(P_E)][0] == 1'b0 && rx_vc[int'(P_E)][2] == 1'b0, "E packet on VC0");
      check(rx[int'(P_E)][1] == make_payload(e[0]) && rx[int'(P_E)][2] == make_payload(e[1]), "E payloads");
    end
    if (rx[int'(P_N)].size() == 3) begin
      check(rx[int'(P_N)][0][H_PCI_LO +: 15] == 15'd2 && rx[int'(P_N)][0][H_UN_LO +: 4] == 4'b0011, "N header fields");
      check(rx_vc[int'(P_N)][0] == 1'b1 && rx_vc[int'(P_N)][2] == 1'b1, "N packet on VC1 as its header asks");
      check(rx[int'(P_N)][1] == make_payload(e[0]) && rx[int'(P_N)][2] == make_payload(e[1]), "N payloads");
    end

    // ---- pattern 2: one input from the host, one from the west neighbour
    cfg(CFG_REG, 0, 0, flit_t'({4'd0, 8'd2, 4'b0011}));
    x[0] = to_fix(-0.25); x[1] = to_fix(2.0);
    expect_outputs();
    fork
      begin
        nb_put(P_W, hdr(4'b0001, 1, {3'(P_PE), 3'(P_PE), 3'(P_PE), 3'(P_PE)}));
        nb_put(P_W, make_payload(x[1]));
      end
      begin
        host_put(hdr(4'b0001, 0, '0));
        host_put(make_payload(x[0]));
      end
    join
    repeat (40) @(posedge clk);
    check(res.size() == 3, $sformatf("result packet of %0d flits", res.size()));
    if (res.size() == 3)
      check(res[1] == make_payload(e[0]) && res[2] == make_payload(e[1]), "result payloads");

    // ---- transit: from the south neighbour to the west neighbour
    nb_put(P_S, hdr(4'b0001, 7, {3'(P_W), 3'(P_N), 3'(P_PE), 3'(P_PE)}));
    nb_put(P_S, make_payload(32'h0BAD_CAFE));
    repeat (10) @(posedge clk);
    check(rx[int'(P_W)].size() == 2, "transit packet on W");
    if (rx[int'(P_W)].size() == 2) begin
      check(rx[int'(P_W)][0][11:0] == {3'(P_N), 3'(P_PE), 3'(P_PE), 3'(P_PE)}, "transit header shifted");
      check(rx[int'(P_W)][1] == make_payload(32'h0BAD_CAFE), "transit payload");
    end
    check(credits_back == flits_in, $sformatf("credits %0d for %0d flits", credits_back, flits_in));
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
