// tb_ann_top: end-to-end test of both processors of ann_top at their
// default sizes (no parameter is overridden).
//
// NoC processor (20 tiles, 5 rows x 4 columns, torus, destination-tag
// routing): five feed-forward networks are mapped one after the other:
// 3-20-20-1, 4-12-1, 4-7-13-1, 4-5-5-1 and 5-20-10-2. Layer l uses column
// l; its neurons fill PEs in rows 0, 1, ... four at a time, so a PE with
// fewer neurons works partly. Each PE sends one packet to every PE of the
// next layer over a path East, then North or South the short way round the
// torus; output-layer PEs return their results to the host. Weights, the
// sigmoid table and inputs are random or computed here; the expected
// outputs come from a fixed-point model of the network. For every pattern
// each output value and the number of result packets are checked.
// The packets that PEs send to other tiles are counted per pattern and
// must equal the sum over layer pairs of (PEs of layer l) x (PEs of l+1).
// Layer-multiplexed network (20 neuron modules): 3-4-2-3-1 with pipeline
// depth 2 and 5-7-3-7-5 with depth 3, checked against an exact model as in
// the test of that block.
// Mechanisms are counted and a mechanism that never happens is a failure:
// torus wrap-around links, traffic on VC1, partly working PEs, sleeping
// tiles, PEs sending to several destinations, two headers competing for
// one router output; pipelined steps, modules serving different layers in
// different steps, disabled modules. Back-pressure stalls of the PE and
// host streams and PE-input arbitration wins are only reported: with one
// pattern in flight and column-wise mapping they do not arise here (the
// router and switch allocator tests cover them).
module tb_ann_top;
  import nocnn_pkg::*;
  import tb_nocnn_ref_pkg::*;

  localparam int ROWS = 5, COLS = 4, NT = 20, LUT_AW = 10;
  localparam int NPAT = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          cfg_we = 0;
  logic [4:0]    cfg_tile = 0;
  cfg_sel_e      cfg_sel = CFG_REG;
  logic [1:0]    cfg_neuron = 0;
  logic [9:0]    cfg_addr = 0;
  flit_t         cfg_data = 0;
  logic          host_valid = 0;
  logic [4:0]    host_tile = 0;
  flit_t         host_flit = 0;
  logic          host_ready;
  logic [NT-1:0] res_valid, done;
  flit_t         res_flit [NT];

  ann_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // ---------------- layer-multiplexed network
  localparam int NMOD = 20, LAW = 8, MAXIN = 16, LNPAT = 4;
  logic lmp_cfg_we = 0, lmp_start = 0, lmp_busy;
  logic [1:0] lmp_cfg_sel = 0;
  logic [4:0] lmp_cfg_mod = 0;
  logic [7:0] lmp_cfg_addr = 0, lmp_n_loops = 0, lmp_res_loop;
  logic [31:0] lmp_cfg_data = 0;
  logic [2:0] lmp_n_steps = 0;
  logic [NMOD-1:0] lmp_res_valid;
  logic [15:0] lmp_res_y [NMOD];
  logic [3:0] lmp_res_idx [NMOD];

  task automatic lmp_cfg(int sel, int m, int a, int d);
    @(negedge clk);
    lmp_cfg_we = 1; lmp_cfg_sel = 2'(sel); lmp_cfg_mod = 5'(m); lmp_cfg_addr = 8'(a); lmp_cfg_data = 32'(d);
    @(negedge clk);
    lmp_cfg_we = 0;
  endtask

  int lcyc = 0;
  always @(posedge clk) lcyc <= lcyc + 1;

  // outputs as they appear: value per loop and neuron
  int lgot [int][int];
  int lloop_end [int];
  always @(posedge clk) if (rst_n)
    for (int m = 0; m < NMOD; m++)
      if (lmp_res_valid[m]) begin
        lgot[int'(lmp_res_loop)][int'(lmp_res_idx[m])] = int'(lmp_res_y[m]);
        lloop_end[int'(lmp_res_loop)] = lcyc;
      end

  int n_pipe_steps = 0, n_mux_modules = 0, n_disabled = 0, n_lnets = 0;

  task automatic run_net(int sizes [$], int depth);
    int nl, ns, lag;
    int lw [int][int][int];      // lw[layer][neuron][input]
    int lxin [LNPAT][MAXIN];
    int lval [int][int];         // reference outputs of one pattern
    int group [int];            // step of each layer
    int mod_of [int][int];      // module of (layer, neuron)
    int layer_of_mod [int][int]; // layer served by a module in a step
    int step_len [int];
    int loop_cycles;
    nl = sizes.size() - 1;
    ns = (nl + depth - 1) / depth;
    lag = 0;
    for (int k = 1; k <= nl; k++) begin
      group[k] = (k - 1) / depth;
      if (k > 1 && group[k] == group[k-1]) lag++;
    end
    lgot.delete();
    lloop_end.delete();
    // weights, patterns
    for (int k = 1; k <= nl; k++)
      for (int i = 0; i < sizes[k]; i++)
        for (int j = 0; j < sizes[k-1]; j++)
          lw[k][i][j] = tb_lmp_ref_pkg::to_q12(tb_lmp_ref_pkg::rand_real(-2.0, 2.0));
    for (int p = 0; p < LNPAT; p++)
      for (int j = 0; j < sizes[0]; j++) begin
        lxin[p][j] = tb_lmp_ref_pkg::to_q12(tb_lmp_ref_pkg::rand_real(-1.0, 1.0));
        lmp_cfg(2, 0, p * MAXIN + j, lxin[p][j]);
      end
    // step table: modules in layer order within each step
    for (int s = 0; s < 4; s++) begin
      int m;
      m = 0;
      step_len[s] = 0;
      for (int k = 1; k <= nl; k++)
        if (group[k] == s) begin
          if (sizes[k-1] > step_len[s]) step_len[s] = sizes[k-1];
          if (k > 1 && group[k-1] == s) n_pipe_steps++;
          for (int i = 0; i < sizes[k]; i++) begin
            mod_of[k][i] = m;
            layer_of_mod[s][m] = k;
            for (int j = 0; j < sizes[k-1]; j++) lmp_cfg(0, m, s * MAXIN + j, lw[k][i][j]);
            // {wbase, n_in, dst, src, out, en}
            lmp_cfg(3, m, s, ((s * MAXIN) << 14) | (sizes[k-1] << 9) | (i << 5) |
                         ((k - 1) << 2) | (int'(k == nl) << 1) | 1);
            m++;
          end
        end
      for (; m < NMOD; m++) begin
        lmp_cfg(3, m, s, 0);
        if (s < ns) n_disabled++;
      end
    end
    for (int m = 0; m < NMOD; m++)
      for (int s = 1; s < ns; s++)
        if (layer_of_mod[s].exists(m) && layer_of_mod[0].exists(m) &&
            layer_of_mod[s][m] != layer_of_mod[0][m]) n_mux_modules++;
    // run
    @(negedge clk);
    lmp_n_steps = 3'(ns); lmp_n_loops = 8'(LNPAT + lag); lmp_start = 1;
    @(negedge clk);
    lmp_start = 0;
    while (lmp_busy) @(posedge clk);
    repeat (3) @(posedge clk);
    // reference
    for (int p = 0; p < LNPAT; p++) begin
      for (int j = 0; j < sizes[0]; j++) lval[0][j] = lxin[p][j];
      for (int k = 1; k <= nl; k++)
        for (int i = 0; i < sizes[k]; i++) begin
          longint acc;
          acc = 0;
          for (int j = 0; j < sizes[k-1]; j++) acc += longint'(lw[k][i][j]) * longint'(lval[k-1][j]);
          lval[k][i] = tb_lmp_ref_pkg::lut_word(tb_lmp_ref_pkg::lut_index(acc, LAW), LAW);
        end
      for (int i = 0; i < sizes[nl]; i++) begin
        bit ok;
        ok = lgot.exists(p + lag) && lgot[p + lag].exists(i) && lgot[p + lag][i] == lval[nl][i];
        check(ok, $sformatf("net %0d depth %0d pattern %0d output %0d: got %0d expected %0d",
                            n_lnets, depth, p, i,
                            (lgot.exists(p + lag) && lgot[p + lag].exists(i)) ? lgot[p + lag][i] : -1,
                            lval[nl][i]));
      end
    end
    loop_cycles = 1;
    for (int s = 0; s < ns; s++) loop_cycles += step_len[s] + 5;
    for (int l = 1; l < LNPAT + lag; l++)
      check(lloop_end.exists(l) && lloop_end[l] - lloop_end[l-1] == loop_cycles,
            $sformatf("loop %0d length, expected %0d", l, loop_cycles));
    begin
      string name;
      name = $sformatf("%0d", sizes[0]);
      for (int k = 1; k <= nl; k++) name = {name, $sformatf("-%0d", sizes[k])};
      $display("network %s depth %0d: %0d steps per loop, %0d cycles per pattern, first result after %0d loops",
               name, depth, ns, loop_cycles, lag + 1);
    end
    n_lnets++;
  endtask


  // ---------------- mechanism counters
  int n_wrap = 0, n_vc1 = 0, n_pe_stall = 0, n_host_stall = 0, n_partly = 0,
      n_multi_dest = 0, n_contend = 0, n_results = 0, n_sleep = 0, n_pe_win = 0, n_net_pk = 0;

  always @(posedge clk) if (rst_n) begin
    if (host_valid && !host_ready) n_host_stall++;
  end

  // per-tile probes, written with a generate loop
  for (genvar t = 0; t < NT; t++) begin : g_probe
    always @(posedge clk) if (rst_n) begin
      if (dut.u_noc.g_row[t/COLS].g_col[t%COLS].u_tile.send &&
          flit_type(dut.u_noc.g_row[t/COLS].g_col[t%COLS].u_tile.pe_out_flit) == FT_HEAD) n_net_pk++;
      // row 0 going north and row 4 going south use the wrap-around links
      if (t / COLS == 0 && dut.u_noc.g_row[t/COLS].g_col[t%COLS].u_tile.nb_out[0].valid) n_wrap++;
      if (t / COLS == ROWS - 1 && dut.u_noc.g_row[t/COLS].g_col[t%COLS].u_tile.nb_out[2].valid) n_wrap++;
      if (dut.u_noc.g_row[t/COLS].g_col[t%COLS].u_tile.u_pe.out_valid &&
          !dut.u_noc.g_row[t/COLS].g_col[t%COLS].u_tile.u_pe.out_ready) n_pe_stall++;
      for (int p = 0; p < 4; p++)
        if (dut.u_noc.g_row[t/COLS].g_col[t%COLS].u_tile.nb_out[p].valid &&
            dut.u_noc.g_row[t/COLS].g_col[t%COLS].u_tile.nb_out[p].vc) n_vc1++;
      begin
        int req;
        for (int o = 0; o < NPORT; o++) begin
          req = 0;
          for (int i = 0; i < NPORT; i++)
            if (dut.u_noc.g_row[t/COLS].g_col[t%COLS].u_tile.u_router.hv[i] &&
                flit_type(dut.u_noc.g_row[t/COLS].g_col[t%COLS].u_tile.u_router.hf[i]) == FT_HEAD &&
                dut.u_noc.g_row[t/COLS].g_col[t%COLS].u_tile.u_router.hr[i][o]) req++;
          if (req > 1) n_contend++;
          if (req > 1 && dut.u_noc.g_row[t/COLS].g_col[t%COLS].u_tile.u_router.grant[o][P_PE]) n_pe_win++;
        end
      end
    end
  end

  // ---------------- network description
  int nl;
  int lsz [4];
  int w [4][20][20];      // [layer][neuron][input]
  int x_in [20];
  int expect_out [4][20];

  task automatic cfg_write(int tile, cfg_sel_e sel, int neuron, int addr, flit_t data);
    @(negedge clk);
    cfg_we = 1; cfg_tile = 5'(tile); cfg_sel = sel; cfg_neuron = 2'(neuron);
    cfg_addr = 10'(addr); cfg_data = data;
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic int n_pe(int l);
    return (lsz[l] + 3) / 4;
  endfunction

  function automatic int tile_of(int l, int k);
    return k * COLS + l;
  endfunction

  // destination-tag header from PE (row r1, column l) to PE (row r2, column l+1)
  function automatic flit_t route_header(int r1, int r2, int base, bit vcn);
    flit_t h;
    int dr, hop;
    h = '0;
    h[H_FT_HI -: 2] = FT_HEAD;
    h[H_VCN] = vcn;
    h[H_PCI_LO +: 15] = 15'(base);
    h[11:0] = {4{3'(P_PE)}};
    h[11:9] = 3'(P_E);
    dr = (r2 - r1 + ROWS) % ROWS;
    hop = 1;
    if (dr <= ROWS / 2) begin
      for (int k = 0; k < dr; k++) begin h[11 - 3*hop -: 3] = 3'(P_S); hop++; end
    end else begin
      for (int k = 0; k < ROWS - dr; k++) begin h[11 - 3*hop -: 3] = 3'(P_N); hop++; end
    end
    return h;
  endfunction

  task automatic configure();
    int busy_tiles;
    for (int t = 0; t < NT; t++) cfg_write(t, CFG_REG, 0, 0, '0);
    busy_tiles = 0;
    for (int l = 0; l < nl; l++) busy_tiles += n_pe(l);
    n_sleep += NT - busy_tiles;
    for (int l = 0; l < nl; l++) begin
      int nin;
      nin = (l == 0) ? lsz[0] : lsz[l-1];
      for (int k = 0; k < n_pe(l); k++) begin
        int t, nused, ndest;
        logic [3:0] mask;
        t = tile_of(l, k);
        nused = (lsz[l] - 4*k > 4) ? 4 : lsz[l] - 4*k;
        mask = 4'((1 << nused) - 1);
        if (nused < 4) n_partly++;
        ndest = (l == nl - 1) ? 0 : n_pe(l + 1);
        if (ndest > 1) n_multi_dest++;
        for (int j = 0; j < nused; j++)
          for (int i = 0; i < nin; i++)
            cfg_write(t, CFG_WEIGHT, j, i, flit_t'(w[l][4*k + j][i]));
        for (int a = 0; a < (1 << LUT_AW); a++)
          cfg_write(t, CFG_LUT, 0, a, flit_t'(lut_word(a, LUT_AW)));
        for (int d = 0; d < ndest; d++)
          cfg_write(t, CFG_HDR, 0, d, route_header(k, d, 4*k, 1'((k + d) % 2)));
        if (ndest == 0) cfg_write(t, CFG_HDR, 0, 0, '0);
        cfg_write(t, CFG_REG, 0, 0, flit_t'({4'(ndest), 8'(nin), mask}));
      end
    end
  endtask

  task automatic reference();
    int prev [20];
    for (int i = 0; i < lsz[0]; i++) prev[i] = x_in[i];
    for (int l = 0; l < nl; l++) begin
      int nin;
      nin = (l == 0) ? lsz[0] : lsz[l-1];
      for (int j = 0; j < lsz[l]; j++) begin
        longint acc;
        acc = 0;
        for (int i = 0; i < nin; i++) acc += mul_fix(w[l][j][i], prev[i]);
        expect_out[l][j] = lut_word(lut_index(sat32(acc), LUT_AW), LUT_AW);
      end
      for (int j = 0; j < lsz[l]; j++) prev[j] = expect_out[l][j];
    end
  endtask

  task automatic host_send(int tile, flit_t f);
    @(negedge clk);
    host_valid = 1; host_tile = 5'(tile); host_flit = f;
    @(posedge clk);
    while (!host_ready) @(posedge clk);
    @(negedge clk);
    host_valid = 0;
  endtask

  // result collection
  int got [NT][4];
  int got_n [NT];
  int res_pk [NT];
  int res_idx [NT];
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < NT; t++) if (res_valid[t]) begin
      if (flit_type(res_flit[t]) == FT_HEAD) begin
        res_pk[t]++;
        res_idx[t] = 0;
        n_results++;
      end else begin
        got[t][res_idx[t]] = int'(res_flit[t][31:0]);
        res_idx[t]++;
        got_n[t]++;
      end
    end
  end

  task automatic run_pattern(int pat, output int cycles);
    longint t0;
    int lo;
    for (int t = 0; t < NT; t++) begin res_pk[t] = 0; got_n[t] = 0; end
    n_net_pk = 0;
    for (int i = 0; i < lsz[0]; i++) x_in[i] = to_fix(rand_real(-1.0, 1.0));
    reference();
    t0 = $time;
    // every input-layer PE gets the whole input vector, four values per packet
    for (int k = 0; k < n_pe(0); k++)
      for (int b = 0; b < lsz[0]; b += 4) begin
        int np;
        flit_t h;
        np = (lsz[0] - b > 4) ? 4 : lsz[0] - b;
        h = '0;
        h[H_FT_HI -: 2] = FT_HEAD;
        h[H_UN_LO +: 4] = 4'((1 << np) - 1);
        h[H_PCI_LO +: 15] = 15'(b);
        host_send(tile_of(0, k), h);
        for (int i = 0; i < np; i++) host_send(tile_of(0, k), make_payload(fix_t'(x_in[b + i])));
      end
    // wait for all output-layer results
    lo = nl - 1;
    begin
      int guard, pending;
      guard = 0;
      do begin
        @(posedge clk);
        guard++;
        pending = 0;
        for (int k = 0; k < n_pe(lo); k++)
          if (got_n[tile_of(lo, k)] < ((lsz[lo] - 4*k > 4) ? 4 : lsz[lo] - 4*k)) pending++;
      end while (pending > 0 && guard < 20000);
    end
    cycles = int'(($time - t0) / 10);
    repeat (5) @(posedge clk);
    begin
      int exp_pk;
      exp_pk = 0;
      for (int l = 0; l + 1 < nl; l++) exp_pk += n_pe(l) * n_pe(l + 1);
      check(n_net_pk == exp_pk, $sformatf("pattern %0d: %0d packets in the network, expected %0d", pat, n_net_pk, exp_pk));
      last_pk = n_net_pk;
    end
    for (int k = 0; k < n_pe(lo); k++) begin
      int t, nu;
      t = tile_of(lo, k);
      nu = (lsz[lo] - 4*k > 4) ? 4 : lsz[lo] - 4*k;
      check(res_pk[t] == 1, $sformatf("tile %0d result packets %0d", t, res_pk[t]));
      for (int j = 0; j < nu; j++)
        check(got[t][j] == expect_out[lo][4*k + j],
              $sformatf("pattern %0d output %0d: got %h expected %h", pat, 4*k + j, got[t][j], expect_out[lo][4*k + j]));
    end
  endtask

  int last_pk;
  int topo [5][4] = '{'{3, 20, 20, 1}, '{4, 12, 1, 0}, '{4, 7, 13, 1}, '{4, 5, 5, 1}, '{5, 20, 10, 2}};
  int cyc;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 5; a++) begin
      nl = 0;
      for (int l = 0; l < 4; l++) begin lsz[l] = topo[a][l]; if (topo[a][l] > 0) nl++; end
      for (int l = 0; l < nl; l++)
        for (int j = 0; j < 20; j++)
          for (int i = 0; i < 20; i++) w[l][j][i] = to_fix(rand_real(-0.6, 0.6));
      configure();
      for (int p = 0; p < NPAT; p++) begin
        run_pattern(p, cyc);
        $display("network %0d-%0d-%0d%s pattern %0d: %0d cycles from first input to last result, %0d packets between tiles",
                 lsz[0], lsz[1], lsz[2], (nl > 3) ? $sformatf("-%0d", lsz[3]) : "", p, cyc, last_pk);
      end
    end
    for (int k = 0; k < (1 << LAW); k++) lmp_cfg(1, 0, k, tb_lmp_ref_pkg::lut_word(k, LAW));
    run_net('{3, 4, 2, 3, 1}, 2);
    run_net('{5, 7, 3, 7, 5}, 3);
    $display("layer-multiplexed network mechanisms: pipelined_steps=%0d multiplexed_modules=%0d disabled_module_steps=%0d",
             n_pipe_steps, n_mux_modules, n_disabled);
    check(n_pipe_steps > 0, "pipelining never exercised");
    check(n_mux_modules > 0, "layer multiplexing never exercised");
    check(n_disabled > 0, "no disabled neuron module");
    $display("mechanisms: wrap=%0d vc1=%0d pe_stall=%0d host_stall=%0d partly=%0d sleep=%0d multi_dest=%0d contend=%0d pe_win=%0d results=%0d",
             n_wrap, n_vc1, n_pe_stall, n_host_stall, n_partly, n_sleep, n_multi_dest, n_contend, n_pe_win, n_results);
    check(n_wrap > 0, "torus wrap-around link never used");
    check(n_vc1 > 0, "VC1 never used");
    check(n_sleep > 0, "no sleeping tile");
    check(n_partly > 0, "no partly working PE");
    check(n_multi_dest > 0, "no multi-destination PE");
    check(n_contend > 0, "no output contention");
    check(n_results > 0, "no results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
