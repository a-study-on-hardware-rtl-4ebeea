// tb_lmp_ann: end-to-end test of the layer-multiplexed, partly pipelined
// network with its default 20 neuron modules.
//
// It runs the two example networks 3-4-2-3-1 (pipeline depths 2, 3 and 4)
// and 5-7-3-7-5 (depths 2 and 3; depth 4 would need 22 modules), and the
// comparison networks 8-5-5-3 (depth 3), 8-5-5-5-5-3, 5-12-8-4-1,
// 4-10-1-10-4 and 4-7-13-1 (depth 2). For a
// depth D the computing layers are cut into groups of D consecutive layers,
// one group per step; the neurons of a group occupy modules 0, 1, ... in
// layer order and the rest of the modules are disabled. Inside a group each
// layer works on the pattern one older than the layer before it, so the
// output of loop n belongs to pattern n - lag, where lag counts the layer
// boundaries inside groups. The bench writes weights, table, patterns and
// step table, runs the loops, and checks every output neuron of every
// pattern against an exact model, and the length of each loop (sum over the
// steps of the longest input list + 5, plus one cycle between loops). It
// counts steps with several layers (pipelining), modules that serve
// different layers in different steps (multiplexing) and disabled modules.
module tb_lmp_ann;
  import tb_lmp_ref_pkg::*;

  localparam int NMOD = 20, AW = 8, MAXIN = 16, NPAT = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we = 0, start = 0, busy;
  logic [1:0] cfg_sel = 0;
  logic [4:0] cfg_mod = 0;
  logic [7:0] cfg_addr = 0, n_loops = 0, res_loop;
  logic [31:0] cfg_data = 0;
  logic [2:0] n_steps = 0;
  logic [NMOD-1:0] res_valid;
  logic [15:0] res_y [NMOD];
  logic [3:0] res_idx [NMOD];

  lmp_ann dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t %s", $time, what); end
  endtask

  task automatic cfg(int sel, int m, int a, int d);
    @(negedge clk);
    cfg_we = 1; cfg_sel = 2'(sel); cfg_mod = 5'(m); cfg_addr = 8'(a); cfg_data = 32'(d);
    @(negedge clk);
    cfg_we = 0;
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // outputs as they appear: value per loop and neuron
  int got [int][int];
  int loop_end [int];
  always @(posedge clk) if (rst_n)
    for (int m = 0; m < NMOD; m++)
      if (res_valid[m]) begin
        got[int'(res_loop)][int'(res_idx[m])] = int'(res_y[m]);
        loop_end[int'(res_loop)] = cyc;
      end

  int n_pipe_steps = 0, n_mux_modules = 0, n_disabled = 0, n_nets = 0;

  task automatic run_net(int sizes [$], int depth);
    int nl, ns, lag;
    int w [int][int][int];      // w[layer][neuron][input]
    int xin [NPAT][MAXIN];
    int val [int][int];         // reference outputs of one pattern
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
    got.delete();
    loop_end.delete();
    // weights, patterns
    for (int k = 1; k <= nl; k++)
      for (int i = 0; i < sizes[k]; i++)
        for (int j = 0; j < sizes[k-1]; j++)
          w[k][i][j] = to_q12(rand_real(-2.0, 2.0));
    for (int p = 0; p < NPAT; p++)
      for (int j = 0; j < sizes[0]; j++) begin
        xin[p][j] = to_q12(rand_real(-1.0, 1.0));
        cfg(2, 0, p * MAXIN + j, xin[p][j]);
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
            for (int j = 0; j < sizes[k-1]; j++) cfg(0, m, s * MAXIN + j, w[k][i][j]);
            // {wbase, n_in, dst, src, out, en}
            cfg(3, m, s, ((s * MAXIN) << 14) | (sizes[k-1] << 9) | (i << 5) |
                         ((k - 1) << 2) | (int'(k == nl) << 1) | 1);
            m++;
          end
        end
      for (; m < NMOD; m++) begin
        cfg(3, m, s, 0);
        if (s < ns) n_disabled++;
      end
    end
    for (int m = 0; m < NMOD; m++)
      for (int s = 1; s < ns; s++)
        if (layer_of_mod[s].exists(m) && layer_of_mod[0].exists(m) &&
            layer_of_mod[s][m] != layer_of_mod[0][m]) n_mux_modules++;
    // run
    @(negedge clk);
    n_steps = 3'(ns); n_loops = 8'(NPAT + lag); start = 1;
    @(negedge clk);
    start = 0;
    while (busy) @(posedge clk);
    repeat (3) @(posedge clk);
    // reference
    for (int p = 0; p < NPAT; p++) begin
      for (int j = 0; j < sizes[0]; j++) val[0][j] = xin[p][j];
      for (int k = 1; k <= nl; k++)
        for (int i = 0; i < sizes[k]; i++) begin
          longint acc;
          acc = 0;
          for (int j = 0; j < sizes[k-1]; j++) acc += longint'(w[k][i][j]) * longint'(val[k-1][j]);
          val[k][i] = lut_word(lut_index(acc, AW), AW);
        end
      for (int i = 0; i < sizes[nl]; i++) begin
        bit ok;
        ok = got.exists(p + lag) && got[p + lag].exists(i) && got[p + lag][i] == val[nl][i];
        check(ok, $sformatf("net %0d depth %0d pattern %0d output %0d: got %0d expected %0d",
                            n_nets, depth, p, i,
                            (got.exists(p + lag) && got[p + lag].exists(i)) ? got[p + lag][i] : -1,
                            val[nl][i]));
      end
    end
    loop_cycles = 1;
    for (int s = 0; s < ns; s++) loop_cycles += step_len[s] + 5;
    for (int l = 1; l < NPAT + lag; l++)
      check(loop_end.exists(l) && loop_end[l] - loop_end[l-1] == loop_cycles,
            $sformatf("loop %0d length, expected %0d", l, loop_cycles));
    begin
      string name;
      name = $sformatf("%0d", sizes[0]);
      for (int k = 1; k <= nl; k++) name = {name, $sformatf("-%0d", sizes[k])};
      $display("network %s depth %0d: %0d steps per loop, %0d cycles per pattern, first result after %0d loops",
               name, depth, ns, loop_cycles, lag + 1);
    end
    n_nets++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < (1 << AW); k++) cfg(1, 0, k, lut_word(k, AW));
    run_net('{3, 4, 2, 3, 1}, 2);
    run_net('{3, 4, 2, 3, 1}, 3);
    run_net('{3, 4, 2, 3, 1}, 4);
    run_net('{5, 7, 3, 7, 5}, 2);
    run_net('{5, 7, 3, 7, 5}, 3);
    run_net('{8, 5, 5, 3}, 3);
    run_net('{8, 5, 5, 5, 5, 3}, 2);
    run_net('{5, 12, 8, 4, 1}, 2);
    run_net('{4, 10, 1, 10, 4}, 2);
    run_net('{4, 7, 13, 1}, 2);
    $display("mechanisms: pipelined_steps=%0d multiplexed_modules=%0d disabled_module_steps=%0d",
             n_pipe_steps, n_mux_modules, n_disabled);
    check(n_pipe_steps > 0, "pipelining exercised");
    check(n_mux_modules > 0, "layer multiplexing exercised");
    check(n_disabled > 0, "disabled modules exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
