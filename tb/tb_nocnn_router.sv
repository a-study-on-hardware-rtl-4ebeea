// tb_nocnn_router: self-checking test of the 5-port router.
//
// Part 1 (destination-tag router): random packets from all five inputs to
// all five outputs, on both VCs, with random downstream stalls. A model of
// each downstream VC buffer drains at random and returns credits; it flags
// an overflow. The checker verifies at each output that a header's DA field
// comes out shifted by one hop with the PE code filled in, that exactly the
// header's payloads follow it with no other flit in between, that the data is
// intact and that packets from one input arrive in order. It also checks the
// two-cycle hop latency on an idle router and that the PE input wins over a
// network input when both want the same output in the same cycle.
// Part 2 (X-Y absolute-address router at x=1, y=1): one packet per direction
// and one for the local PE; the header must leave unchanged on the right port.
module tb_nocnn_router;
  import nocnn_pkg::*;

  localparam int DEPTH = 5;
  localparam int NPKT  = 40;   // packets per input

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_t          in_link [NPORT], out_link [NPORT];
  logic [NVC-1:0] cr_out  [NPORT], cr_in    [NPORT];
  link_t          in2 [NPORT], out2 [NPORT];
  logic [NVC-1:0] cro2 [NPORT], cri2 [NPORT];

  nocnn_router #(.DEPTH(DEPTH), .ALGO(RT_DT)) dut (
    .clk, .rst_n, .in_link, .credit_out(cr_out), .out_link, .credit_in(cr_in));

  nocnn_router #(.DEPTH(DEPTH), .ALGO(RT_XY), .X_LOC(3'd1), .Y_LOC(3'd1)) dut_xy (
    .clk, .rst_n, .in_link(in2), .credit_out(cro2), .out_link(out2), .credit_in(cri2));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // ---------------- stimulus queues
  flit_t tx_q   [NPORT][$];
  logic  tx_vcq [NPORT][$];
  int    tx_cred [NPORT][NVC];
  int    exp_seq [NPORT][NPORT][NVC];   // [src][dst][vc] last sequence number seen
  int    sent_pkts = 0, recv_pkts = 0;

  function automatic flit_t mk_header(int src, int seq, int dst, logic [3:0] un, logic vcn);
    flit_t h = '0;
    h[H_FT_HI -: 2] = FT_HEAD;
    h[H_VCN] = vcn;
    h[H_UN_LO +: 4] = un;
    h[H_PCI_LO +: 15] = {3'(src), 12'(seq)};
    h[11:9] = 3'(dst);
    h[8:0]  = 9'($urandom);
    return h;
  endfunction

  function automatic flit_t mk_pay(int src, int seq, int k);
    return make_payload(fix_t'({8'hA5, 4'(src), 12'(seq), 8'(k)}));
  endfunction

  // ---------------- downstream model: per output and VC a buffer of DEPTH
  int  ds_fill [NPORT][NVC];
  int  stall_pct = 30;

  // ---------------- output checker state
  bit    in_pkt [NPORT];
  int    cur_src [NPORT], cur_seq [NPORT], cur_rem [NPORT], cur_k [NPORT];
  logic  cur_vc [NPORT];

  task automatic check_out(int o, link_t l);
    if (!l.valid) return;
    if (flit_type(l.flit) == FT_HEAD) begin
      int src, seq, dst;
      check(!in_pkt[o], $sformatf("out %0d: header inside packet", o));
      src = int'(l.flit[H_PCI_LO + 12 +: 3]);
      seq = int'(l.flit[H_PCI_LO +: 12]);
      check(l.flit[2:0] == 3'(P_PE), $sformatf("out %0d: DA fill", o));
      // packets of one input on one VC may not overtake each other
      check(seq > exp_seq[src][o][l.vc], $sformatf("out %0d: order src %0d seq %0d", o, src, seq));
      check(l.vc == l.flit[H_VCN], "header VC");
      exp_seq[src][o][l.vc] = seq;
      in_pkt[o] = 1;
      cur_src[o] = src; cur_seq[o] = seq; cur_k[o] = 0; cur_vc[o] = l.vc;
      cur_rem[o] = $countones(hdr_un(l.flit));
      recv_pkts++;
    end else begin
      check(in_pkt[o], $sformatf("out %0d: payload outside packet", o));
      check(l.flit == mk_pay(cur_src[o], cur_seq[o], cur_k[o]), $sformatf("out %0d: payload data", o));
      check(l.vc == cur_vc[o], "payload VC");
      cur_k[o]++;
      cur_rem[o]--;
      if (cur_rem[o] == 0) in_pkt[o] = 0;
    end
  endtask

  // expected shifted DA kept per packet: check via a side table
  logic [8:0] da_tail [NPORT][NPORT][int];

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NPORT; o++) begin
      link_t l;
      int src, seq;
      l = out_link[o];
      if (l.valid && flit_type(l.flit) == FT_HEAD) begin
        src = int'(l.flit[H_PCI_LO + 12 +: 3]);
        seq = int'(l.flit[H_PCI_LO +: 12]);
        check(l.flit[11:3] == da_tail[src][o][seq], $sformatf("out %0d: shifted DA", o));
      end
      check_out(o, l);
      if (l.valid) begin
        ds_fill[o][l.vc]++;
        check(ds_fill[o][l.vc] <= DEPTH, $sformatf("out %0d: downstream overflow", o));
      end
    end
  end

  // downstream drain and credit return
  always @(posedge clk) begin
    for (int o = 0; o < NPORT; o++)
      for (int v = 0; v < NVC; v++) begin
        if (rst_n && ds_fill[o][v] > 0 && ($urandom % 100) >= stall_pct) begin
          ds_fill[o][v]--;
          cr_in[o][v] <= 1'b1;
        end else cr_in[o][v] <= 1'b0;
      end
  end

  // input drivers
  always @(posedge clk) begin
    for (int i = 0; i < NPORT; i++) begin
      for (int v = 0; v < NVC; v++) if (rst_n && cr_out[i][v]) tx_cred[i][v]++;
      in_link[i] <= '0;
      if (rst_n && tx_q[i].size() > 0 && tx_cred[i][tx_vcq[i][0]] > 0 && ($urandom % 4) != 0) begin
        in_link[i] <= '{valid: 1'b1, vc: tx_vcq[i][0], flit: tx_q[i][0]};
        tx_cred[i][tx_vcq[i][0]]--;
        void'(tx_q[i].pop_front());
        void'(tx_vcq[i].pop_front());
      end
    end
  end

  task automatic enqueue(int src, int seq, int dst);
    logic [3:0] un;
    logic vcn;
    flit_t h;
    un  = 4'($urandom_range(1, 15));
    vcn = 1'($urandom);
    h = mk_header(src, seq, dst, un, vcn);
    da_tail[src][dst][seq] = {h[8:0]};
    // the header leaves with DA shifted by one hop: bits [11:3] = old [8:0]
    tx_q[src].push_back(h);
    tx_vcq[src].push_back(vcn);
    for (int k = 0; k < $countones(un); k++) begin
      tx_q[src].push_back(mk_pay(src, seq, k));
      tx_vcq[src].push_back(vcn);
    end
    sent_pkts++;
  endtask

  int seqs [NPORT][NPORT];
  longint t0;
  int lat;

  initial begin
    for (int i = 0; i < NPORT; i++) begin
      in_link[i] = '0; in2[i] = '0; cri2[i] = '0; cr_in[i] = '0;
      for (int v = 0; v < NVC; v++) begin tx_cred[i][v] = DEPTH; ds_fill[i][v] = 0; end
      for (int o = 0; o < NPORT; o++) begin exp_seq[i][o] = '{-1, -1}; seqs[i][o] = 0; end
      in_pkt[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---- latency on an idle router: header from W to E
    stall_pct = 0;
    enqueue(P_W, seqs[P_W][P_E]++, P_E);
    @(posedge clk);
    while (!in_link[P_W].valid) @(posedge clk);
    t0 = $time;
    while (!(out_link[P_E].valid && flit_type(out_link[P_E].flit) == FT_HEAD)) @(posedge clk);
    lat = int'(($time - t0) / 10);
    check(lat == 2, $sformatf("hop latency %0d cycles, expected 2", lat));
    repeat (10) @(posedge clk);

    // ---- priority: PE and N want S in the same cycle; force simultaneous issue
    begin
      flit_t hp, hn;
      hp = mk_header(P_PE, seqs[P_PE][P_S]++, P_S, 4'b0001, 1'b0);
      hn = mk_header(P_N,  seqs[P_N][P_S]++,  P_S, 4'b0001, 1'b1);
      da_tail[P_PE][P_S][0] = hp[8:0];
      da_tail[P_N][P_S][0]  = hn[8:0];
      @(negedge clk);
      in_link[P_N]  = '{valid: 1'b1, vc: 1'b1, flit: hn};
      in_link[P_PE] = '{valid: 1'b1, vc: 1'b0, flit: hp};
      tx_cred[P_N][1]--; tx_cred[P_PE][0]--;
      @(negedge clk);
      in_link[P_N]  = '{valid: 1'b1, vc: 1'b1, flit: mk_pay(P_N, 0, 0)};
      in_link[P_PE] = '{valid: 1'b1, vc: 1'b0, flit: mk_pay(P_PE, 0, 0)};
      tx_cred[P_N][1]--; tx_cred[P_PE][0]--;
      @(negedge clk);
      in_link[P_N] = '0; in_link[P_PE] = '0;
      while (!(out_link[P_S].valid && flit_type(out_link[P_S].flit) == FT_HEAD)) @(negedge clk);
      check(out_link[P_S].flit == {hp[33:12], hp[8:0], 3'(P_PE)}, "PE input has priority");
      sent_pkts += 2;
      repeat (10) @(posedge clk);
    end

    // ---- random traffic with stalls
    stall_pct = 30;
    for (int n = 0; n < NPKT; n++)
      for (int i = 0; i < NPORT; i++) begin
        int d;
        d = $urandom_range(0, NPORT - 1);
        enqueue(i, seqs[i][d]++, d);
      end
    begin
      automatic int guard = 0;
      while (recv_pkts < sent_pkts && guard < 20000) begin @(posedge clk); guard++; end
    end
    repeat (50) @(posedge clk);
    check(recv_pkts == sent_pkts, $sformatf("packets received %0d of %0d", recv_pkts, sent_pkts));
    for (int o = 0; o < NPORT; o++) check(!in_pkt[o], "no packet left open");

    // ---- part 2: absolute-address X-Y router at (1,1)
    begin
      automatic int dx [5] = '{3, 1, 0, 1, 1};
      automatic int dy [5] = '{1, 0, 1, 3, 1};
      automatic port_e po [5] = '{P_E, P_N, P_W, P_S, P_PE};
      for (int k = 0; k < 5; k++) begin
        flit_t h;
        h = '0;
        h[H_FT_HI -: 2] = FT_HEAD;
        h[H_UN_LO +: 4] = 4'b0000;
        h[11:9] = 3'(dx[k]);
        h[8:6]  = 3'(dy[k]);
        @(negedge clk);
        in2[P_PE] = '{valid: 1'b1, vc: 1'b0, flit: h};
        @(negedge clk);
        in2[P_PE] = '0;
        @(negedge clk);
        check(out2[po[k]].valid && out2[po[k]].flit == h, $sformatf("XY dest (%0d,%0d)", dx[k], dy[k]));
        for (int o = 0; o < NPORT; o++) if (o != po[k]) check(!out2[o].valid, "XY single output");
        cri2[po[k]] = 2'b01;
        @(negedge clk);
        cri2[po[k]] = 2'b00;
      end
    end

    $display("packets %0d", recv_pkts);
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
