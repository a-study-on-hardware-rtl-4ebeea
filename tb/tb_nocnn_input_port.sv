// tb_nocnn_input_port: two packets arrive interleaved flit by flit on the
// two VCs of one input port, with a dummy flit between them. The test
// checks the decoded route of each header, that the port finishes one
// packet before presenting the other VC's header (wormhole), the VC
// reported with each flit, that dummy flits are dropped, that every pop
// returns one credit on the right VC, and the one-cycle write-to-head delay.
module tb_nocnn_input_port;
  import nocnn_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_t            in_link = '0;
  logic [NVC-1:0]   credit_out;
  logic             head_valid, head_vc, pop = 0;
  flit_t            head_flit;
  logic [NPORT-1:0] head_route;

  nocnn_input_port #(.DEPTH(5), .ALGO(RT_DT), .PORT(P_W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t %s", $time, what); end
  endtask

  function automatic flit_t hdr(logic [3:0] un, port_e dst);
    flit_t h = '0;
    h[H_FT_HI -: 2] = FT_HEAD;
    h[H_UN_LO +: 4] = un;
    h[11:9] = 3'(dst);
    return h;
  endfunction

  task automatic send(logic vc, flit_t f);
    @(negedge clk);
    in_link = '{valid: 1'b1, vc: vc, flit: f};
    @(negedge clk);
    in_link = '0;
  endtask

  task automatic take(flit_t exp_f, logic exp_vc, logic [NPORT-1:0] exp_route, string what);
    check(head_valid, {what, ": valid"});
    check(head_flit == exp_f, {what, ": flit"});
    check(head_vc == exp_vc, {what, ": vc"});
    if (flit_type(exp_f) == FT_HEAD) check(head_route == exp_route, {what, ": route"});
    pop = 1;
    #1 check(credit_out == (exp_vc ? 2'b10 : 2'b01), {what, ": credit"});
    @(negedge clk);
    pop = 0;
  endtask

  flit_t ha, hb;
  initial begin
    ha = hdr(4'b0011, P_E);
    hb = hdr(4'b1000, P_N);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    in_link = '{valid: 1'b1, vc: 1'b1, flit: hb};
    @(negedge clk);
    in_link = '0;
    check(head_valid && head_flit == hb, "header visible one cycle after write");
    send(1'b0, ha);
    send(1'b0, make_payload(32'hA0));
    send(1'b0, {FT_DUMMY, 32'hdead});
    send(1'b1, make_payload(32'hB0));
    send(1'b0, make_payload(32'hA1));
    @(negedge clk);
    // VA alternates starting with VC0
    take(ha, 1'b0, 5'b01000, "A header");
    take(make_payload(32'hA0), 1'b0, '0, "A payload 0");
    take(make_payload(32'hA1), 1'b0, '0, "A payload 1");
    take(hb, 1'b1, 5'b00001, "B header");
    take(make_payload(32'hB0), 1'b1, '0, "B payload");
    check(!head_valid, "empty; dummy dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
