// tb_nocnn_switch_alloc: directed test of the switch allocator for the east
// output: PE-first fixed priority, then N, W, S, E order; the hold on the
// winning input for exactly the header's number of payloads; no grant
// without a credit or without a request for this output; no hold after a
// header without payloads.
module tb_nocnn_switch_alloc;
  import nocnn_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NPORT-1:0] head_valid = '0, credit_ok = '1, grant;
  flit_t            head_flit  [NPORT];
  logic [NPORT-1:0] head_route [NPORT];
  logic             locked;

  nocnn_switch_alloc #(.OUT_PORT(P_E)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t %s (grant %b)", $time, what, grant); end
  endtask

  function automatic flit_t hdr(logic [3:0] un);
    flit_t h = '0;
    h[H_FT_HI -: 2] = FT_HEAD;
    h[H_UN_LO +: 4] = un;
    return h;
  endfunction

  task automatic set_head(int i, logic [3:0] un, port_e dst);
    head_valid[i] = 1; head_flit[i] = hdr(un); head_route[i] = '0; head_route[i][dst] = 1;
  endtask
  task automatic set_pay(int i);
    head_valid[i] = 1; head_flit[i] = make_payload(32'h1234); head_route[i] = '0;
  endtask

  initial begin
    for (int i = 0; i < NPORT; i++) begin head_flit[i] = '0; head_route[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    set_head(P_N, 4'b0001, P_E);
    set_head(P_S, 4'b0001, P_E);
    set_head(P_PE, 4'b0011, P_E);
    #1 check(grant == 5'b10000, "PE input has the highest priority");
    @(negedge clk);                  // PE header taken; PE presents payload 1
    set_pay(P_PE);
    check(locked, "locked after header with payloads");
    credit_ok[P_PE] = 0;
    #1 check(grant == 5'b00000, "no grant without credit, other headers held off");
    credit_ok[P_PE] = 1;
    #1 check(grant == 5'b10000, "payload 1 follows header");
    @(negedge clk);
    #1 check(grant == 5'b10000 && locked, "payload 2 follows");
    @(negedge clk);
    head_valid[P_PE] = 0;
    #1 check(!locked && grant == 5'b00001, "released after 2 payloads; N before S");
    @(negedge clk);
    set_pay(P_N);
    #1 check(grant == 5'b00001, "payload of N");
    @(negedge clk);
    head_valid[P_N] = 0;
    #1 check(grant == 5'b00100, "S header next");
    @(negedge clk);
    set_pay(P_S);
    #1 check(grant == 5'b00100, "S payload");
    @(negedge clk);
    head_valid = '0;
    set_head(P_W, 4'b0000, P_E);
    set_head(P_E, 4'b0001, P_N);     // wants another output
    #1 check(grant == 5'b00010, "W header only, E header is for north");
    @(negedge clk);
    #1 check(!locked, "no hold after a header without payloads");
    check(grant == 5'b00010, "W may send its next header");
    head_valid = '0;
    @(negedge clk);
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
