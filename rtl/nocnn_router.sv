// nocnn_router: 5-port wormhole-switched router with two virtual channels.
//
// Ports N, W, S, E connect to the neighbouring routers and port PE to the
// local processing element. Each input port (nocnn_input_port) buffers flits
// in two VC FIFOs and computes the route of a header as it is written
// (RC); its VC selector (VA) presents one head flit to the switch allocators.
// One switch allocator per output port (SA, nocnn_switch_alloc) grants one
// input; the crossbar moves the granted flit into the output register (ST).
// A flit keeps its VC from hop to hop; the VC of a packet is the header's
// VCN bit, set by the sender.
// In destination-tag mode (ALGO = RT_DT) the shifter moves the DA field of a
// header left by 3 bits as it leaves, so that the next router finds its own
// port in DA0; the vacated low bits are filled with the PE port code so
// that a packet whose address list is used up is delivered locally. In the
// absolute-address modes the header is forwarded unchanged.
// Flow control is credit based: each output counts free slots of each
// downstream VC buffer (DEPTH at reset); a credit_in pulse returns one.
//
// Timing: a flit that enters on in_link at cycle t is in the buffer at t+1
// and, if granted at once, leaves on out_link at t+2 (two cycles per hop);
// headers and payloads take the same path, payloads skip RC and VA.
//
// rst_n is an asynchronous reset for all flops. The input ports also use it
// in the `disable iff` of their credit and handshake assertions, so a lint
// tool may report it as used both synchronously and asynchronously; only the
// assertions sample it, and no flop does.
module nocnn_router
  import nocnn_pkg::*;
#(
  parameter int unsigned        DEPTH = 5,
  parameter routing_e           ALGO  = RT_DT,
  parameter logic [COORD_W-1:0] X_LOC = '0,
  parameter logic [COORD_W-1:0] Y_LOC = '0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  link_t          in_link    [NPORT],
  output logic [NVC-1:0] credit_out [NPORT],
  output link_t          out_link   [NPORT],
  input  logic [NVC-1:0] credit_in  [NPORT]
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [NPORT-1:0] hv;
  flit_t            hf     [NPORT];
  logic [NPORT-1:0] hr     [NPORT];
  logic [NPORT-1:0] hvc;
  logic [NPORT-1:0] pop;
  logic [NPORT-1:0] grant  [NPORT];   // grant[out][in]
  logic [NPORT-1:0] cred_ok[NPORT];   // cred_ok[out][in]
  logic [CW-1:0]    credits[NPORT][NVC];

  for (genvar i = 0; i < NPORT; i++) begin : g_in
    nocnn_input_port #(
      .DEPTH(DEPTH), .ALGO(ALGO), .PORT(port_e'(i)), .X_LOC(X_LOC), .Y_LOC(Y_LOC)
    ) u_in (
      .clk, .rst_n,
      .in_link(in_link[i]), .credit_out(credit_out[i]),
      .head_valid(hv[i]), .head_flit(hf[i]), .head_vc(hvc[i]),
      .head_route(hr[i]), .pop(pop[i])
    );
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_out
    always_comb
      for (int i = 0; i < NPORT; i++)
        cred_ok[o][i] = (credits[o][hvc[i]] != '0);

    nocnn_switch_alloc #(.OUT_PORT(port_e'(o))) u_sa (
      .clk, .rst_n,
      .head_valid(hv), .head_flit(hf), .head_route(hr),
      .credit_ok(cred_ok[o]), .grant(grant[o]), .locked()
    );
  end

  always_comb begin
    pop = '0;
    for (int o = 0; o < NPORT; o++) pop |= grant[o];
  end

  // crossbar, shifter, output registers and credit counters
  function automatic flit_t shift_da(flit_t f);
    flit_t r = f;
    if (ALGO == RT_DT && flit_type(f) == FT_HEAD)
      r[H_DA_W-1:0] = {f[H_DA_W-4:0], 3'(P_PE)};
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NPORT; o++) begin
        out_link[o] <= '0;
        for (int v = 0; v < NVC; v++) credits[o][v] <= CW'(DEPTH);
      end
    end else begin
      for (int o = 0; o < NPORT; o++) begin
        out_link[o].valid <= 1'b0;
        for (int i = 0; i < NPORT; i++)
          if (grant[o][i]) begin
            out_link[o].valid <= 1'b1;
            out_link[o].vc    <= hvc[i];
            out_link[o].flit  <= shift_da(hf[i]);
          end
        for (int v = 0; v < NVC; v++) begin
          logic used;
          used = 1'b0;
          for (int i = 0; i < NPORT; i++)
            if (grant[o][i] && hvc[i] == v[0]) used = 1'b1;
          credits[o][v] <= credits[o][v] - CW'(used) + CW'(credit_in[o][v]);
        end
      end
    end
  end

endmodule
