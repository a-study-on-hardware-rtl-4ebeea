// nocnn_input_port: one input port of the NoC router: virtual-channel
// buffers, routing computation (RC) and virtual-channel selection (VA).
//
// Each port has two virtual channels (VC0, VC1), each a FIFO of DEPTH flits.
// A flit arriving on the link is written into the FIFO named by the link's
// vc bit; dummy flits are dropped. Routing computation happens on the way in:
// for a header the requested output port is decoded and stored with the flit
// (destination-tag mode: DA0, the top 3 bits of the DA field, is the port
// number; absolute modes: inoc_route_fn compares the x/y address with the
// router's own). Payloads need no routing computation.
// The VA stage picks which VC this port presents to the switch allocators.
// Between packets it alternates between the two VCs whose head is a header;
// once a header has left it stays on that VC until the header's payloads
// (one per bit set in the UN field) have left too, so packets are never
// interleaved on an output (wormhole switching).
// Every pop returns one credit for its VC to the upstream sender.
//
// Timing: a flit written at edge t is presented at the head from cycle t+1.
module nocnn_input_port
  import nocnn_pkg::*;
#(
  parameter int unsigned        DEPTH = 5,
  parameter routing_e           ALGO  = RT_DT,
  parameter port_e              PORT  = P_PE,
  parameter logic [COORD_W-1:0] X_LOC = '0,
  parameter logic [COORD_W-1:0] Y_LOC = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  link_t            in_link,
  output logic [NVC-1:0]   credit_out,
  // head of the selected VC, towards the switch allocators
  output logic             head_valid,
  output flit_t            head_flit,
  output logic             head_vc,
  output logic [NPORT-1:0] head_route,
  input  logic             pop
);

  localparam int unsigned EW = NPORT + FLIT_W;

  logic [NPORT-1:0] rc_route, abs_route;
  logic [EW-1:0]    rd_data [NVC];
  logic [NVC-1:0]   empty, full, push, vc_pop;
  logic             busy, cur_vc, rr, sel_vc;
  logic [2:0]       rem;

  // ---- RC: routing computation on the incoming header
  inoc_route_fn #(.ALGO(ALGO)) u_fn (
    .in_port(PORT), .x_loc(X_LOC), .y_loc(Y_LOC),
    .x_des(in_link.flit[H_DA_W-1 -: COORD_W]),
    .y_des(in_link.flit[H_DA_W-1-COORD_W -: COORD_W]),
    .route(abs_route)
  );

  always_comb begin
    rc_route = '0;
    if (ALGO == RT_DT) begin
      if (in_link.flit[H_DA_W-1 -: 3] <= 3'(P_PE))
        rc_route[in_link.flit[H_DA_W-1 -: 3]] = 1'b1;
    end else begin
      rc_route = abs_route;
    end
    if (flit_type(in_link.flit) != FT_HEAD) rc_route = '0;
  end

  // ---- buffers
  for (genvar v = 0; v < NVC; v++) begin : g_vc
    assign push[v] = in_link.valid && (in_link.vc == v[0]) &&
                     (flit_type(in_link.flit) != FT_DUMMY);
    nocnn_fifo #(.W(EW), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .push(push[v]), .wr_data({rc_route, in_link.flit}),
      .pop(vc_pop[v]), .rd_data(rd_data[v]),
      .empty(empty[v]), .full(full[v]), .count()
    );
    a_credit_respected: assert property (@(posedge clk) disable iff (!rst_n)
      !(push[v] && full[v]));
  end

  // ---- VA: choose the VC presented to the switch allocators
  function automatic logic head_is_header(logic [EW-1:0] e);
    return flit_type(e[FLIT_W-1:0]) == FT_HEAD;
  endfunction

  always_comb begin
    if (busy) sel_vc = cur_vc;
    else if (!empty[rr] && head_is_header(rd_data[rr])) sel_vc = rr;
    else sel_vc = !rr;
  end

  always_comb begin
    head_vc    = sel_vc;
    head_flit  = rd_data[sel_vc][FLIT_W-1:0];
    head_route = rd_data[sel_vc][EW-1 -: NPORT];
    // outside a packet only a header may leave; inside, only payloads
    head_valid = !empty[sel_vc] &&
                 (busy ? (flit_type(head_flit) == FT_PAY)
                       : (flit_type(head_flit) == FT_HEAD));
    vc_pop = '0;
    vc_pop[sel_vc] = pop;
    credit_out = vc_pop;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      cur_vc <= 1'b0;
      rr     <= 1'b0;
      rem    <= '0;
    end else if (pop) begin
      if (!busy) begin
        cur_vc <= sel_vc;
        rr     <= !sel_vc;
        rem    <= popcount4(hdr_un(head_flit));
        busy   <= (popcount4(hdr_un(head_flit)) != 0);
      end else begin
        rem  <= rem - 1'b1;
        busy <= (rem != 3'd1);
      end
    end
  end

  a_pop_valid: assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);

endmodule
