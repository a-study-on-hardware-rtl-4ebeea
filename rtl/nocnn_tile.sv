// nocnn_tile: one tile of the NoC neural processor: a PE (four neurons) and
// its 5-port router.
//
// The router's N/W/S/E ports are the tile's links to its four neighbours.
// Between the router's PE port and the PE the tile adds:
//  - a receive buffer for packets the router delivers to the PE (2*DEPTH
//    flits, so both VCs' credits fit; a credit goes back for each flit read);
//  - a packet-level merge of those packets with packets from the host
//    (input patterns for an input-layer PE), the router side first; once a
//    packet's header is taken the merge stays on that source until the
//    packet's payloads are in;
//  - a sender that puts the PE's packets on the router's PE input with the
//    VC named in the header's VCN bit, counting the router's credits; packets
//    the PE marks for the host leave on res_* instead (the host always
//    accepts).
// The receive buffer, the merge and the host paths are this design's
// choices; the published tile is a PE and a router.
module nocnn_tile
  import nocnn_pkg::*;
#(
  parameter int unsigned        DEPTH  = 5,
  parameter routing_e           ALGO   = RT_DT,
  parameter logic [COORD_W-1:0] X_LOC  = '0,
  parameter logic [COORD_W-1:0] Y_LOC  = '0,
  parameter int unsigned        WDEPTH = 32,
  parameter int unsigned        LUT_AW = 10,
  parameter int unsigned        HDEPTH = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  // links to the neighbours, indexed by port_e (entry P_PE unused)
  input  link_t          nb_in     [4],
  output logic [NVC-1:0] nb_cr_out [4],
  output link_t          nb_out    [4],
  input  logic [NVC-1:0] nb_cr_in  [4],
  // configuration of the PE
  input  logic           cfg_we,
  input  cfg_sel_e       cfg_sel,
  input  logic [1:0]     cfg_neuron,
  input  logic [9:0]     cfg_addr,
  input  flit_t          cfg_data,
  // host packets into the PE
  input  logic           host_valid,
  input  flit_t          host_flit,
  output logic           host_ready,
  // result packets to the host
  output logic           res_valid,
  output flit_t          res_flit,
  output logic           done
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  link_t          r_in   [NPORT];
  link_t          r_out  [NPORT];
  logic [NVC-1:0] r_crout[NPORT];
  logic [NVC-1:0] r_crin [NPORT];

  for (genvar p = 0; p < 4; p++) begin : g_nb
    assign r_in[p]      = nb_in[p];
    assign nb_out[p]    = r_out[p];
    assign nb_cr_out[p] = r_crout[p];
    assign r_crin[p]    = nb_cr_in[p];
  end

  nocnn_router #(.DEPTH(DEPTH), .ALGO(ALGO), .X_LOC(X_LOC), .Y_LOC(Y_LOC)) u_router (
    .clk, .rst_n,
    .in_link(r_in), .credit_out(r_crout), .out_link(r_out), .credit_in(r_crin)
  );

  // ---- receive buffer: router -> PE
  logic        rx_empty, rx_pop;
  logic [FLIT_W:0] rx_data;

  nocnn_fifo #(.W(FLIT_W + 1), .DEPTH(2 * DEPTH)) u_rx (
    .clk, .rst_n,
    .push(r_out[P_PE].valid), .wr_data({r_out[P_PE].vc, r_out[P_PE].flit}),
    .pop(rx_pop), .rd_data(rx_data), .empty(rx_empty), .full(), .count()
  );

  assign r_crin[P_PE] = rx_pop ? (NVC'(1) << rx_data[FLIT_W]) : '0;

  // ---- merge of router and host packets
  logic        pe_in_valid, pe_in_ready, sel_host, accept;
  flit_t       pe_in_flit;
  logic        m_locked, m_host;
  logic [2:0]  m_rem;

  always_comb begin
    sel_host    = m_locked ? m_host : (rx_empty && host_valid);
    pe_in_valid = sel_host ? host_valid : !rx_empty;
    pe_in_flit  = sel_host ? host_flit : rx_data[FLIT_W-1:0];
    accept      = pe_in_valid && pe_in_ready;
    rx_pop      = accept && !sel_host;
    host_ready  = sel_host && pe_in_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_locked <= 1'b0;
      m_host   <= 1'b0;
      m_rem    <= '0;
    end else if (accept) begin
      if (!m_locked) begin
        m_host   <= sel_host;
        m_rem    <= popcount4(hdr_un(pe_in_flit));
        m_locked <= (flit_type(pe_in_flit) == FT_HEAD) &&
                    (popcount4(hdr_un(pe_in_flit)) != 0);
      end else begin
        m_rem    <= m_rem - 1'b1;
        m_locked <= (m_rem != 3'd1);
      end
    end
  end

  // ---- PE
  logic  pe_out_valid, pe_out_ready, pe_out_host;
  flit_t pe_out_flit;

  nocnn_pe #(.WDEPTH(WDEPTH), .LUT_AW(LUT_AW), .HDEPTH(HDEPTH)) u_pe (
    .clk, .rst_n,
    .cfg_we, .cfg_sel, .cfg_neuron, .cfg_addr, .cfg_data,
    .in_valid(pe_in_valid), .in_flit(pe_in_flit), .in_ready(pe_in_ready),
    .out_valid(pe_out_valid), .out_flit(pe_out_flit), .out_host(pe_out_host),
    .out_ready(pe_out_ready), .done
  );

  // ---- sender: PE -> router, with credits per VC
  logic [CW-1:0] tx_cred [NVC];
  logic          tx_vc, cur_vc, send;

  always_comb begin
    cur_vc       = (flit_type(pe_out_flit) == FT_HEAD) ? pe_out_flit[H_VCN] : tx_vc;
    pe_out_ready = pe_out_host || (tx_cred[cur_vc] != '0);
    send         = pe_out_valid && pe_out_ready && !pe_out_host;
    res_valid    = pe_out_valid && pe_out_host;
    res_flit     = pe_out_flit;
  end

  assign r_in[P_PE] = '{valid: send, vc: cur_vc, flit: pe_out_flit};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_vc <= 1'b0;
      for (int v = 0; v < NVC; v++) tx_cred[v] <= CW'(DEPTH);
    end else begin
      if (send) tx_vc <= cur_vc;
      for (int v = 0; v < NVC; v++)
        tx_cred[v] <= tx_cred[v] - CW'(send && cur_vc == v[0]) + CW'(r_crout[P_PE][v]);
    end
  end

endmodule
