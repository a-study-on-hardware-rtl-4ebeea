// nocnn_top: the NoC neural processor, ROWS x COLS tiles (default 5 x 4 = 20)
// in a 2-D torus.
//
// Each tile holds a PE of four neurons and a 5-port router. Tile (row r,
// column c) has number r*COLS + c and, for absolute-address routing,
// coordinates x = c, y = r. Its N port connects to tile (r-1 mod ROWS, c),
// S to (r+1), W to (r, c-1 mod COLS) and E to (r, c+1); the wrap-around links
// make the mesh a torus. A feed-forward network is mapped by giving each
// layer a group of tiles (typically a column): input-layer PEs receive the
// input pattern from the host, every PE sends its outputs as one packet to
// each PE of the next layer, and output-layer PEs return their outputs to the
// host as result packets.
//
// Host interface (this design's choice; the published processor has an I/O
// ring without further detail): a configuration write port addressed by tile
// number (weights, LUT, destination headers, control register, see
// nocnn_pe), a valid/ready packet port into the PE of tile host_tile, and
// per-tile result streams (res_valid/res_flit, always accepted) and
// pattern-done pulses.
module nocnn_top
  import nocnn_pkg::*;
#(
  parameter int unsigned ROWS   = 5,
  parameter int unsigned COLS   = 4,
  parameter int unsigned DEPTH  = 5,
  parameter routing_e    ALGO   = RT_DT,
  parameter int unsigned WDEPTH = 32,
  parameter int unsigned LUT_AW = 10,
  parameter int unsigned HDEPTH = 8,
  localparam int unsigned NT    = ROWS * COLS,
  localparam int unsigned TW    = $clog2(NT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  logic [TW-1:0] cfg_tile,
  input  cfg_sel_e      cfg_sel,
  input  logic [1:0]    cfg_neuron,
  input  logic [9:0]    cfg_addr,
  input  flit_t         cfg_data,
  input  logic          host_valid,
  input  logic [TW-1:0] host_tile,
  input  flit_t         host_flit,
  output logic          host_ready,
  output logic [NT-1:0] res_valid,
  output flit_t         res_flit [NT],
  output logic [NT-1:0] done
);

  link_t          nb_in   [NT][4];
  link_t          nb_out  [NT][4];
  logic [NVC-1:0] cr_in   [NT][4];
  logic [NVC-1:0] cr_out  [NT][4];
  logic [NT-1:0]  t_host_ready;

  assign host_ready = t_host_ready[host_tile];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned T  = r * COLS + c;
      localparam int unsigned TN = ((r + ROWS - 1) % ROWS) * COLS + c;
      localparam int unsigned TS = ((r + 1) % ROWS) * COLS + c;
      localparam int unsigned TWt = r * COLS + (c + COLS - 1) % COLS;
      localparam int unsigned TE = r * COLS + (c + 1) % COLS;

      // port index 0..3 = N, W, S, E (port_e)
      // flits arriving at this tile come from the neighbour's opposite port,
      // credits for flits this tile sends come back from that neighbour
      assign nb_in[T][0] = nb_out[TN][2];
      assign nb_in[T][2] = nb_out[TS][0];
      assign nb_in[T][1] = nb_out[TWt][3];
      assign nb_in[T][3] = nb_out[TE][1];
      assign cr_in[T][0] = cr_out[TN][2];
      assign cr_in[T][2] = cr_out[TS][0];
      assign cr_in[T][1] = cr_out[TWt][3];
      assign cr_in[T][3] = cr_out[TE][1];

      nocnn_tile #(
        .DEPTH(DEPTH), .ALGO(ALGO),
        .X_LOC(COORD_W'(c)), .Y_LOC(COORD_W'(r)),
        .WDEPTH(WDEPTH), .LUT_AW(LUT_AW), .HDEPTH(HDEPTH)
      ) u_tile (
        .clk, .rst_n,
        .nb_in(nb_in[T]), .nb_cr_out(cr_out[T]), .nb_out(nb_out[T]), .nb_cr_in(cr_in[T]),
        .cfg_we(cfg_we && cfg_tile == TW'(T)), .cfg_sel, .cfg_neuron, .cfg_addr, .cfg_data,
        .host_valid(host_valid && host_tile == TW'(T)), .host_flit,
        .host_ready(t_host_ready[T]),
        .res_valid(res_valid[T]), .res_flit(res_flit[T]), .done(done[T])
      );
    end
  end

endmodule
