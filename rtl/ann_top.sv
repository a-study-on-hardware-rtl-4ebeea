// ann_top: the two neural-network processors side by side, each with its
// own ports.
//
// u_noc is the network-on-chip processor (nocnn_top): 20 tiles, each a PE of
// four neurons and a router, in a 5 x 4 torus; its ports keep their names
// from nocnn_top. u_lmp is the single-FPGA network with layer multiplexing
// and partial pipelining (lmp_ann, 20 neuron modules); its ports carry the
// prefix lmp_. The two share only the clock and the reset; see the two
// modules for the interface and timing of each. Putting them in one top is
// this design's choice, so that one build and one test cover both.
module ann_top
  import nocnn_pkg::*;
#(
  localparam int unsigned NT   = 20,
  localparam int unsigned TW   = $clog2(NT),
  localparam int unsigned NMOD = 20
) (
  input  logic                clk,
  input  logic                rst_n,
  // NoC processor
  input  logic                cfg_we,
  input  logic [TW-1:0]       cfg_tile,
  input  cfg_sel_e            cfg_sel,
  input  logic [1:0]          cfg_neuron,
  input  logic [9:0]          cfg_addr,
  input  flit_t               cfg_data,
  input  logic                host_valid,
  input  logic [TW-1:0]       host_tile,
  input  flit_t               host_flit,
  output logic                host_ready,
  output logic [NT-1:0]       res_valid,
  output flit_t               res_flit [NT],
  output logic [NT-1:0]       done,
  // layer-multiplexed network
  input  logic                lmp_cfg_we,
  input  logic [1:0]          lmp_cfg_sel,
  input  logic [4:0]          lmp_cfg_mod,
  input  logic [7:0]          lmp_cfg_addr,
  input  logic [31:0]         lmp_cfg_data,
  input  logic                lmp_start,
  input  logic [2:0]          lmp_n_steps,
  input  logic [7:0]          lmp_n_loops,
  output logic                lmp_busy,
  output logic [NMOD-1:0]     lmp_res_valid,
  output logic [15:0]         lmp_res_y [NMOD],
  output logic [3:0]          lmp_res_idx [NMOD],
  output logic [7:0]          lmp_res_loop
);

  nocnn_top u_noc (
    .clk, .rst_n,
    .cfg_we, .cfg_tile, .cfg_sel, .cfg_neuron, .cfg_addr, .cfg_data,
    .host_valid, .host_tile, .host_flit, .host_ready,
    .res_valid, .res_flit, .done
  );

  lmp_ann u_lmp (
    .clk, .rst_n,
    .cfg_we(lmp_cfg_we), .cfg_sel(lmp_cfg_sel), .cfg_mod(lmp_cfg_mod),
    .cfg_addr(lmp_cfg_addr), .cfg_data(lmp_cfg_data),
    .start(lmp_start), .n_steps(lmp_n_steps), .n_loops(lmp_n_loops),
    .busy(lmp_busy), .res_valid(lmp_res_valid), .res_y(lmp_res_y),
    .res_idx(lmp_res_idx), .res_loop(lmp_res_loop)
  );

endmodule
