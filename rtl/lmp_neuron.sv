// lmp_neuron: neuron module of the layer-multiplexed, partly pipelined
// FPGA network (one N_n block of the network circuit).
//
// It computes y = f(sum_i w_i * x_i) for inputs that arrive one per cycle,
// in the published order of stages: the input x and the weight w are
// registered, multiplied (the enable En forces the product to zero, so a
// disabled module accumulates nothing), the product is registered, added into
// the accumulator register, and the accumulated sum addresses the activation
// look-up table, whose registered output is y.
// Numbers are DW-bit two's complement fixed point with FW fraction bits
// (DW = 16 as in the published experiments; FW = 12 is this design's
// choice). Products keep full precision in an ACC_W-bit accumulator. The
// LUT has 2**LUT_AW words written through lut_we/lut_addr/lut_data; it
// covers sums in [-2**(DW-FW-1), 2**(DW-FW-1)) (here [-8, 8)) in equal steps,
// word 0 holding f(-8), and sums outside that range use the end words. The
// LUT size and this indexing are this design's choices.
//
// Timing: x, w, x_valid, first, last at cycle t; product register at t+2,
// accumulator at t+3; a sum whose last input came at t is presented as y
// with y_valid at t+4. first marks the first input of a sum: the
// accumulator then loads the product instead of adding it.
module lmp_neuron #(
  parameter int unsigned DW     = 16,
  parameter int unsigned FW     = 12,
  parameter int unsigned LUT_AW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 x_valid,
  input  logic                 first,
  input  logic                 last,
  input  logic signed [DW-1:0] x,
  input  logic signed [DW-1:0] w,
  input  logic                 lut_we,
  input  logic [LUT_AW-1:0]    lut_addr,
  input  logic [DW-1:0]        lut_data,
  output logic [DW-1:0]        y,
  output logic                 y_valid
);

  localparam int unsigned ACC_W = 2 * DW + 8;
  // the LUT covers the sum range of a DW-bit number: top index bit at
  // position 2*FW + (DW-FW-1) of the accumulator (2*FW fraction bits)
  localparam int unsigned SB    = 2 * FW + (DW - FW - 1);

  logic signed [DW-1:0]    x_q, w_q;
  logic                    en_q;
  logic signed [2*DW-1:0]  p_q;
  logic signed [ACC_W-1:0] acc;
  logic [2:0]              v_q, f_q, l_q;
  logic [LUT_AW-1:0]       idx;
  logic [DW-1:0]           lut [2**LUT_AW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q  <= '0;
      w_q  <= '0;
      en_q <= 1'b0;
      p_q  <= '0;
      acc  <= '0;
      v_q  <= '0;
      f_q  <= '0;
      l_q  <= '0;
    end else begin
      x_q  <= x;
      w_q  <= w;
      en_q <= en;
      v_q  <= {v_q[1:0], x_valid};
      f_q  <= {f_q[1:0], first};
      l_q  <= {l_q[1:0], last};
      if (en_q) p_q <= x_q * w_q;
      else      p_q <= '0;
      if (v_q[1]) acc <= f_q[1] ? ACC_W'(p_q) : acc + ACC_W'(p_q);
    end
  end

  // LUT address: saturate the sum to the covered range, then take its top
  // LUT_AW bits with the sign inverted
  always_comb begin
    if (acc >= (ACC_W'(1) <<< SB))
      idx = '1;
    else if (acc < -(ACC_W'(1) <<< SB))
      idx = '0;
    else
      idx = {~acc[SB], acc[SB-1 -: LUT_AW-1]};
  end

  always_ff @(posedge clk) begin
    if (lut_we) lut[lut_addr] <= lut_data;
    y <= lut[idx];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= v_q[2] && l_q[2];

endmodule
