// nocnn_neuron: one neuron of the NoC processor without its activation
// function (the four neurons of a PE share one activation LUT).
//
// It computes H = sum_j w_j * o_j over the inputs o_j that arrive one per
// cycle. The weights w_j sit in a local RAM read at the weight address from
// the PE's address generator. The input MUX passes the decoded input to the
// multiplier when the neuron is in use and zero otherwise, so an unused
// neuron accumulates nothing. Numbers are 32-bit two's complement fixed
// point with 25 fraction bits (range [-64,64), as published); the product is
// rounded down to 25 fraction bits and added to a 40-bit accumulator, which
// is saturated to 32 bits on the sum output (accumulator width and
// saturation are this design's choices).
//
// Timing: x_valid/x/rd_addr at cycle t; the RAM and the input register
// deliver at t+1, the product register at t+2, the accumulator holds the new
// sum from t+3. clear zeroes the accumulator (it wins over a late add).
// Weight loading: wr_en/wr_addr/wr_data write the RAM at any time.
module nocnn_neuron
  import nocnn_pkg::*;
#(
  parameter int unsigned WDEPTH = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      clear,
  input  logic                      wr_en,
  input  logic [$clog2(WDEPTH)-1:0] wr_addr,
  input  fix_t                      wr_data,
  input  logic [$clog2(WDEPTH)-1:0] rd_addr,
  input  logic                      x_valid,
  input  fix_t                      x,
  output fix_t                      sum
);

  localparam int unsigned ACC_W = 40;

  fix_t                     wram [WDEPTH];
  fix_t                     w_q, x_q;
  logic                     v_q, pv_q;
  logic signed [ACC_W-1:0]  prod_q, acc;
  logic signed [2*DATA_W-1:0] prod;

  always_ff @(posedge clk) begin
    if (wr_en) wram[wr_addr] <= wr_data;
    w_q <= wram[rd_addr];
  end

  always_comb prod = w_q * x_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q    <= '0;
      v_q    <= 1'b0;
      pv_q   <= 1'b0;
      prod_q <= '0;
      acc    <= '0;
    end else begin
      // input MUX
      x_q    <= (x_valid && en) ? x : '0;
      v_q    <= x_valid && en;
      pv_q   <= v_q;
      prod_q <= ACC_W'(prod >>> FRAC_W);
      if (clear)     acc <= '0;
      else if (pv_q) acc <= acc + prod_q;
    end
  end

  always_comb begin
    if (acc > ACC_W'(fix_t'({1'b0, {(DATA_W-1){1'b1}}})))
      sum = {1'b0, {(DATA_W-1){1'b1}}};
    else if (acc < -ACC_W'(64'sd1 <<< (DATA_W-1)))
      sum = {1'b1, {(DATA_W-1){1'b0}}};
    else
      sum = fix_t'(acc);
  end

endmodule
