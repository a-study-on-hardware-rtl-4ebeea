// nocnn_act_lut: activation-function look-up table shared by the four
// neurons of a PE.
//
// The table is a RAM of 2**AW words of 32-bit fixed point (25 fraction
// bits), loaded through the write port, so any activation function (log
// sigmoid, tanh, ...) can be used and changed at run time. A weighted sum in
// [-64,64) is mapped onto the table by its top AW bits with the sign bit
// inverted, so word 0 holds f(-64) and word k holds f(-64 + k*128/2**AW).
// The table size and this indexing are this design's choices; the published
// design only states that the function is a LUT stored in RAM.
//
// Timing: sum presented at cycle t, f(sum) on dout at t+1 (synchronous RAM
// read).
module nocnn_act_lut
  import nocnn_pkg::*;
#(
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  fix_t          wr_data,
  input  fix_t          sum,
  output fix_t          dout
);

  fix_t          table_q [2**AW];
  logic [AW-1:0] idx;

  assign idx = {~sum[DATA_W-1], sum[DATA_W-2 -: AW-1]};

  always_ff @(posedge clk) begin
    if (wr_en) table_q[wr_addr] <= wr_data;
    dout <= table_q[idx];
  end

endmodule
