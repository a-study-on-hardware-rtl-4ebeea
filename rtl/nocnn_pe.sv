// nocnn_pe: processing element of the NoC neural processor: four neurons of
// one layer, a decoder, a controller with weight address generator, one
// activation LUT shared by the four neurons, and an encoder.
//
// Operation for one input pattern:
//  1. Accumulate. The decoder takes packets from in_*. A header gives the
//     number of payloads that follow (bits set in UN) and, in PCI[7:0], the
//     input index of its first payload. Each payload is broadcast to the
//     neurons; the weight address generator hands them the input index, which
//     is the virtual address of the matching weight in every neuron's RAM, and
//     steps it by one per payload. Neurons not set in the PE's used-neuron
//     mask ignore the data.
//  2. When n_inputs payloads have arrived the controller waits for the
//     neuron pipelines to drain, then feeds the four sums one per cycle
//     through the shared LUT (the staggered C/L phases of the published
//     four-stage PE pipeline).
//  3. Encode. For each of n_dest destinations the encoder sends one packet:
//     the header stored for that destination (loaded in advance; the encoder
//     writes the used-neuron mask into its UN field), then one payload per
//     used neuron, lowest neuron first. With n_dest = 0 one packet, built
//     on header word 0, goes to the host instead (out_host = 1): this is
//     how an output-layer PE delivers its results.
//  4. The accumulators are cleared and the PE waits for the next pattern.
// While in steps 2-3 the PE does not accept input (in_ready low).
// The packet-level behaviour follows the published PE; PCI usage, the
// host result path and the configuration port are this design's choices.
//
// Configuration (cfg_we with cfg_sel): CFG_WEIGHT writes weight cfg_addr of
// neuron cfg_neuron; CFG_LUT writes LUT word cfg_addr; CFG_HDR writes header
// word cfg_addr; CFG_REG writes {n_dest[15:12], n_inputs[11:4], used[3:0]}.
// Streams in_* / out_* are valid/ready; a flit moves when both are high.
module nocnn_pe
  import nocnn_pkg::*;
#(
  parameter int unsigned WDEPTH = 32,
  parameter int unsigned LUT_AW = 10,
  parameter int unsigned HDEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  logic        cfg_we,
  input  cfg_sel_e    cfg_sel,
  input  logic [1:0]  cfg_neuron,
  input  logic [9:0]  cfg_addr,
  input  flit_t       cfg_data,
  // packets in (from the router or the host)
  input  logic        in_valid,
  input  flit_t       in_flit,
  output logic        in_ready,
  // packets out
  output logic        out_valid,
  output flit_t       out_flit,
  output logic        out_host,
  input  logic        out_ready,
  // one pulse per completed pattern
  output logic        done
);

  localparam int unsigned WAW = $clog2(WDEPTH);
  localparam int unsigned HAW = $clog2(HDEPTH);

  typedef enum logic [1:0] {S_ACC, S_FLUSH, S_LUT, S_SEND} state_e;

  state_e          state;
  logic [3:0]      used;
  logic [7:0]      n_inputs, n_recv;
  logic [3:0]      n_dest;
  flit_t           hdr_ram [HDEPTH];
  fix_t            sums [NNEUR];
  fix_t            outs [NNEUR];
  fix_t            lut_in, lut_out;
  logic [WAW-1:0]  waddr;
  logic [2:0]      pay_rem;
  logic            x_valid, clear;
  logic [2:0]      step;
  logic [3:0]      dest;
  logic [2:0]      phit;
  logic [2:0]      n_pay;

  assign n_pay = popcount4(used);

  // ---- configuration registers and header RAM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used     <= '0;
      n_inputs <= '0;
      n_dest   <= '0;
    end else if (cfg_we && cfg_sel == CFG_REG) begin
      used     <= cfg_data[3:0];
      n_inputs <= cfg_data[11:4];
      n_dest   <= cfg_data[15:12];
    end
  end

  always_ff @(posedge clk)
    if (cfg_we && cfg_sel == CFG_HDR) hdr_ram[cfg_addr[HAW-1:0]] <= cfg_data;

  // ---- decoder
  assign in_ready = (state == S_ACC);
  assign x_valid  = in_valid && in_ready && flit_type(in_flit) == FT_PAY && pay_rem != 0;

  // ---- neurons
  for (genvar n = 0; n < NNEUR; n++) begin : g_n
    nocnn_neuron #(.WDEPTH(WDEPTH)) u_neuron (
      .clk, .rst_n,
      .en(used[n]), .clear(clear),
      .wr_en(cfg_we && cfg_sel == CFG_WEIGHT && cfg_neuron == n[1:0]),
      .wr_addr(cfg_addr[WAW-1:0]), .wr_data(cfg_data[DATA_W-1:0]),
      .rd_addr(waddr), .x_valid(x_valid), .x(in_flit[DATA_W-1:0]),
      .sum(sums[n])
    );
  end

  // ---- shared activation LUT
  assign lut_in = sums[step[1:0]];
  nocnn_act_lut #(.AW(LUT_AW)) u_lut (
    .clk,
    .wr_en(cfg_we && cfg_sel == CFG_LUT), .wr_addr(cfg_addr[LUT_AW-1:0]),
    .wr_data(cfg_data[DATA_W-1:0]), .sum(lut_in), .dout(lut_out)
  );

  // ---- encoder: phit 0 is the header, phit p>0 the p-th used neuron
  function automatic logic [1:0] nth_used(logic [3:0] m, logic [2:0] p);
    logic [2:0] c;
    logic [1:0] r;
    c = '0;
    r = '0;
    for (int n = 0; n < NNEUR; n++)
      if (m[n]) begin
        c = c + 1'b1;
        if (c == p) r = 2'(n);
      end
    return r;
  endfunction

  always_comb begin
    out_valid = (state == S_SEND);
    out_host  = (n_dest == 0);
    if (phit == 0) begin
      out_flit = hdr_ram[dest[HAW-1:0]];
      out_flit[H_FT_HI -: 2]  = FT_HEAD;
      out_flit[H_UN_LO +: 4]  = used;
    end else begin
      out_flit = make_payload(outs[nth_used(used, phit)]);
    end
  end

  // ---- controller and weight address generator
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_ACC;
      n_recv  <= '0;
      waddr   <= '0;
      pay_rem <= '0;
      step    <= '0;
      dest    <= '0;
      phit    <= '0;
      clear   <= 1'b0;
      done    <= 1'b0;
      for (int n = 0; n < NNEUR; n++) outs[n] <= '0;
    end else begin
      clear <= 1'b0;
      done  <= 1'b0;
      unique case (state)
        S_ACC: if (in_valid) begin
          if (flit_type(in_flit) == FT_HEAD) begin
            pay_rem <= popcount4(hdr_un(in_flit));
            waddr   <= in_flit[H_PCI_LO +: WAW];
          end else if (x_valid) begin
            pay_rem <= pay_rem - 1'b1;
            waddr   <= waddr + 1'b1;
            n_recv  <= n_recv + 1'b1;
            if (n_recv + 1'b1 == n_inputs) begin
              state <= S_FLUSH;
              step  <= '0;
            end
          end
        end
        S_FLUSH: begin
          step <= step + 1'b1;
          if (step == 3'd3) begin
            state <= S_LUT;
            step  <= '0;
          end
        end
        S_LUT: begin
          // LUT input is sums[step]; its output one cycle later is outs[step-1]
          step <= step + 1'b1;
          if (step != 0) outs[step[1:0] - 2'd1] <= lut_out;
          if (step == 3'd4) begin
            state <= S_SEND;
            dest  <= '0;
            phit  <= '0;
          end
        end
        S_SEND: if (out_ready) begin
          if (phit == n_pay) begin
            phit <= '0;
            if (dest + 1'b1 >= n_dest) begin
              state  <= S_ACC;
              n_recv <= '0;
              clear  <= 1'b1;
              done   <= 1'b1;
            end else begin
              dest <= dest + 1'b1;
            end
          end else begin
            phit <= phit + 1'b1;
          end
        end
        default: state <= S_ACC;
      endcase
    end
  end

  a_used_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_SEND) |-> (used != 0));

endmodule
