// lmp_ann: feed-forward network of NMOD neuron modules with layer
// multiplexing and partial pipelining, run by a step-sequencing control
// block.
//
// The network has fewer neuron modules than neurons, so its layers take
// turns on the modules (layer multiplexing), and several consecutive layers
// are mapped at once, each working on a different input pattern (partial
// pipelining; the number of layers mapped at once is the pipeline depth).
// A step table holds, for every step and every module: enable, the layer
// whose outputs feed it (0 = the input pattern RAM), its neuron index in the
// next layer, its number of inputs, the base address of its weights in its
// own weight RAM, and whether its result goes to the output. The control
// block runs steps 0..n_steps-1 in a loop, n_loops times, and moves to the
// next input pattern once per loop.
// One step: an input counter j runs over the inputs; every enabled module
// gets input j of its source layer (input RAM or layer buffer, the
// mux/demux of the published circuit) and weight wbase+j from its weight
// RAM; disabled modules are held off with En low. Each module's result is
// caught in its output register Reg_n; when the slowest module is done all
// registers are written into the layer buffers at once, so a layer that
// reads a buffer in the same step still sees the previous pattern's values
// (this is what makes consecutive layers in one step a pipeline).
// The neuron circuit and the control-block idea (FSM setting enables, RAM
// addresses, mux and demux per step) follow the published design; the
// step-table format, buffer organisation and host ports are this design's
// choices.
//
// Interface: cfg_* writes weights (CFG_W: module cfg_mod, address cfg_addr),
// the activation LUT of all modules (CFG_LUT), the input pattern RAM
// (CFG_IN: address pattern*MAXIN + input) and step-table entries (CFG_STEP:
// module cfg_mod, step cfg_addr, data {wbase[21:14], n_in[13:9], dst[8:5],
// src[4:2], out[1], en[0]}). start (one cycle, while idle) runs n_loops
// loops of n_steps steps; busy is high until done. For each module whose
// entry has out set, res_valid[m] pulses at the end of the step with
// res_y[m] and res_idx[m] (its neuron index); res_loop gives the loop.
// Timing: a step whose longest input list is n inputs takes n + 5 cycles.
module lmp_ann #(
  parameter int unsigned NMOD   = 20,
  parameter int unsigned DW     = 16,
  parameter int unsigned FW     = 12,
  parameter int unsigned LUT_AW = 8,
  parameter int unsigned MAXIN  = 16,
  parameter int unsigned MAXL   = 4,
  parameter int unsigned MAXS   = 4,
  parameter int unsigned MAXPAT = 16,
  parameter int unsigned WDEPTH = 64
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_we,
  input  logic [1:0]                cfg_sel,
  input  logic [$clog2(NMOD)-1:0]   cfg_mod,
  input  logic [7:0]                cfg_addr,
  input  logic [31:0]               cfg_data,
  input  logic                      start,
  input  logic [$clog2(MAXS+1)-1:0] n_steps,
  input  logic [7:0]                n_loops,
  output logic                      busy,
  output logic [NMOD-1:0]           res_valid,
  output logic [DW-1:0]             res_y   [NMOD],
  output logic [3:0]                res_idx [NMOD],
  output logic [7:0]                res_loop
);

  localparam logic [1:0] CFG_W = 2'd0, CFG_LUT = 2'd1, CFG_IN = 2'd2, CFG_STEP = 2'd3;
  localparam int unsigned WA = $clog2(WDEPTH);
  localparam int unsigned SA = $clog2(MAXS);
  localparam int unsigned IA = $clog2(MAXPAT * MAXIN);

  typedef struct packed {
    logic [7:0] wbase;
    logic [4:0] n_in;
    logic [3:0] dst;
    logic [2:0] src;
    logic       out;
    logic       en;
  } entry_t;

  typedef enum logic [1:0] {IDLE, RUN, WRAP} state_e;

  entry_t                step_tab [MAXS][NMOD];
  logic signed [DW-1:0]  wram [NMOD][WDEPTH];
  logic signed [DW-1:0]  in_ram [MAXPAT * MAXIN];
  logic signed [DW-1:0]  lbuf [MAXL + 1][MAXIN];   // lbuf[k][i]: output i of layer k
  logic [DW-1:0]         regs [NMOD];

  state_e               state;
  logic [SA-1:0]        step;
  logic [4:0]           cyc;
  logic [4:0]           step_len;
  logic [7:0]           loop_cnt;
  logic [$clog2(MAXPAT)-1:0] pat;

  entry_t               cur [NMOD];
  logic [NMOD-1:0]      y_valid;
  logic [DW-1:0]        y [NMOD];

  // ---- configuration
  always_ff @(posedge clk) begin
    if (cfg_we && cfg_sel == CFG_W)    wram[cfg_mod][cfg_addr[WA-1:0]] <= cfg_data[DW-1:0];
    if (cfg_we && cfg_sel == CFG_IN)   in_ram[cfg_addr[IA-1:0]] <= cfg_data[DW-1:0];
    if (cfg_we && cfg_sel == CFG_STEP) step_tab[cfg_addr[SA-1:0]][cfg_mod] <= entry_t'(cfg_data[$bits(entry_t)-1:0]);
  end

  // ---- current step: its entries and its length (longest input list)
  always_comb begin
    step_len = '0;
    for (int m = 0; m < NMOD; m++) begin
      cur[m] = step_tab[step][m];
      if (cur[m].en && cur[m].n_in > step_len) step_len = cur[m].n_in;
    end
  end

  // ---- neuron modules with their input mux, weight counter and Reg_n
  for (genvar m = 0; m < NMOD; m++) begin : g_mod
    logic                 xv;
    logic signed [DW-1:0] xin, win;

    always_comb begin
      xv  = (state == RUN) && cur[m].en && (5'(cyc) < 5'(cur[m].n_in));
      if (cur[m].src == '0) xin = in_ram[IA'(pat * MAXIN) + IA'(cyc)];
      else                  xin = lbuf[cur[m].src][cyc[$clog2(MAXIN)-1:0]];
      win = wram[m][WA'(cur[m].wbase) + WA'(cyc)];
    end

    lmp_neuron #(.DW(DW), .FW(FW), .LUT_AW(LUT_AW)) u_n (
      .clk, .rst_n,
      .en(cur[m].en), .x_valid(xv),
      .first(cyc == '0), .last(5'(cyc) == 5'(cur[m].n_in) - 5'd1),
      .x(xin), .w(win),
      .lut_we(cfg_we && cfg_sel == CFG_LUT), .lut_addr(cfg_addr[LUT_AW-1:0]),
      .lut_data(cfg_data[DW-1:0]),
      .y(y[m]), .y_valid(y_valid[m])
    );

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)          regs[m] <= '0;
      else if (y_valid[m]) regs[m] <= y[m];
  end

  // ---- control block
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      step     <= '0;
      cyc      <= '0;
      loop_cnt <= '0;
      pat      <= '0;
      res_valid <= '0;
      res_loop <= '0;
      for (int m = 0; m < NMOD; m++) begin
        res_y[m]   <= '0;
        res_idx[m] <= '0;
      end
      for (int k = 0; k <= MAXL; k++)
        for (int i = 0; i < MAXIN; i++) lbuf[k][i] <= '0;
    end else begin
      res_valid <= '0;
      unique case (state)
        IDLE: if (start && n_steps != 0 && n_loops != 0) begin
          state    <= RUN;
          step     <= '0;
          cyc      <= '0;
          loop_cnt <= '0;
          pat      <= '0;
        end
        RUN: begin
          cyc <= cyc + 1'b1;
          if (cyc == 5'(step_len) + 5'd4) begin
            // end of step: Reg_n into the layer buffers and to the output
            cyc <= '0;
            for (int m = 0; m < NMOD; m++)
              if (cur[m].en) begin
                if (32'(cur[m].src) < MAXL) lbuf[cur[m].src + 3'd1][cur[m].dst] <= regs[m];
                if (cur[m].out) begin
                  res_valid[m] <= 1'b1;
                  res_y[m]     <= regs[m];
                  res_idx[m]   <= cur[m].dst;
                  res_loop     <= loop_cnt;
                end
              end
            if (32'(step) + 1 >= 32'(n_steps)) state <= WRAP;
            else step <= step + 1'b1;
          end
        end
        WRAP: begin
          step     <= '0;
          pat      <= pat + 1'b1;
          loop_cnt <= loop_cnt + 1'b1;
          state    <= (loop_cnt + 1'b1 == n_loops) ? IDLE : RUN;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

endmodule
