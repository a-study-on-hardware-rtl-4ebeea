// nocnn_switch_alloc: switch allocator for one output port of the router.
//
// It has the three published parts. The decoder looks at each input's head
// flit: its type (header or payload) and whether the header asks for this
// output. The arbiter is a fixed-priority arbiter among requesting headers;
// the input from the local PE has the highest priority, then the input ports
// in the order N, W, S, E (the order after the PE input is this design's
// choice). The hold logic keeps the output on the winning input after a
// header until all payloads of that packet have passed; the number of
// payloads is the number of bits set in the header's UN field (counting them
// instead of watching for the next non-payload flit is this design's choice,
// it keeps the hold correct when a packet arrives with gaps).
// A flit is granted only when the output has a credit for the flit's VC.
//
// Interface: per input i, head_valid/head_flit/head_route from the input
// port, credit_ok[i] (output has room in the VC of input i's flit);
// grant is one-hot or zero, combinational, and the caller pops the granted
// input and moves its flit to the output at the next clock edge.
module nocnn_switch_alloc
  import nocnn_pkg::*;
#(
  parameter port_e OUT_PORT = P_N
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NPORT-1:0] head_valid,
  input  flit_t            head_flit  [NPORT],
  input  logic [NPORT-1:0] head_route [NPORT],
  input  logic [NPORT-1:0] credit_ok,
  output logic [NPORT-1:0] grant,
  output logic             locked
);

  logic [NPORT-1:0] req_head, is_pay;
  logic [2:0]       hold_in;
  logic [2:0]       rem;

  // decoder
  always_comb begin
    for (int i = 0; i < NPORT; i++) begin
      req_head[i] = head_valid[i] && (flit_type(head_flit[i]) == FT_HEAD) &&
                    head_route[i][OUT_PORT] && credit_ok[i];
      is_pay[i]   = head_valid[i] && (flit_type(head_flit[i]) == FT_PAY);
    end
  end

  // arbiter and hold logic
  always_comb begin
    grant = '0;
    if (locked) begin
      if (is_pay[hold_in] && credit_ok[hold_in]) grant[hold_in] = 1'b1;
    end else if (req_head[P_PE]) begin
      grant[P_PE] = 1'b1;
    end else begin
      for (int i = NPORT - 2; i >= 0; i--)
        if (req_head[i]) grant = NPORT'(1) << i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked  <= 1'b0;
      hold_in <= '0;
      rem     <= '0;
    end else if (|grant) begin
      if (!locked) begin
        for (int i = 0; i < NPORT; i++)
          if (grant[i]) begin
            hold_in <= 3'(i);
            rem     <= popcount4(hdr_un(head_flit[i]));
            locked  <= (popcount4(hdr_un(head_flit[i])) != 0);
          end
      end else begin
        rem    <= rem - 1'b1;
        locked <= (rem != 3'd1);
      end
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
