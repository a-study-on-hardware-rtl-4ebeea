// inoc_route_fn: switch-allocator function blocks f_ij for absolute-address
// routing.
//
// With absolute addressing a header carries the x and y coordinates of the
// destination tile instead of a list of per-hop ports. Each switch allocator
// j (one per output port) holds a function f_ij per input port i that
// compares the destination with the local router's own coordinates; the
// flit goes to the output whose function is true. The rule sets below are
// the published ones for X-Y, west-first, north-last, negative-first and
// the fully adaptive variant, written per input port so that for any
// destination exactly one output matches. x grows to the east and y grows
// to the south. Purely combinational.
//
// Interface: in_port is the input port the header arrived on, (x_loc,y_loc)
// the router's coordinates, (x_des,y_des) the destination; route is one-hot
// in nocnn_pkg port order (N, W, S, E, PE).
module inoc_route_fn
  import nocnn_pkg::*;
#(
  parameter routing_e ALGO = RT_XY
) (
  input  port_e              in_port,
  input  logic [COORD_W-1:0] x_loc,
  input  logic [COORD_W-1:0] y_loc,
  input  logic [COORD_W-1:0] x_des,
  input  logic [COORD_W-1:0] y_des,
  output logic [NPORT-1:0]   route
);

  logic xe, xg, xl, ye, yg, yl;
  logic from_pe, from_e, from_n, from_w, from_s;
  logic to_pe, to_e, to_n, to_w, to_s;

  always_comb begin
    xe = (x_des == x_loc);
    xg = (x_des >  x_loc);
    xl = (x_des <  x_loc);
    ye = (y_des == y_loc);
    yg = (y_des >  y_loc);
    yl = (y_des <  y_loc);
    from_pe = (in_port == P_PE);
    from_e  = (in_port == P_E);
    from_n  = (in_port == P_N);
    from_w  = (in_port == P_W);
    from_s  = (in_port == P_S);

    to_pe = xe && ye;   // allocator 0, the same for every algorithm
    to_e  = 1'b0;
    to_n  = 1'b0;
    to_w  = 1'b0;
    to_s  = 1'b0;

    unique case (ALGO)
      RT_WF: begin
        to_e = (from_pe || from_e || from_w) ? (xg && ye) :
               from_n                        ? (xg && !yl) :
                                               (xg && !yg);
        to_n = from_s ? (xe && yl) : (!xl && yl);
        to_w = xl;
        to_s = from_n ? (xe && yg) : (!xl && yg);
      end
      RT_NL: begin
        to_e = from_n ? xg : (xg && !yg);
        to_n = xe && yl;
        to_w = from_n ? xl : (xl && !yg);
        to_s = from_n ? (xe && yg) : yg;
      end
      RT_NF: begin
        to_e = from_s ? xg : (xg && !yl);
        to_n = from_s ? (xe && yl) : (!xl && yl);
        to_w = from_n ? xl : (xl && !yg);
        to_s = from_n ? (xe && yg) : (!xg && yg);
      end
      RT_FA: begin
        to_e = from_s ? (xg && !yg) : from_n ? (xg && !yl) : (xg && ye);
        to_n = from_s ? (xe && yl) : yl;
        to_w = from_s ? (xl && !yg) : from_n ? (xl && !yl) : (xl && ye);
        to_s = from_n ? (xe && yg) : yg;
      end
      default: begin  // RT_XY (RT_DT never reaches this block)
        to_e = xg;
        to_n = xe && yl;
        to_w = xl;
        to_s = xe && yg;
      end
    endcase

    route = '0;
    route[P_N]  = to_n;
    route[P_W]  = to_w;
    route[P_S]  = to_s;
    route[P_E]  = to_e;
    route[P_PE] = to_pe;
  end

endmodule
