// tb_inoc_route_fn: exhaustive check of the absolute-address routing
// functions. For every algorithm, input port and pair of local/destination
// coordinates in a 5 x 5 grid it checks that exactly one output is chosen,
// that a packet at its destination goes to the PE, that every other choice
// moves the packet one hop closer (minimal routing), that west-first
// routes west whenever the destination lies west, that north-last never
// turns away from north, and that X-Y routing matches its reference
// if/else chain.
module tb_inoc_route_fn;
  import nocnn_pkg::*;

  localparam int NA = 5;
  localparam routing_e ALGOS [NA] = '{RT_XY, RT_WF, RT_NL, RT_NF, RT_FA};

  port_e              in_port;
  logic [COORD_W-1:0] xl, yl, xd, yd;
  logic [NPORT-1:0]   route [NA];
  int checks = 0, failures = 0;

  for (genvar a = 0; a < NA; a++) begin : g_a
    inoc_route_fn #(.ALGO(ALGOS[a])) dut (
      .in_port, .x_loc(xl), .y_loc(yl), .x_des(xd), .y_des(yd), .route(route[a]));
  end

  function automatic logic [NPORT-1:0] xy_ref(int x_l, int y_l, int x_d, int y_d);
    logic [NPORT-1:0] r = '0;
    if (x_d > x_l) r[P_E] = 1;
    else if (x_d < x_l) r[P_W] = 1;
    else if (y_d > y_l) r[P_S] = 1;
    else if (y_d < y_l) r[P_N] = 1;
    else r[P_PE] = 1;
    return r;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: in=%0d loc=(%0d,%0d) des=(%0d,%0d)", what, in_port, xl, yl, xd, yd);
    end
  endtask

  initial begin
    #1;
    for (int p = 0; p < NPORT; p++)
      for (int x0 = 0; x0 < 5; x0++)
        for (int y0 = 0; y0 < 5; y0++)
          for (int x1 = 0; x1 < 5; x1++)
            for (int y1 = 0; y1 < 5; y1++) begin
              in_port = port_e'(p);
              xl = 3'(x0); yl = 3'(y0); xd = 3'(x1); yd = 3'(y1);
              #1;
              for (int a = 0; a < NA; a++) begin
                logic [NPORT-1:0] r;
                int nx, ny;
                r = route[a];
                check($onehot(r), $sformatf("one-hot algo %0d", a));
                nx = x0; ny = y0;
                if (r[P_E]) nx++;
                if (r[P_W]) nx--;
                if (r[P_S]) ny++;
                if (r[P_N]) ny--;
                if (x0 == x1 && y0 == y1) check(r[P_PE], $sformatf("to PE algo %0d", a));
                else check(!r[P_PE] &&
                           ((nx > x1 ? nx - x1 : x1 - nx) + (ny > y1 ? ny - y1 : y1 - ny)) ==
                           ((x0 > x1 ? x0 - x1 : x1 - x0) + (y0 > y1 ? y0 - y1 : y1 - y0)) - 1,
                           $sformatf("minimal algo %0d", a));
              end
              check(route[0] == xy_ref(x0, y0, x1, y1), "XY reference");
              if (x1 < x0) check(route[1][P_W], "west first");
              if (!(x0 == x1 && y0 == y1) && route[2][P_N]) check(x1 == x0, "north last");
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
