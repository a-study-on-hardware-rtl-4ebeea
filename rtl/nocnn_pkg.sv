// nocnn_pkg: types and constants shared by the NoC neural processor.
//
// A flit is 34 bits: a 2-bit flit type (FT) on top and 32 bits below it.
// A payload carries one 32-bit fixed-point neuron output (1 sign bit,
// 6 integer bits, 25 fraction bits, range [-64,64)). A header carries
// VCN (1 bit), UN (4 bits, mask of the neurons whose outputs follow as
// payloads), PCI (15 bits, PE control information) and four 3-bit
// destination addresses DA0..DA3, one output port per hop (DT routing).
// The field widths follow the published packet format; the bit positions,
// the FT codes and the meaning given to PCI are this design's choices.
// With absolute-address routing the DA field instead holds the x and y
// coordinates of the destination tile.
package nocnn_pkg;

  localparam int unsigned FLIT_W  = 34;
  localparam int unsigned DATA_W  = 32;
  localparam int unsigned FRAC_W  = 25;
  localparam int unsigned NPORT   = 5;
  localparam int unsigned NVC     = 2;
  localparam int unsigned NNEUR   = 4;

  typedef logic [FLIT_W-1:0] flit_t;
  typedef logic signed [DATA_W-1:0] fix_t;

  // flit type codes, bits [33:32]
  typedef enum logic [1:0] {
    FT_DUMMY = 2'b00,
    FT_HEAD  = 2'b10,
    FT_PAY   = 2'b11
  } ft_e;

  // router ports; a DT destination address is the port number
  typedef enum logic [2:0] {
    P_N  = 3'd0,
    P_W  = 3'd1,
    P_S  = 3'd2,
    P_E  = 3'd3,
    P_PE = 3'd4
  } port_e;

  // routing strategy of a router
  typedef enum logic [2:0] {
    RT_DT = 3'd0,   // destination tag: DA0 names the output port, shifted per hop
    RT_XY = 3'd1,   // absolute address, X-Y
    RT_WF = 3'd2,   // absolute address, west-first
    RT_NL = 3'd3,   // absolute address, north-last
    RT_NF = 3'd4,   // absolute address, negative-first
    RT_FA = 3'd5    // absolute address, fully adaptive rule set
  } routing_e;

  // header field positions
  localparam int unsigned H_FT_HI  = 33;
  localparam int unsigned H_VCN    = 31;
  localparam int unsigned H_UN_LO  = 27;
  localparam int unsigned H_PCI_LO = 12;
  localparam int unsigned H_DA_W   = 12;
  localparam int unsigned COORD_W  = 3;   // absolute x / y address width

  // one direction of a link between routers or router and PE
  typedef struct packed {
    logic  valid;
    logic  vc;
    flit_t flit;
  } link_t;

  // PE configuration targets
  typedef enum logic [1:0] {
    CFG_WEIGHT = 2'd0,  // weight RAM of neuron cfg_neuron, word cfg_addr
    CFG_LUT    = 2'd1,  // activation LUT, word cfg_addr
    CFG_HDR    = 2'd2,  // destination header RAM, word cfg_addr
    CFG_REG    = 2'd3   // control register (see nocnn_pe)
  } cfg_sel_e;

  function automatic ft_e flit_type(flit_t f);
    return ft_e'(f[H_FT_HI -: 2]);
  endfunction

  function automatic logic [3:0] hdr_un(flit_t f);
    return f[H_UN_LO +: 4];
  endfunction

  function automatic logic [2:0] popcount4(logic [3:0] m);
    return 3'(m[0]) + 3'(m[1]) + 3'(m[2]) + 3'(m[3]);
  endfunction

  function automatic flit_t make_payload(fix_t d);
    return {FT_PAY, d};
  endfunction

endpackage
