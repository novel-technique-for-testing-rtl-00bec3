// rtdp_pkg: types, constants and reference functions shared by the
// reuse-oriented FPGA test (RTDP) design.
//
// The FPGA under test is an N x N array of XC4000-style CLBs. For the test
// each CLB is given one of seven internal configurations (the same for every
// CLB of the array) and the CLBs are chained into N one-dimensional iterative
// logic arrays (ILAs), either horizontally (rows) or vertically (columns).
// Every CLB passes four independent signals ("lines" L0..L3) to the next CLB:
//   L0 <- XQ, L1 <- YQ   (clocked outputs of the previous CLB)
//   L2 <- X,  L3 <- Y    (combinational outputs of the previous CLB)
// so a clocked output always feeds a combinational path of the next CLB and
// the other way round; a signal crosses one flip-flop every two CLBs and the
// latency of a line of N CLBs is N/2 clocks.
//
// The document fixes the number of configurations (7), vectors (16), the
// LUT functions used (transparent, NOT, EXOR), the rule that the four
// independent inputs travel on independent paths and that one configuration
// has G' and H' as EXOR and F' transparent. The exact seven configurations
// below are this design's own choice following those rules: over the seven
// entries every LUT input is made transparent, each LUT is used both
// transparent and inverting, and every input of the X/Y output multiplexers
// and of the two flip-flop data multiplexers is selected at least once.
// H' reads H1 in every configuration, G' in the EXOR configuration (5) and
// F' in configuration 4 (H' = F' ^ H1), so each of its address lines is
// exercised and every pair of its cells is once driven to different values,
// which exposes a bridge between them. The one multiplexer input never
// selected is DIN from C1/C2: those pins carry the clocked lines L0/L1, and
// the equal-delay rule sends those to combinational paths only.
package rtdp_pkg;

  // Array size of the XC4013 used in the document (24 x 24 = 576 CLBs).
  localparam int unsigned N_DEFAULT     = 24;
  localparam int unsigned N_CONFIGS     = 7;   // CLB configurations per array
  localparam int unsigned N_VECTORS     = 16;  // exhaustive 4-bit test set
  localparam int unsigned VEC_W         = 4;   // independent inputs per CLB
  localparam int unsigned IN_CELLS      = 12;  // CLB inputs driven per line
  localparam int unsigned CPL_H         = 6;   // scan cells per row (6 x N)
  localparam int unsigned CPL_V         = 12;  // scan cells per column (2 x 6 x N)
  localparam int unsigned SR_EC_CONFIGS = 4;   // configurations with S/R and EC extraction

  typedef logic [VEC_W-1:0] vec_t;

  // Flip-flop data source (XC4000 D-input multiplexer).
  typedef enum logic [1:0] {D_DIN = 2'd0, D_F = 2'd1, D_G = 2'd2, D_H = 2'd3} dsel_e;

  // Internal configuration of one CLB.
  //  f_lut/g_lut : truth tables of F' and G', address {F4,F3,F2,F1}
  //  h_lut       : truth table of H', address {H1,G',F'}
  //  h1_sel      : which of C1..C4 is H1
  //  din_sel     : which of C1..C4 is DIN
  //  x_h, y_h    : X (Y) output takes H' instead of F' (G')
  //  dx, dy      : D source of the X and Y flip-flops
  //  ec_x, ec_y  : flip-flop honours the EC input (otherwise always enabled)
  //  set_x,set_y : S/R sets (1) or resets (0) the flip-flop
  typedef struct packed {
    logic [15:0] f_lut;
    logic [15:0] g_lut;
    logic [7:0]  h_lut;
    logic [1:0]  h1_sel;
    logic [1:0]  din_sel;
    logic        x_h;
    logic        y_h;
    dsel_e       dx;
    dsel_e       dy;
    logic        ec_x;
    logic        ec_y;
    logic        set_x;
    logic        set_y;
  } clb_cfg_t;

  // The seven CLB configurations (see the header comment).
  function automatic clb_cfg_t cfg_table(input logic [2:0] idx);
    clb_cfg_t c;
    c = '0;
    unique case (idx)
      // F' = F1, G' = G2 to X/Y; H' = H1(C3) -> FFX; DIN(C4) -> FFY
      3'd0: c = '{f_lut: 16'hAAAA, g_lut: 16'hCCCC, h_lut: 8'hF0, h1_sel: 2'd2, din_sel: 2'd3,
                  x_h: 1'b0, y_h: 1'b0, dx: D_H, dy: D_DIN, ec_x: 1'b1, ec_y: 1'b1,
                  set_x: 1'b0, set_y: 1'b0};
      // NOT functions: F' = ~F1, G' = ~G2; H' = ~H1(C4) -> FFY; DIN(C3) -> FFX
      3'd1: c = '{f_lut: 16'h5555, g_lut: 16'h3333, h_lut: 8'h0F, h1_sel: 2'd3, din_sel: 2'd2,
                  x_h: 1'b0, y_h: 1'b0, dx: D_DIN, dy: D_H, ec_x: 1'b1, ec_y: 1'b1,
                  set_x: 1'b1, set_y: 1'b1};
      // F' = F4 -> FFY; DIN(C3) -> FFX; H' = H1(C2) -> X; G' = G1 -> Y
      3'd2: c = '{f_lut: 16'hFF00, g_lut: 16'hAAAA, h_lut: 8'hF0, h1_sel: 2'd1, din_sel: 2'd2,
                  x_h: 1'b1, y_h: 1'b0, dx: D_DIN, dy: D_F, ec_x: 1'b1, ec_y: 1'b1,
                  set_x: 1'b0, set_y: 1'b1};
      // F' = F3 -> FFX; DIN(C4) -> FFY; H' = H1(C1) -> X; G' = G2 -> Y
      3'd3: c = '{f_lut: 16'hF0F0, g_lut: 16'hCCCC, h_lut: 8'hF0, h1_sel: 2'd0, din_sel: 2'd3,
                  x_h: 1'b1, y_h: 1'b0, dx: D_F, dy: D_DIN, ec_x: 1'b1, ec_y: 1'b1,
                  set_x: 1'b1, set_y: 1'b0};
      // G' = G4 -> FFY; DIN(C3) -> FFX; H' = F'^H1(C2) -> Y; F' = F1 -> X
      // (the only configuration in which H' reads F')
      3'd4: c = '{f_lut: 16'hAAAA, g_lut: 16'hFF00, h_lut: 8'h5A, h1_sel: 2'd1, din_sel: 2'd2,
                  x_h: 1'b0, y_h: 1'b1, dx: D_DIN, dy: D_G, ec_x: 1'b0, ec_y: 1'b0,
                  set_x: 1'b0, set_y: 1'b0};
      // EXOR configuration for the H' decoder: G' = G1^G2 -> Y,
      // H' = G'^H1(C2) -> X, F' = F3 (transparent) -> FFX, DIN(C4) -> FFY
      3'd5: c = '{f_lut: 16'hF0F0, g_lut: 16'h6666, h_lut: 8'h3C, h1_sel: 2'd1, din_sel: 2'd3,
                  x_h: 1'b1, y_h: 1'b0, dx: D_F, dy: D_DIN, ec_x: 1'b0, ec_y: 1'b0,
                  set_x: 1'b0, set_y: 1'b0};
      // G' = G3 -> FFX; DIN(C4) -> FFY; F' = ~F2 -> X; H' = ~H1(C1) -> Y
      default: c = '{f_lut: 16'h3333, g_lut: 16'hF0F0, h_lut: 8'h0F, h1_sel: 2'd0, din_sel: 2'd3,
                  x_h: 1'b0, y_h: 1'b1, dx: D_G, dy: D_DIN, ec_x: 1'b0, ec_y: 1'b0,
                  set_x: 1'b0, set_y: 1'b0};
    endcase
    return c;
  endfunction

  // Steady-state map of one fault-free CLB: the lines {L3,L2,L1,L0} it hands
  // to the next CLB when its own lines are held at `l`.
  function automatic vec_t clb_map(input clb_cfg_t c, input vec_t l);
    logic f, g, h1, din, h, x, y, dxv, dyv;
    f   = c.f_lut[l];
    g   = c.g_lut[l];
    h1  = l[c.h1_sel];
    din = l[c.din_sel];
    h   = c.h_lut[{h1, g, f}];
    x   = c.x_h ? h : f;
    y   = c.y_h ? h : g;
    unique case (c.dx)
      D_DIN: dxv = din;
      D_F:   dxv = f;
      D_G:   dxv = g;
      default: dxv = h;
    endcase
    unique case (c.dy)
      D_DIN: dyv = din;
      D_F:   dyv = f;
      D_G:   dyv = g;
      default: dyv = h;
    endcase
    return {y, x, dyv, dxv};
  endfunction

  // Fault-free response of a line of n CLBs to vector v: the lines that the
  // last CLB would pass on, {Y, X, YQ, XQ}.
  function automatic vec_t line_response(input clb_cfg_t c, input vec_t v, input int unsigned n);
    vec_t l;
    l = v;
    for (int unsigned i = 0; i < n; i++) l = clb_map(c, l);
    return l;
  endfunction

  // Response right after the global S/R: the last CLB's flip-flops hold
  // their set/reset values and its combinational outputs are driven by the
  // set/reset values of the CLB before it.
  function automatic vec_t sr_response(input clb_cfg_t c);
    vec_t l;
    l = {2'b00, c.set_y, c.set_x};
    l = clb_map(c, l);
    return {l[3:2], c.set_y, c.set_x};
  endfunction

endpackage
