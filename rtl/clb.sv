// clb: model of an XC4000-style configurable logic block as used by the
// reuse-oriented test.
//
// Three function generators: F' and G' (4-input LUTs on F1..F4 and G1..G4)
// and H' (3-input LUT on F', G' and H1). The X output is F' or H', the Y
// output G' or H'. Two D flip-flops (XQ, YQ) take their data from DIN, F',
// G' or H'; they share the clock, a clock enable EC and a set/reset S/R that
// each flip-flop may use as an asynchronous set or reset. H1 and DIN are
// chosen among the four C inputs. All of this follows the block description
// of the CLB; the carry logic, excluded from the fault set, is not modelled.
//
// Design choices: the clock is the single rising-edge system clock (the
// clock-inversion multiplexer is not modelled); EC and S/R enter as separate
// pins (`ec`, `sr`) rather than through the C inputs, because the test
// distributes both globally; S/R is active high. Configuration is the
// parallel `cfg` struct (see rtdp_pkg), constant during operation.
//
// Timing: X and Y are combinational from the inputs; XQ and YQ change on the
// rising clock edge when enabled, or at once while `sr` is high.
module clb
  import rtdp_pkg::*;
(
  input  logic     clk,
  input  clb_cfg_t cfg,
  input  logic [3:0] f_in,  // F1..F4 (bit 0 = F1)
  input  logic [3:0] g_in,  // G1..G4
  input  logic [3:0] c_in,  // C1..C4
  input  logic     ec,      // clock enable
  input  logic     sr,      // set/reset, asynchronous, active high
  output logic     x,
  output logic     y,
  output logic     xq,
  output logic     yq
);
  logic f, g, h, h1, din, dx, dy;

  lut #(.K(4)) u_f (.cells(cfg.f_lut), .addr(f_in),       .out(f));
  lut #(.K(4)) u_g (.cells(cfg.g_lut), .addr(g_in),       .out(g));
  lut #(.K(3)) u_h (.cells(cfg.h_lut), .addr({h1, g, f}), .out(h));

  assign h1  = c_in[cfg.h1_sel];
  assign din = c_in[cfg.din_sel];
  assign x   = cfg.x_h ? h : f;
  assign y   = cfg.y_h ? h : g;

  always_comb begin
    unique case (cfg.dx)
      D_DIN:   dx = din;
      D_F:     dx = f;
      D_G:     dx = g;
      default: dx = h;
    endcase
    unique case (cfg.dy)
      D_DIN:   dy = din;
      D_F:     dy = f;
      D_G:     dy = g;
      default: dy = h;
    endcase
  end

  always_ff @(posedge clk or posedge sr) begin
    if (sr)                     xq <= cfg.set_x;
    else if (ec || !cfg.ec_x)   xq <= dx;
  end

  always_ff @(posedge clk or posedge sr) begin
    if (sr)                     yq <= cfg.set_y;
    else if (ec || !cfg.ec_y)   yq <= dy;
  end
endmodule
