// tb_clb: random configurations and random input streams on one CLB. The
// combinational outputs X, Y are recomputed from the truth tables and
// multiplexer settings; the flip-flops are followed with their clock
// enable (when the configuration uses it) and the asynchronous S/R, which
// sets or resets each flip-flop as configured.
module tb_clb;
  import rtdp_pkg::*;
  logic clk = 0, ec = 0, sr = 0;
  clb_cfg_t cfg;
  logic [3:0] f_in, g_in, c_in;
  logic x, y, xq, yq;
  logic mxq, myq;
  int checks = 0, failures = 0;

  clb dut (.clk(clk), .cfg(cfg), .f_in(f_in), .g_in(g_in), .c_in(c_in), .ec(ec), .sr(sr),
           .x(x), .y(y), .xq(xq), .yq(yq));
  always #5 clk = ~clk;

  function automatic logic pick(input logic [1:0] s, input logic din, input logic f, input logic g, input logic h);
    case (s)
      2'd0: return din;
      2'd1: return f;
      2'd2: return g;
      default: return h;
    endcase
  endfunction

  initial begin
    logic ef, eg, eh, eh1, edin, ex, ey, edx, edy;
    cfg = cfg_table(3'd0);
    f_in = '0; g_in = '0; c_in = '0;
    sr = 1; #1;  // set the model and the flip-flops to a known state
    mxq = cfg.set_x; myq = cfg.set_y;
    @(negedge clk); sr = 0;
    for (int t = 0; t < 4000; t++) begin
      if (t % 25 == 0) begin
        cfg = (t % 50 == 0) ? cfg_table(3'(t / 50 % 7)) : clb_cfg_t'({$urandom, $urandom});
      end
      f_in = 4'($urandom); g_in = 4'($urandom); c_in = 4'($urandom);
      ec = 1'($urandom);
      sr = ($urandom % 10) == 0;
      #1;
      ef = cfg.f_lut[f_in]; eg = cfg.g_lut[g_in];
      eh1 = c_in[cfg.h1_sel]; edin = c_in[cfg.din_sel];
      eh = cfg.h_lut[{eh1, eg, ef}];
      ex = cfg.x_h ? eh : ef; ey = cfg.y_h ? eh : eg;
      edx = pick(cfg.dx, edin, ef, eg, eh); edy = pick(cfg.dy, edin, ef, eg, eh);
      if (sr) begin mxq = cfg.set_x; myq = cfg.set_y; end
      checks++;
      if (x !== ex || y !== ey || xq !== mxq || yq !== myq) begin
        failures++;
        $display("FAIL t=%0d x=%b/%b y=%b/%b xq=%b/%b yq=%b/%b", t, x, ex, y, ey, xq, mxq, yq, myq);
      end
      @(posedge clk);
      if (!sr) begin
        if (ec || !cfg.ec_x) mxq = edx;
        if (ec || !cfg.ec_y) myq = edy;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
