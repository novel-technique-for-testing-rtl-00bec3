// tb_cfg_coverage: fault coverage of the seven test configurations on one
// CLB. A fault-free CLB and a faulty copy get the same inputs: in each of
// the seven configurations the 16 vectors, each applied as {L3..L0} to the
// F, G and C groups and clocked once with EC high. A fault is detected when
// X, Y, XQ or YQ of the two differ for some vector. In the array the other
// CLBs of a line pass any difference on, since every configuration maps the
// four lines one-to-one, so detection here means detection by the test.
//
// The faults are those of the procedure's fault set that a configuration
// change can express: every LUT cell stuck at 0 and at 1 (F', G', H'),
// every AND and OR bridge between two cells of one LUT, and every select
// bit of the H1, DIN, X, Y and flip-flop data multiplexers stuck at 0 and
// at 1. Each must be detected, except the DIN select bit 1 stuck at 1: DIN
// is always taken from C3/C4 (see rtdp_pkg), so that fault is expected to
// escape, and the testbench checks that it does. The fault-free CLB is also
// compared with rtdp_pkg::clb_map.
module tb_cfg_coverage;
  import rtdp_pkg::*;

  localparam int unsigned N_SA   = 2 * (16 + 16 + 8);
  localparam int unsigned N_BF   = 2 * (120 + 120 + 28);
  localparam int unsigned N_SEL  = 2 * 10;
  localparam int unsigned N_FLT  = N_SA + N_BF + N_SEL;
  localparam int unsigned ESCAPE = N_SA + N_BF + 2 * 3 + 1;  // din_sel[1] stuck at 1

  logic clk = 1'b0, sr = 1'b0;
  clb_cfg_t cfg_ok, cfg_bad;
  vec_t v;
  logic x0, y0, xq0, yq0, x1, y1, xq1, yq1;
  int checks = 0, failures = 0, n_det = 0;

  clb u_ok  (.clk(clk), .cfg(cfg_ok),  .f_in(v), .g_in(v), .c_in(v), .ec(1'b1), .sr(sr),
             .x(x0), .y(y0), .xq(xq0), .yq(yq0));
  clb u_bad (.clk(clk), .cfg(cfg_bad), .f_in(v), .g_in(v), .c_in(v), .ec(1'b1), .sr(sr),
             .x(x1), .y(y1), .xq(xq1), .yq(yq1));

  always #5 clk = ~clk;

  // a bridge between cells a and b: both read the AND (or the OR) of the two
  function automatic logic [15:0] bridge(input logic [15:0] t, input int a, input int b, input bit is_or);
    logic val;
    val = is_or ? (t[a] | t[b]) : (t[a] & t[b]);
    t[a] = val;
    t[b] = val;
    return t;
  endfunction

  // the k-th pair (a, b), a < b, of w cells
  function automatic void pair(input int w, input int k, output int a, output int b);
    int n = 0;
    a = 0; b = 1;
    for (int i = 0; i < w; i++)
      for (int j = i + 1; j < w; j++) begin
        if (n == k) begin a = i; b = j; end
        n++;
      end
  endfunction

  // configuration c with fault number id applied
  function automatic clb_cfg_t inject(input clb_cfg_t c, input int id);
    int a, b, k;
    logic [1:0] s;
    logic [15:0] t;
    if (id < N_SA) begin
      k = id / 2;
      if (k < 16)      c.f_lut[k]      = 1'(id % 2);
      else if (k < 32) c.g_lut[k - 16] = 1'(id % 2);
      else             c.h_lut[k - 32] = 1'(id % 2);
    end else if (id < N_SA + N_BF) begin
      k = (id - N_SA) / 2;
      if (k < 120) begin
        pair(16, k, a, b);
        c.f_lut = bridge(c.f_lut, a, b, bit'(id % 2));
      end else if (k < 240) begin
        pair(16, k - 120, a, b);
        c.g_lut = bridge(c.g_lut, a, b, bit'(id % 2));
      end else begin
        pair(8, k - 240, a, b);
        t = bridge({8'h00, c.h_lut}, a, b, bit'(id % 2));
        c.h_lut = t[7:0];
      end
    end else begin
      // select bits: h1_sel[0..1], din_sel[0..1], x_h, y_h, dx[0..1], dy[0..1]
      k = (id - N_SA - N_BF) / 2;
      unique case (k)
        0, 1: c.h1_sel[k]      = 1'(id % 2);
        2, 3: c.din_sel[k - 2] = 1'(id % 2);
        4:    c.x_h            = 1'(id % 2);
        5:    c.y_h            = 1'(id % 2);
        6, 7: begin s = c.dx; s[k - 6] = 1'(id % 2); c.dx = dsel_e'(s); end
        default: begin s = c.dy; s[k - 8] = 1'(id % 2); c.dy = dsel_e'(s); end
      endcase
    end
    return c;
  endfunction

  initial begin
    bit det;
    v = '0;
    cfg_ok = cfg_table(3'd0);
    cfg_bad = cfg_ok;
    for (int id = 0; id < N_FLT; id++) begin
      det = 1'b0;
      for (int ci = 0; ci < N_CONFIGS; ci++) begin
        for (int vi = 0; vi < N_VECTORS; vi++) begin
          @(negedge clk);
          cfg_ok  = cfg_table(3'(ci));
          cfg_bad = inject(cfg_ok, id);
          v = vec_t'(vi);
          @(posedge clk);
          #1;
          if ({y1, x1, yq1, xq1} != {y0, x0, yq0, xq0}) det = 1'b1;
          if (id == 0) begin
            checks++;
            if ({y0, x0, yq0, xq0} != clb_map(cfg_ok, v)) begin
              failures++;
              $display("FAIL: cfg %0d vector %0d: CLB %b, clb_map %b", ci, vi,
                       {y0, x0, yq0, xq0}, clb_map(cfg_ok, v));
            end
          end
        end
      end
      checks++;
      if (det) n_det++;
      if (det != (id != ESCAPE)) begin
        failures++;
        $display("FAIL: fault %0d %s", id, det ? "detected, expected to escape" : "not detected");
      end
    end
    $display("faults: %0d, detected: %0d", N_FLT, n_det);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_FLT * N_CONFIGS * N_VECTORS + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
