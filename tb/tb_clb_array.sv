// tb_clb_array: a 6 x 6 array in each of the seven configurations, both
// orientations. A vector held on the input cells must reach the end of every
// line after N/2 clocks with the value of a chain of six fault-free CLBs
// (worked out here from the configuration's truth tables), for all 16
// vectors. With one CLB output forced, only that CLB's line may change.
// Global S/R must put every last flip-flop at its set/reset value.
module tb_clb_array;
  import rtdp_pkg::*;
  localparam int unsigned N = 6;
  logic clk = 0, vertical = 0, ec = 1, sr = 0, inj_en = 0, inj_val = 0;
  clb_cfg_t cfg;
  logic [IN_CELLS-1:0] vec_in;
  logic [2:0] inj_row = 0, inj_col = 0;
  logic [1:0] inj_line = 0;
  vec_t resp_h [N];
  vec_t resp_v [N];
  int checks = 0, failures = 0;

  clb_array #(.N(N)) dut (.clk(clk), .cfg(cfg), .vertical(vertical), .vec_in(vec_in), .ec(ec), .sr(sr),
    .inj_en(inj_en), .inj_row(inj_row), .inj_col(inj_col), .inj_line(inj_line), .inj_val(inj_val),
    .resp_h(resp_h), .resp_v(resp_v));
  always #5 clk = ~clk;

  // one fault-free CLB in steady state, written from the CLB description
  function automatic vec_t step(input clb_cfg_t c, input vec_t l);
    logic f, g, h1, din, h, dx, dy;
    f = c.f_lut[l]; g = c.g_lut[l];
    h1 = l[c.h1_sel]; din = l[c.din_sel];
    h = c.h_lut[{h1, g, f}];
    dx = (c.dx == D_DIN) ? din : (c.dx == D_F) ? f : (c.dx == D_G) ? g : h;
    dy = (c.dy == D_DIN) ? din : (c.dy == D_F) ? f : (c.dy == D_G) ? g : h;
    return {(c.y_h ? h : g), (c.x_h ? h : f), dy, dx};
  endfunction

  initial begin
    for (int o = 0; o < 2; o++) begin
      vertical = 1'(o);
      for (int k = 0; k < N_CONFIGS; k++) begin
        cfg = cfg_table(3'(k));
        for (int v = 0; v < 16; v++) begin
          vec_t e, got;
          e = 4'(v);
          for (int i = 0; i < N; i++) e = step(cfg, e);
          @(negedge clk);
          vec_in = {3{4'(v)}};
          repeat (N/2) @(negedge clk);
          for (int l = 0; l < N; l++) begin
            got = vertical ? resp_v[l] : resp_h[l];
            checks++;
            if (got !== e) begin failures++; $display("FAIL o=%0d cfg=%0d v=%0d line %0d: %h exp %h", o, k, v, l, got, e); end
          end
        end
      end
    end
    // fault injection: only the faulty CLB's line may differ
    vertical = 0; cfg = cfg_table(3'd0);
    inj_en = 1; inj_row = 3'd2; inj_col = 3'd4; inj_line = 2'd3; inj_val = 1;
    for (int v = 0; v < 16; v++) begin
      @(negedge clk); vec_in = {3{4'(v)}}; repeat (N) @(negedge clk);
      for (int l = 0; l < N; l++) if (l != 2) begin
        checks++;
        if (resp_h[l] !== 4'(v)) begin failures++; $display("FAIL healthy row %0d disturbed", l); end
      end
    end
    vertical = 1;
    for (int v = 0; v < 16; v++) begin
      @(negedge clk); vec_in = {3{4'(v)}}; repeat (N) @(negedge clk);
      if (v == 0) begin
        checks++;
        if (resp_v[4] === 4'(v)) begin failures++; $display("FAIL faulty column not disturbed"); end
      end
    end
    inj_en = 0;
    // global S/R with EC low
    for (int k = 0; k < 4; k++) begin
      cfg = cfg_table(3'(k));
      ec = 0; sr = 1; @(negedge clk);
      for (int l = 0; l < N; l++) begin
        checks++;
        if (resp_v[l][1:0] !== {cfg.set_y, cfg.set_x}) begin failures++; $display("FAIL S/R cfg %0d", k); end
      end
      sr = 0; ec = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
