// tb_fpga_under_test: drives the 4 x 4 device model only through TMS and TDI,
// as a tester would: reset the TAP, shift a vector in, Update-DR, wait N/2+2
// cycles in Run-Test/Idle, Capture-DR, and shift the next scan. The response
// bits of every line must come out of TDO in order and equal the fault-free
// line response of the configuration, for all vectors, all configurations
// and both orientations.
module tb_fpga_under_test;
  import rtdp_pkg::*;
  localparam int unsigned N = 4;
  logic clk = 0, trst_n = 0, tms = 1, tdi = 0, tdo;
  logic vertical = 0, ec = 1, sr = 0;
  clb_cfg_t cfg;
  int checks = 0, failures = 0;

  fpga_under_test #(.N(N)) dut (.clk(clk), .trst_n(trst_n), .tms(tms), .tdi(tdi), .tdo(tdo),
    .cfg(cfg), .vertical(vertical), .ec(ec), .sr(sr),
    .inj_en(1'b0), .inj_row('0), .inj_col('0), .inj_line(2'd0), .inj_val(1'b0));
  always #5 clk = ~clk;

  task automatic tck(input logic m, input logic d = 1'b0);
    tms = m; tdi = d;
    @(negedge clk);
  endtask

  // From Run-Test/Idle: Select, Capture, Shift (checking TDO against exp
  // when chk), Exit1, Update, back to Run-Test/Idle for `w` cycles.
  task automatic scan(input vec_t nxt, input vec_t exp, input bit chk, input int w);
    int unsigned cpl, len;
    cpl = vertical ? CPL_V : CPL_H;
    len = IN_CELLS + cpl * N;
    tck(1); tck(0); tck(0);  // RTI -> Select -> Capture -> Shift
    for (int j = 0; j < len; j++) begin
      logic d;
      d = (j >= cpl * N) ? nxt[(j - cpl * N) % 4] : 1'b0;
      if (chk && j < cpl * N) begin
        int b;
        b = j % cpl;
        checks++;
        if (tdo !== ((b < 4) ? exp[b % 4] : 1'b0)) begin
          failures++; $display("FAIL v=%0d line %0d cell %0d", vertical, j / cpl, b);
        end
      end
      tck(j == len - 1, d);
    end
    tck(1); tck(0);          // Exit1 -> Update -> RTI
    repeat (w - 1) tck(0);
  endtask

  initial begin
    cfg = cfg_table(3'd0);
    repeat (2) @(negedge clk);
    trst_n = 1;
    repeat (5) tck(1);
    tck(0);                  // Run-Test/Idle
    for (int o = 0; o < 2; o++) begin
      vertical = 1'(o);
      for (int k = 0; k < N_CONFIGS; k++) begin
        vec_t prev;
        cfg = cfg_table(3'(k));
        scan(4'd0, 4'd0, 1'b0, N/2 + 2);
        prev = 4'd0;
        for (int v = 1; v <= 16; v++) begin
          scan(4'(v), line_response(cfg, prev, N), 1'b1, N/2 + 2);
          prev = 4'(v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
