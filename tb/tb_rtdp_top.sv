// tb_rtdp_top: end-to-end test of the reuse-oriented test procedure at the
// default array size (24 x 24 CLBs).
//
// Five runs of the whole procedure:
//   1. test and diagnosis (14 sessions) on a fault-free array: no line may be
//      flagged and the total cycle count must match the scan schedule;
//   2. test and diagnosis with one CLB output stuck at 1: exactly that CLB's
//      row and column must be flagged;
//   3. test only (7 horizontal sessions) with another CLB output stuck at 0:
//      only its row is flagged, no column;
//   4. test only with the device's EC line stuck at 1: every row must fail,
//      and the first EC extraction must see the early response.
//   5. test only with the EC line stuck at 0: every row must fail.
// Throughout, the time between two vector applications in a normal scan is
// checked against 12 + 3 + N/2 + 3 + 6N clocks (rows) and
// 12 + 3 + N/2 + 3 + 12N (columns), and the test counts how often each
// mechanism happened: S/R extraction, EC extraction, vertical arrays, the
// NOT and EXOR configurations, fault detection. One that never happens is a
// failure.
module tb_rtdp_top;
  import rtdp_pkg::*;

  localparam int unsigned N  = N_DEFAULT;
  localparam int unsigned LW = $clog2(N);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0, diagnose = 1'b0;
  logic inj_en = 1'b0, inj_val = 1'b0;
  logic [LW-1:0] inj_row = '0, inj_col = '0;
  logic [1:0] inj_line = '0;
  logic busy, done, fail, sr_ext, ec_ext, vertical, tms, tdi, tdo;
  logic [N-1:0] row_fault, col_fault;

  int checks = 0, failures = 0;
  int n_detect_ec = 0, n_ec1_fail = 0;
  int n_sr = 0, n_ec = 0, n_vert = 0, n_not = 0, n_xor = 0, n_detect = 0, n_period = 0;

  rtdp_top dut (
    .clk (clk), .rst_n (rst_n), .start (start), .diagnose (diagnose),
    .inj_en (inj_en), .inj_row (inj_row), .inj_col (inj_col),
    .inj_line (inj_line), .inj_val (inj_val),
    .busy (busy), .done (done), .fail (fail),
    .row_fault (row_fault), .col_fault (col_fault),
    .sr_ext (sr_ext), .ec_ext (ec_ext), .vertical (vertical),
    .tms (tms), .tdi (tdi), .tdo (tdo)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // scan schedule worked out from the procedure: per session 16 vector
  // scans and one load scan, or, in the first four configurations, N S/R
  // extractions (the first with a full wait, the others with one step) and
  // two EC extractions (waits N - 2 and 2)
  function automatic longint expected_cycles(input bit diag);
    longint t = 0;
    int unsigned lh = IN_CELLS + CPL_H*N, lv = IN_CELLS + CPL_V*N;
    for (int o = 0; o < (diag ? 2 : 1); o++)
      for (int c = 0; c < N_CONFIGS; c++) begin
        int unsigned l = (o == 0) ? lh : lv;
        if (c < SR_EC_CONFIGS)
          t += 17 * (N/2 + 2 + 4 + l) + (N - 1) * (1 + 4 + l) + (N - 2 + 4 + l) + (2 + 4 + l);
        else
          t += 17 * (N/2 + 2 + 4 + l);
      end
    return t;
  endfunction

  // vector period in normal scans
  longint cyc = 0, last_apply = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (busy && dut.u_tester.u_ctrl.apply) begin
      if (last_apply >= 0 && dut.u_tester.u_ctrl.vec_phase &&
          dut.u_tester.u_ctrl.scan != dut.u_tester.u_ctrl.n_pre) begin
        automatic longint want = 12 + 3 + N/2 + 3 + (vertical ? CPL_V : CPL_H) * N;
        n_period++;
        if (cyc - last_apply != want) begin
          failures++;
          $display("FAIL: vector period %0d, expected %0d (cfg %0d scan %0d v %0d)", cyc - last_apply, want,
                   dut.u_tester.cfg_idx, dut.u_tester.u_ctrl.scan, vertical);
        end
      end
      last_apply <= cyc;
    end
    if (busy && dut.u_tester.u_ctrl.st == 3'd3) begin  // Capture-DR
      if (sr_ext) n_sr++;
      if (ec_ext) n_ec++;
      if (vertical) n_vert++;
      if (dut.u_tester.cfg_idx == 3'd1 || dut.u_tester.cfg_idx == 3'd6) n_not++;
      if (dut.u_tester.cfg_idx == 3'd5) n_xor++;
    end
    if (dut.u_tester.u_diag.word_ready && dut.u_tester.u_diag.check && dut.u_tester.u_cmp.fault) begin
      n_detect++;
      if (dut.u_tester.ec_first) n_ec1_fail++;
    end
  end

  task automatic run(input bit diag, output longint cycles);
    longint t0;
    @(negedge clk);
    diagnose = diag;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = cyc;
    while (!done) @(negedge clk);
    cycles = cyc - t0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    longint cycles;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;

    // 1. fault-free, test and diagnosis
    run(1'b1, cycles);
    $display("run 1: %0d cycles (expected %0d)", cycles, expected_cycles(1'b1));
    check(!fail, "fault-free array reported a fault");
    check(row_fault == '0 && col_fault == '0, "fault-free array: lines flagged");
    check(cycles == expected_cycles(1'b1), "run 1 cycle count");

    // 2. X output of CLB (5,9) stuck at 1, test and diagnosis
    inj_en = 1'b1; inj_row = LW'(5); inj_col = LW'(9); inj_line = 2'd2; inj_val = 1'b1;
    run(1'b1, cycles);
    check(fail, "stuck-at-1 not detected");
    check(row_fault == (N'(1) << 5), $sformatf("run 2 rows %h", row_fault));
    check(col_fault == (N'(1) << 9), $sformatf("run 2 cols %h", col_fault));

    // 3. XQ output of CLB (2,3) stuck at 0, test only
    inj_row = LW'(2); inj_col = LW'(3); inj_line = 2'd0; inj_val = 1'b0;
    run(1'b0, cycles);
    $display("run 3: %0d cycles (expected %0d)", cycles, expected_cycles(1'b0));
    check(fail, "stuck-at-0 not detected");
    check(row_fault == (N'(1) << 2), $sformatf("run 3 rows %h", row_fault));
    check(col_fault == '0, "test-only run flagged a column");
    check(cycles == expected_cycles(1'b0), "run 3 cycle count");

    // 4. EC line stuck at 1 in the device, test only: caught by the timing
    //    of the EC extraction and by the S/R extractions
    inj_en = 1'b0;
    force dut.u_fpga.ec = 1'b1;
    n_detect_ec = n_detect;
    run(1'b0, cycles);
    release dut.u_fpga.ec;
    check(fail, "EC stuck at 1 not detected");
    check(row_fault == '1, "EC stuck at 1 must fail every row");
    check(n_ec1_fail > 0, "EC stuck at 1 not seen by the first EC extraction");

    // 5. EC line stuck at 0, test only: the flip-flops that honour EC never
    //    load, so every row fails in configurations 0..3
    force dut.u_fpga.ec = 1'b0;
    run(1'b0, cycles);
    release dut.u_fpga.ec;
    check(fail, "EC stuck at 0 not detected");
    check(row_fault == '1, "EC stuck at 0 must fail every row");

    $display("mechanisms: sr=%0d ec=%0d vertical=%0d not=%0d xor=%0d detect=%0d period=%0d",
             n_sr, n_ec, n_vert, n_not, n_xor, n_detect, n_period);
    check(n_sr > 0, "no S/R extraction");
    check(n_ec > 0, "no EC extraction");
    check(n_vert > 0, "no vertical array");
    check(n_not > 0, "no NOT configuration");
    check(n_xor > 0, "no EXOR configuration");
    check(n_detect > 0, "no fault detection");
    check(n_period > 0, "no vector period measured");
    checks += n_period;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
