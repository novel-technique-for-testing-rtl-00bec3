// tb_rtdp_controller: runs the sequencer for a 4 x 4 array, with a reference
// TAP state machine following its TMS output. Checked: the TAP is in
// Shift-DR exactly when the controller shifts; every scan has CPL*N analysed
// bits then 12 TDI bits; S/R is high only in the S/R scans and only before
// Shift-DR; in S/R extractions EC gives exactly one step per extraction
// and in the two EC extractions N/2 - 1 and then N/2 steps in all; EC is high
// everywhere else; the session and scan counts for test
// only and for test and diagnosis; each vector period against
// 12 + 3 + N/2 + 3 + CPL*N; the total cycle count.
module tb_rtdp_controller;
  import rtdp_pkg::*;
  localparam int unsigned N = 4;
  logic clk = 0, rst_n = 0, start = 0, diagnose = 0;
  logic tms, vertical, ec, sr, gen_clr, load, apply, tdi_shift, analyse, line_clr, check;
  logic sr_ext, ec_ext, ec_first, busy, done;
  logic [$clog2(N)-1:0] sr_k;
  logic [2:0] cfg_idx;
  int checks = 0, failures = 0;
  int tap;  // reference TAP state: 0 TLR 1 RTI 2 SelDR 3 CapDR 4 ShDR 5 Ex1 8 Upd (others unused)
  int n_an, n_ti, n_apply, n_sr, n_ec, n_sessions, n_steps = 0, n_ec_steps = 0;
  longint cyc, last_apply;

  rtdp_controller #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .start(start), .diagnose(diagnose),
    .tms(tms), .cfg_idx(cfg_idx), .vertical(vertical), .ec(ec), .sr(sr), .gen_clr(gen_clr),
    .load(load), .apply(apply), .tdi_shift(tdi_shift), .analyse(analyse), .line_clr(line_clr),
    .check(check), .sr_ext(sr_ext), .sr_k(sr_k), .ec_ext(ec_ext), .ec_first(ec_first), .busy(busy), .done(done));
  always #5 clk = ~clk;

  task automatic fail(input string s);
    failures++; $display("FAIL %s (cycle %0d)", s, cyc);
  endtask

  always @(posedge clk) if (rst_n) begin
    int cpl;
    cpl = vertical ? CPL_V : CPL_H;
    cyc <= cyc + 1;
    // reference TAP
    case (tap)
      0: tap <= tms ? 0 : 1;
      1: tap <= tms ? 2 : 1;
      2: tap <= tms ? 9 : 3;
      3: tap <= tms ? 5 : 4;
      4: tap <= tms ? 5 : 4;
      5: tap <= tms ? 8 : 6;
      8: tap <= tms ? 2 : 1;
      default: fail("TAP left the data-register path");
    endcase
    checks++;
    if ((tap == 4) != (analyse || tdi_shift)) fail("shift strobes out of Shift-DR");
    if (analyse && tdi_shift) fail("analyse and tdi_shift together");
    if (tap == 3 && !load) fail("no load in Capture-DR");
    if ((tap == 8) != apply) fail("apply not in Update-DR");
    if (sr && !(sr_ext && sr_k == 0 && (tap == 1 || tap == 2 || tap == 3))) fail("S/R outside its window");
    if (!ec && !(ec_ext || sr_ext)) fail("EC low outside the S/R and EC extractions");
    if (ec && sr_ext && !(tap == 1 && sr_k != 0)) fail("EC high in an S/R extraction outside its step");
    if (ec && ec_ext && tap != 1) fail("EC high in an EC extraction outside the wait");
    if (tap == 1 && (sr_ext || ec_ext)) begin
      if (ec) n_steps++;
    end
    if (tap == 3 && sr_ext && sr_k != 0 && n_steps != 1) fail("S/R extraction without exactly one step");
    if (tap == 3 && ec_ext) begin
      n_ec_steps += n_steps;
      if (ec_first && n_ec_steps != N/2 - 1) fail("first EC extraction: wrong number of steps");
      if (!ec_first && n_ec_steps != N/2) fail("second EC extraction: wrong number of steps");
    end
    if (tap == 3) n_steps = 0;
    if (tap == 3 && sr_ext && sr_k == 0) n_ec_steps = 0;
    if (analyse) n_an++;
    if (tdi_shift) begin
      n_ti++;
      if (n_an != cpl * N) fail("TDI bits before the responses were out");
    end
    if (tap == 5 && n_ti != IN_CELLS) fail("scan with wrong number of TDI bits");
    if (tap == 3) begin n_an = 0; n_ti = 0; if (sr_ext) n_sr++; if (ec_ext) n_ec++; end
    if (apply) begin
      n_apply++;
      if (dut.vec_phase && dut.scan != dut.n_pre) begin
        checks++;
        if (cyc - last_apply != 12 + 3 + N/2 + 3 + cpl * N) fail("vector period");
      end
      last_apply = cyc;
    end
  end

  task automatic run(input bit diag, input int sessions);
    longint t0, want;
    int cfgs;
    n_apply = 0; n_sr = 0; n_ec = 0;
    @(negedge clk); diagnose = diag; start = 1; @(negedge clk); start = 0;
    t0 = cyc;
    while (!done) @(negedge clk);
    want = 0;
    for (int o = 0; o < sessions / N_CONFIGS; o++)
      for (int c = 0; c < N_CONFIGS; c++) begin
        int l;
        l = IN_CELLS + (o ? CPL_V : CPL_H) * N;
        if (c < SR_EC_CONFIGS)
          want += 17 * (N/2 + 6 + l) + (N - 1) * (5 + l) + (N - 2 + 4 + l) + (2 + 4 + l);
        else
          want += 17 * (N/2 + 6 + l);
      end
    checks += 4;
    if (cyc - t0 != want) fail($sformatf("total cycles %0d expected %0d", cyc - t0, want));
    cfgs = sessions / N_CONFIGS * SR_EC_CONFIGS;
    if (n_apply != sessions * 17 + cfgs * (N + 1)) fail($sformatf("%0d scans", n_apply));
    if (n_sr != cfgs * N) fail($sformatf("%0d S/R scans", n_sr));
    if (n_ec != cfgs * 2) fail($sformatf("%0d EC scans", n_ec));
  endtask

  initial begin
    tap = 0; cyc = 0; n_an = 0; n_ti = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1'b0, N_CONFIGS);
    checks++; if (vertical) fail("test-only run used the vertical arrays");
    run(1'b1, 2 * N_CONFIGS);
    checks++; if (!vertical) fail("diagnosis run did not reach the vertical arrays");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
