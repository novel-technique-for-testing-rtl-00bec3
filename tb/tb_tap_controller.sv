// tb_tap_controller: random TMS streams against a reference of the 1149.1
// state diagram (numbered states, next state for TMS = 0 and 1), checking the
// capture / shift / update / reset strobes every cycle, plus the rule that
// five TMS = 1 cycles reach Test-Logic-Reset from any state.
module tb_tap_controller;
  logic clk = 0, rst_n = 0, tms = 1;
  logic capture, shift, update, in_reset;
  int checks = 0, failures = 0;

  // 0 TLR 1 RTI 2 SelDR 3 CapDR 4 ShDR 5 Ex1DR 6 PauDR 7 Ex2DR 8 UpdDR
  // 9 SelIR 10 CapIR 11 ShIR 12 Ex1IR 13 PauIR 14 Ex2IR 15 UpdIR
  int nxt0 [16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
  int nxt1 [16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};
  int st;

  tap_controller dut (.clk(clk), .rst_n(rst_n), .tms(tms), .capture(capture), .shift(shift),
                      .update(update), .in_reset(in_reset));
  always #5 clk = ~clk;

  task automatic cmp();
    checks++;
    if (capture !== (st == 3) || shift !== (st == 4) || update !== (st == 8) || in_reset !== (st == 0)) begin
      failures++;
      $display("FAIL state %0d: cap=%b sh=%b upd=%b rst=%b", st, capture, shift, update, in_reset);
    end
  endtask

  initial begin
    st = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cmp();
    for (int t = 0; t < 3000; t++) begin
      tms = ($urandom % 3) == 0;
      @(negedge clk);
      st = tms ? nxt1[st] : nxt0[st];
      cmp();
      if (t % 200 == 199) begin
        tms = 1;
        repeat (5) @(negedge clk);
        st = 0;
        checks++;
        if (!in_reset) begin failures++; $display("FAIL five TMS=1 do not reset"); end
      end
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
