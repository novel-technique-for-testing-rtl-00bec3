// tb_test_facility: the tester driving the 4 x 4 device model through TMS,
// TDI and TDO. A fault-free device must pass test and diagnosis; a forced
// fault on each of the four outputs of a CLB, in turn and at different
// places, must flag exactly that CLB's row and column.
module tb_test_facility;
  import rtdp_pkg::*;
  localparam int unsigned N = 4;
  logic clk = 0, rst_n = 0, start = 0, diagnose = 1;
  logic tdi, tdo, tms, vertical, ec, sr, busy, done, fail, sr_ext, ec_ext, word_ready;
  logic [N-1:0] row_fault, col_fault;
  clb_cfg_t cfg;
  logic inj_en = 0, inj_val = 0;
  logic [1:0] inj_row = 0, inj_col = 0, inj_line = 0;
  int checks = 0, failures = 0;

  test_facility #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .start(start), .diagnose(diagnose),
    .tdo(tdo), .tdi(tdi), .tms(tms), .cfg(cfg), .vertical(vertical), .ec(ec), .sr(sr),
    .busy(busy), .done(done), .fail(fail), .row_fault(row_fault), .col_fault(col_fault),
    .sr_ext(sr_ext), .ec_ext(ec_ext), .word_ready(word_ready));

  fpga_under_test #(.N(N)) dev (.clk(clk), .trst_n(rst_n), .tms(tms), .tdi(tdi), .tdo(tdo),
    .cfg(cfg), .vertical(vertical), .ec(ec), .sr(sr), .inj_en(inj_en), .inj_row(inj_row),
    .inj_col(inj_col), .inj_line(inj_line), .inj_val(inj_val));
  always #5 clk = ~clk;

  task automatic run();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run();
    checks++;
    if (fail || row_fault != 0 || col_fault != 0) begin failures++; $display("FAIL fault-free device flagged"); end
    for (int t = 0; t < 8; t++) begin
      inj_en = 1; inj_line = 2'(t % 4); inj_val = 1'(t / 4);
      inj_row = 2'($urandom); inj_col = 2'($urandom);
      run();
      checks += 2;
      if (row_fault != (N'(1) << inj_row)) begin failures++; $display("FAIL t=%0d rows %b", t, row_fault); end
      if (col_fault != (N'(1) << inj_col)) begin failures++; $display("FAIL t=%0d cols %b", t, col_fault); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
