// tb_tpg: the test pattern generator must put each vector on TDI as twelve
// bits (the four vector bits three times, F group first), remember the
// vector at `apply` and then advance to the next one, and collect TDO bits
// in its response word.
module tb_tpg;
  import rtdp_pkg::*;
  logic clk = 0, rst_n = 0, gen_clr = 0, load = 0, apply = 0, tdi_shift = 0, tdo_shift = 0, tdo = 0;
  logic tdi, last;
  vec_t vec, applied;
  logic [CPL_V-1:0] word;
  int checks = 0, failures = 0;

  tpg dut (.clk(clk), .rst_n(rst_n), .gen_clr(gen_clr), .load(load), .apply(apply),
           .tdi_shift(tdi_shift), .tdo_shift(tdo_shift), .tdo(tdo), .tdi(tdi),
           .vec(vec), .applied(applied), .last(last), .word(word));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    gen_clr = 1; @(negedge clk); gen_clr = 0;
    for (int v = 0; v < 20; v++) begin
      logic [CPL_V-1:0] sent;
      chk(vec == 4'(v % 16), "vector order");
      chk(last == ((v % 16) == 15), "last flag");
      load = 1; @(negedge clk); load = 0;
      tdi_shift = 1;
      for (int k = 0; k < IN_CELLS; k++) begin
        #1 chk(tdi == ((v % 16) >> (k % 4)) % 2, $sformatf("tdi bit %0d of vector %0d", k, v));
        @(negedge clk);
      end
      tdi_shift = 0;
      apply = 1; @(negedge clk); apply = 0;
      chk(applied == 4'(v % 16), "applied vector");
      sent = CPL_V'($urandom);
      tdo_shift = 1;
      for (int k = 0; k < CPL_V; k++) begin tdo = sent[k]; @(negedge clk); end
      tdo_shift = 0;
      chk(word == sent, "response word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
