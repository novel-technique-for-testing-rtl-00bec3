// tb_ex_generator: the generator must walk through all sixteen 4-bit
// vectors once in sixteen steps, flag the last one, hold without `step` and
// return to 0 on `clr`.
module tb_ex_generator;
  logic clk = 0, rst_n = 0, clr = 0, step = 0;
  logic [3:0] vec;
  logic last;
  int checks = 0, failures = 0;
  bit seen [16];

  ex_generator #(.VEC_W(4)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .step(step), .vec(vec), .last(last));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (vec=%0d)", what, vec); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(vec == 0, "reset value");
    step = 1;
    for (int i = 0; i < 16; i++) begin
      chk(vec == 4'(i), "binary order");
      chk(last == (i == 15), "last flag");
      seen[vec] = 1'b1;
      @(negedge clk);
    end
    chk(vec == 0, "wraps to 0");
    foreach (seen[i]) chk(seen[i], "vector visited");
    step = 0;
    repeat (3) @(negedge clk);
    chk(vec == 0, "holds without step");
    step = 1; repeat (5) @(negedge clk);
    clr = 1; @(negedge clk); clr = 0; step = 0;
    chk(vec == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
