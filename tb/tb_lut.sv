// tb_lut: checks the 4-input and 3-input look-up tables against a direct
// read of the configuration word, over random contents and all addresses,
// and the transparent / NOT / EXOR tables the test configurations use.
module tb_lut;
  logic [15:0] c4;  logic [3:0] a4;  logic o4;
  logic [7:0]  c3;  logic [2:0] a3;  logic o3;
  int checks = 0, failures = 0;

  lut #(.K(4)) u4 (.cells(c4), .addr(a4), .out(o4));
  lut #(.K(3)) u3 (.cells(c3), .addr(a3), .out(o3));

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b exp %b", what, got, exp); end
  endtask

  initial begin
    for (int t = 0; t < 200; t++) begin
      c4 = 16'($urandom); c3 = 8'($urandom);
      for (int a = 0; a < 16; a++) begin
        a4 = 4'(a); a3 = 3'(a);
        #1;
        chk(o4, (c4 >> a) & 1'b1, "lut4 random");
        if (a < 8) chk(o3, (c3 >> a) & 1'b1, "lut3 random");
      end
    end
    // transparent of input k and its complement
    for (int k = 0; k < 4; k++) begin
      logic [15:0] tt;
      for (int a = 0; a < 16; a++) tt[a] = a[k];
      for (int a = 0; a < 16; a++) begin
        c4 = tt; a4 = 4'(a); #1; chk(o4, a[k], "transparent");
        c4 = ~tt; #1; chk(o4, !a[k], "NOT");
      end
    end
    c4 = 16'h6666;
    for (int a = 0; a < 16; a++) begin a4 = 4'(a); #1; chk(o4, a[0] ^ a[1], "EXOR"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
