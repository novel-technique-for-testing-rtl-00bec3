// tb_tdi_shift_reg: a loaded pattern must leave on TDI least significant bit
// first, one bit per enabled cycle, and TDI must be 0 when not shifting.
module tb_tdi_shift_reg;
  logic clk = 0, rst_n = 0, load = 0, shift_en = 0, tdi;
  logic [11:0] pattern;
  int checks = 0, failures = 0;

  tdi_shift_reg #(.W(12)) dut (.clk(clk), .rst_n(rst_n), .load(load), .pattern(pattern),
                               .shift_en(shift_en), .tdi(tdi));
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      pattern = 12'($urandom);
      load = 1; @(negedge clk); load = 0;
      checks++; if (tdi !== 1'b0) begin failures++; $display("FAIL tdi not 0 while idle"); end
      for (int i = 0; i < 12; i++) begin
        shift_en = 1;
        #1;
        checks++;
        if (tdi !== pattern[i]) begin failures++; $display("FAIL bit %0d", i); end
        @(negedge clk);
        shift_en = (i % 3 == 1);  // gaps between shifts
        if (!shift_en) begin
          #1; checks++;
          if (tdi !== 1'b0) begin failures++; $display("FAIL tdi not 0 in gap"); end
          @(negedge clk);
        end
      end
      shift_en = 0;
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
