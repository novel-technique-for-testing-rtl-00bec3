// tb_tdo_shift_reg: after k enabled cycles the last k TDO bits must sit in
// the top of the word, the first received lowest; disabled cycles hold.
module tb_tdo_shift_reg;
  logic clk = 0, rst_n = 0, shift_en = 0, tdo = 0;
  logic [11:0] word;
  logic [11:0] model;
  int checks = 0, failures = 0;

  tdo_shift_reg #(.W(12)) dut (.clk(clk), .rst_n(rst_n), .shift_en(shift_en), .tdo(tdo), .word(word));
  always #5 clk = ~clk;

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      shift_en = ($urandom % 4) != 0;
      tdo = 1'($urandom);
      @(negedge clk);
      if (shift_en) begin
        for (int i = 0; i < 11; i++) model[i] = model[i+1];
        model[11] = tdo;
      end
      checks++;
      if (word !== model) begin failures++; $display("FAIL word %h exp %h", word, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
