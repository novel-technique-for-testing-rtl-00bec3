// tb_comparator: random line words and expected values in both array
// orientations; the per-bit difference and the fault flag are recomputed
// from the cell layout (rows: cells in word[11:6], columns: word[11:0]).
module tb_comparator;
  import rtdp_pkg::*;
  logic [11:0] word;
  logic vertical;
  vec_t expected, diff;
  logic fault;
  int checks = 0, failures = 0;

  comparator dut (.word(word), .vertical(vertical), .expected(expected), .diff(diff), .fault(fault));

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [3:0] resp, ediff;
      logic pad, efault;
      vertical = 1'($urandom);
      expected = 4'($urandom);
      word = 12'($urandom);
      if ($urandom % 2) begin  // make a clean matching line half of the time
        word = vertical ? {8'h00, expected} : {2'b00, expected, 6'($urandom)};
      end
      if (vertical) begin resp = word[3:0]; pad = |word[11:4]; end
      else          begin resp = word[9:6]; pad = |word[11:10]; end
      ediff = resp ^ expected;
      efault = (ediff != 0) || pad;
      #1;
      checks++;
      if (diff !== ediff || fault !== efault) begin
        failures++;
        $display("FAIL v=%b word=%h exp=%h diff=%h fault=%b", vertical, word, expected, diff, fault);
      end
    end
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
