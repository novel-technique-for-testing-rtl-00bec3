// tb_diagnostic_block: drives scans of a 5-line array with the comparator
// result raised for chosen lines only, in both orientations. Count and Line
// Counter must present each line's index with `word_ready` one cycle after
// the line's last bit, and exactly the chosen rows/columns must be flagged.
// Unchecked scans must flag nothing; `clear` empties the memory.
module tb_diagnostic_block;
  import rtdp_pkg::*;
  localparam int unsigned N = 5;
  logic clk = 0, rst_n = 0, clear = 0, line_clr = 0, analyse = 0, vertical = 0, check = 0, fault = 0;
  logic word_ready, fault_seen;
  logic [$clog2(N)-1:0] line;
  logic [N-1:0] row_fault, col_fault;
  logic [N-1:0] bad;
  int checks = 0, failures = 0;
  int ready_seen;

  diagnostic_block #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .clear(clear), .line_clr(line_clr),
    .analyse(analyse), .vertical(vertical), .check(check), .fault(fault), .word_ready(word_ready),
    .line(line), .row_fault(row_fault), .col_fault(col_fault), .fault_seen(fault_seen));
  always #5 clk = ~clk;

  // comparator stand-in: faulty for the lines in `bad`
  always_comb fault = word_ready && bad[line];

  task automatic scan(input bit v, input bit chk_en);
    int unsigned cpl;
    cpl = v ? CPL_V : CPL_H;
    vertical = v; check = chk_en;
    line_clr = 1; @(negedge clk); line_clr = 0;
    ready_seen = 0;
    for (int j = 0; j < cpl * N + IN_CELLS; j++) begin
      analyse = (j < cpl * N);
      #1;
      if (word_ready) begin
        checks++;
        if (j != (ready_seen + 1) * cpl || line != ready_seen) begin
          failures++; $display("FAIL word_ready at bit %0d line %0d", j, line);
        end
        ready_seen++;
      end
      @(negedge clk);
    end
    analyse = 0;
    checks++;
    if (ready_seen != N) begin failures++; $display("FAIL %0d lines seen", ready_seen); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      logic [N-1:0] br, bc;
      br = N'($urandom); bc = N'($urandom);
      clear = 1; @(negedge clk); clear = 0;
      bad = ~br; scan(1'b0, 1'b0);    // unchecked scan: nothing recorded
      checks++;
      if (fault_seen) begin failures++; $display("FAIL unchecked scan recorded"); end
      bad = br; scan(1'b0, 1'b1);
      bad = bc; scan(1'b1, 1'b1);
      checks += 2;
      if (row_fault !== br) begin failures++; $display("FAIL rows %b exp %b", row_fault, br); end
      if (col_fault !== bc) begin failures++; $display("FAIL cols %b exp %b", col_fault, bc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
