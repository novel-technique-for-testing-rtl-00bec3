// diagnostic_block: records which line (row or column) of the CLB array
// gave a wrong response.
//
// Two counters follow the response bits as they leave TDO: "Count" counts
// the bits of one line (CPL = 6 per row, 12 per column) and its terminal
// count clocks the "Line Counter", which therefore holds the index of the
// line being received. One cycle after a line's last bit, when the TDO shift
// register holds the whole line, `word_ready` is high and the comparator
// result for that line is valid; if it reports a fault (and `check` is set)
// a 1 is written into the fault memory at address {vertical, line}. The
// memory is sticky until `clear`. A faulty CLB is located as the crossing of
// a faulty row (horizontal arrays) and a faulty column (vertical arrays).
// `line_clr` restarts both counters at the beginning of a scan.
module diagnostic_block
  import rtdp_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,     // empty the fault memory
  input  logic         line_clr,  // restart Count and Line Counter
  input  logic         analyse,   // a response bit is on TDO this cycle
  input  logic         vertical,
  input  logic         check,     // the responses of this scan are checked
  input  logic         fault,     // comparator result
  output logic         word_ready,
  output logic [$clog2(N)-1:0] line,
  output logic [N-1:0] row_fault,
  output logic [N-1:0] col_fault,
  output logic         fault_seen
);
  localparam int unsigned LW = $clog2(N);

  logic [3:0]    count;
  logic [LW-1:0] line_cnt;
  logic          tc;

  assign tc = analyse && (count == (vertical ? 4'(CPL_V - 1) : 4'(CPL_H - 1)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count      <= '0;
      line_cnt   <= '0;
      word_ready <= 1'b0;
      line       <= '0;
    end else begin
      word_ready <= tc;
      if (tc) line <= line_cnt;
      if (line_clr) begin
        count    <= '0;
        line_cnt <= '0;
      end else if (analyse) begin
        count <= tc ? '0 : count + 1'b1;
        if (tc) line_cnt <= line_cnt + 1'b1;
      end
    end
  end

  // fault memory, one bit per row and per column
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_fault <= '0;
      col_fault <= '0;
    end else if (clear) begin
      row_fault <= '0;
      col_fault <= '0;
    end else if (word_ready && check && fault) begin
      if (vertical) col_fault[line] <= 1'b1;
      else          row_fault[line] <= 1'b1;
    end
  end

  assign fault_seen = |{row_fault, col_fault};
endmodule
