// comparator: bit-by-bit comparison of one line's extracted response with
// the value the fault-free array must return.
//
// `word` is the TDO shift register; the line's cells sit in its top CPL
// bits (CPL = 6 for rows, 12 for columns, chosen by `vertical`). The first
// four cells carry {XQ, YQ, X, Y} and are compared with `expected`; the other
// cells must read 0. `diff` flags each response bit that differs, `fault`
// is set when any cell differs. Purely combinational.
module comparator
  import rtdp_pkg::*;
(
  input  logic [CPL_V-1:0] word,
  input  logic             vertical,
  input  vec_t             expected,
  output vec_t             diff,
  output logic             fault
);
  logic [CPL_V-1:0] cells;  // the line's cells, cell 0 at bit 0
  logic             pad_err;

  always_comb begin
    cells = vertical ? word : {{(CPL_V-CPL_H){1'b0}}, word[CPL_V-1 -: CPL_H]};
    diff    = cells[VEC_W-1:0] ^ expected;
    pad_err = |cells[CPL_V-1:VEC_W];
    fault   = (|diff) | pad_err;
  end
endmodule
