// clb_array: the N x N CLBs of the FPGA under test, configured for the test
// as N one-dimensional iterative logic arrays (ILAs).
//
// In horizontal mode (`vertical` = 0) every row is an ILA running left to
// right; in vertical mode every column is an ILA running top to bottom. The
// first CLB of every line takes its twelve used inputs (F1..F4, G1..G4,
// C1..C4) from the boundary-scan input cells, the same test vector for all
// lines. Every other CLB takes them from the CLB before it: the four output
// signals of the previous CLB form the lines L0 = XQ, L1 = YQ, L2 = X, L3 = Y,
// and each group of four inputs (F, G, C) receives L0..L3 in that order.
// Clocked outputs of one CLB therefore feed combinational paths of the next
// and the other way round, as in the document's horizontal array, and a
// vector needs N/2 clocks to reach the end of a line. The last CLB of each
// line drives `resp_h[row]` or `resp_v[col]` as {Y, X, YQ, XQ}.
//
// All CLBs share one configuration (`cfg`), the clock, and the global EC and
// S/R signals. The `inj_*` inputs are a test hook of this model, not part of
// the document: they force one output of one CLB to a constant, standing for
// a fault in that CLB, so that detection and diagnosis can be exercised.
module clb_array
  import rtdp_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic              clk,
  input  clb_cfg_t          cfg,
  input  logic              vertical,
  input  logic [IN_CELLS-1:0] vec_in,   // {C4..C1, G4..G1, F4..F1}
  input  logic              ec,
  input  logic              sr,
  input  logic              inj_en,
  input  logic [$clog2(N)-1:0] inj_row,
  input  logic [$clog2(N)-1:0] inj_col,
  input  logic [1:0]        inj_line,  // forced output: 0 XQ, 1 YQ, 2 X, 3 Y
  input  logic              inj_val,
  output vec_t              resp_h [N],
  output vec_t              resp_v [N]
);
  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      logic [IN_CELLS-1:0] src_h, src_v, src;
      logic x, y, xq, yq;
      vec_t o;  // {Y, X, YQ, XQ} of this CLB after fault injection

      // Inputs: boundary scan for the first CLB of a line, otherwise the
      // lines of the neighbour to the left (rows) or above (columns).
      if (c == 0) begin : g_h_first
        assign src_h = vec_in;
      end else begin : g_h_next
        assign src_h = {3{g_row[r].g_col[c-1].o}};
      end
      if (r == 0) begin : g_v_first
        assign src_v = vec_in;
      end else begin : g_v_next
        assign src_v = {3{g_row[r-1].g_col[c].o}};
      end
      assign src = vertical ? src_v : src_h;

      clb u_clb (
        .clk (clk), .cfg (cfg), .f_in (src[3:0]), .g_in (src[7:4]), .c_in (src[11:8]),
        .ec (ec), .sr (sr), .x (x), .y (y), .xq (xq), .yq (yq)
      );

      always_comb begin
        o = {y, x, yq, xq};
        if (inj_en && inj_row == r && inj_col == c) o[inj_line] = inj_val;
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_resp
    assign resp_h[i] = g_row[i].g_col[N-1].o;
    assign resp_v[i] = g_row[N-1].g_col[i].o;
  end
endmodule
