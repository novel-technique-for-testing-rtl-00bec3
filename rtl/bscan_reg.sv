// bscan_reg: boundary-scan data register of the FPGA under test, as used by
// the test to apply vectors and read responses without any I/O pin.
//
// The register is one serial chain from TDI to TDO made of
//   * IN_CELLS input cells at the TDI end: each has a shift stage and an
//     update latch; the update latches drive the twelve used inputs of the
//     first CLB of every line (cell k drives input k, F1 first);
//   * an output segment at the TDO end, CPL cells per line, that captures
//     the response of the last CLB of every line. The right-edge segment
//     (CPL_H = 6 cells per row) is used for the horizontal arrays and the
//     bottom-edge segment (CPL_V = 12 cells per column) for the vertical
//     ones, which gives the document's 6 x N and 2 x 6 x N shift cycles.
//     Of each line's cells the first four capture {XQ, YQ, X, Y}; the others
//     belong to pins the test does not use and capture 0.
// Operation follows the usual capture / shift / update scheme, with the
// control strobes coming from the TAP controller: on a clock edge with
// `capture` the output cells load the responses, with `shift` the chain
// moves one place towards TDO (TDO shows the cell nearest to it, so the
// first bit out is line 0, cell 0), with `update` the input latches load.
// Which segment follows the input cells is chosen by `vertical`, a choice of
// this model: the document gives the shift counts, not the chain order.
module bscan_reg
  import rtdp_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                vertical,
  input  logic                tdi,
  input  logic                capture,
  input  logic                shift,
  input  logic                update,
  input  vec_t                resp_h [N],
  input  vec_t                resp_v [N],
  output logic                tdo,
  output logic [IN_CELLS-1:0] vec_out
);
  localparam int unsigned MH = CPL_H * N;
  localparam int unsigned MV = CPL_V * N;

  logic [IN_CELLS-1:0] ic;  // input cells, shift stage
  logic [MH-1:0]       sh;  // right-edge output cells (horizontal arrays)
  logic [MV-1:0]       sv;  // bottom-edge output cells (vertical arrays)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ic      <= '0;
      sh      <= '0;
      sv      <= '0;
      vec_out <= '0;
    end else begin
      if (capture) begin
        for (int r = 0; r < N; r++) begin
          for (int b = 0; b < CPL_H; b++) sh[r*CPL_H + b] <= (b < VEC_W) ? resp_h[r][b % VEC_W] : 1'b0;
          for (int b = 0; b < CPL_V; b++) sv[r*CPL_V + b] <= (b < VEC_W) ? resp_v[r][b % VEC_W] : 1'b0;
        end
      end else if (shift) begin
        ic <= {tdi, ic[IN_CELLS-1:1]};
        if (vertical) sv <= {ic[0], sv[MV-1:1]};
        else          sh <= {ic[0], sh[MH-1:1]};
      end
      if (update) vec_out <= ic;
    end
  end

  assign tdo = vertical ? sv[0] : sh[0];
endmodule
