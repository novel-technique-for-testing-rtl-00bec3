// fpga_under_test: model of the FPGA while it holds one of the test
// configurations: the N x N CLB array chained into ILAs, the boundary-scan
// data register around it and the TAP controller that runs that register.
//
// The tester reaches the device only through TMS, TDI and TDO (clocked by the
// system clock, used as TCK), so no user I/O pin is needed. A vector shifted
// into the input cells is applied to the first CLB of every line on
// Update-DR; the response of the last CLB of every line is loaded into the
// output cells on Capture-DR and shifted out through TDO.
//
// The configuration itself is not loaded through a bit stream here: `cfg`
// and `vertical` stand for the configuration the device currently holds, and
// `ec` and `sr` for the two globally distributed CLB control signals the
// procedure drives. These are choices of this model. The `inj_*` inputs force
// one output of one CLB (a fault) for testing the tester.
module fpga_under_test
  import rtdp_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic     clk,
  input  logic     trst_n,
  input  logic     tms,
  input  logic     tdi,
  output logic     tdo,
  input  clb_cfg_t cfg,
  input  logic     vertical,
  input  logic     ec,
  input  logic     sr,
  input  logic     inj_en,
  input  logic [$clog2(N)-1:0] inj_row,
  input  logic [$clog2(N)-1:0] inj_col,
  input  logic [1:0] inj_line,
  input  logic     inj_val
);
  logic capture, shift, update, in_reset;
  logic [IN_CELLS-1:0] vec_in;
  vec_t resp_h [N];
  vec_t resp_v [N];

  tap_controller u_tap (
    .clk (clk), .rst_n (trst_n), .tms (tms),
    .capture (capture), .shift (shift), .update (update), .in_reset (in_reset)
  );

  bscan_reg #(.N(N)) u_bsr (
    .clk (clk), .rst_n (trst_n), .vertical (vertical), .tdi (tdi),
    .capture (capture), .shift (shift), .update (update),
    .resp_h (resp_h), .resp_v (resp_v), .tdo (tdo), .vec_out (vec_in)
  );

  clb_array #(.N(N)) u_array (
    .clk (clk), .cfg (cfg), .vertical (vertical), .vec_in (vec_in),
    .ec (ec), .sr (sr),
    .inj_en (inj_en), .inj_row (inj_row), .inj_col (inj_col),
    .inj_line (inj_line), .inj_val (inj_val),
    .resp_h (resp_h), .resp_v (resp_v)
  );
endmodule
