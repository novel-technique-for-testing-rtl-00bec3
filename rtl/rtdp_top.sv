// rtdp_top: the reuse-oriented test and diagnosis procedure for RAM-based
// FPGAs, end to end: the tester (test_facility) connected through the
// boundary-scan pins TMS, TDI and TDO to a model of the FPGA under test
// (fpga_under_test), an N x N array of XC4000-style CLBs configured as
// horizontal or vertical iterative logic arrays.
//
// Pulse `start` for one cycle. With `diagnose` low the seven horizontal
// configurations are tested (test only); with `diagnose` high the seven
// vertical ones follow and a faulty CLB is located at the crossing of a
// flagged row and a flagged column. `done` rises at the end; `fail`
// reports any wrong response. The `inj_*` inputs force one output of one CLB
// of the model to a constant, standing for a fault in that CLB. Both halves
// share the system clock, which also serves as TCK; `rst_n` also acts as
// the TAP reset.
module rtdp_top
  import rtdp_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         diagnose,
  input  logic         inj_en,
  input  logic [$clog2(N)-1:0] inj_row,
  input  logic [$clog2(N)-1:0] inj_col,
  input  logic [1:0]   inj_line,
  input  logic         inj_val,
  output logic         busy,
  output logic         done,
  output logic         fail,
  output logic [N-1:0] row_fault,
  output logic [N-1:0] col_fault,
  output logic         sr_ext,
  output logic         ec_ext,
  output logic         vertical,
  output logic         tms,
  output logic         tdi,
  output logic         tdo
);
  clb_cfg_t cfg;
  logic     ec, sr, word_ready;

  test_facility #(.N(N)) u_tester (
    .clk (clk), .rst_n (rst_n), .start (start), .diagnose (diagnose),
    .tdo (tdo), .tdi (tdi), .tms (tms), .cfg (cfg), .vertical (vertical),
    .ec (ec), .sr (sr), .busy (busy), .done (done), .fail (fail),
    .row_fault (row_fault), .col_fault (col_fault),
    .sr_ext (sr_ext), .ec_ext (ec_ext), .word_ready (word_ready)
  );

  fpga_under_test #(.N(N)) u_fpga (
    .clk (clk), .trst_n (rst_n), .tms (tms), .tdi (tdi), .tdo (tdo),
    .cfg (cfg), .vertical (vertical), .ec (ec), .sr (sr),
    .inj_en (inj_en), .inj_row (inj_row), .inj_col (inj_col),
    .inj_line (inj_line), .inj_val (inj_val)
  );
endmodule
