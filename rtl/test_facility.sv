// test_facility: the tester of the reuse-oriented test procedure: test
// pattern generator, comparator, diagnostic block and the sequencer, talking
// to the FPGA under test only through TMS, TDI and TDO.
//
// For every scan the comparator checks each line's response, as it arrives
// from TDO, against the fault-free value:
//   * vector scans: the response of a line of N fault-free CLBs to the
//     applied vector (rtdp_pkg::line_response). For the configurations built
//     only from transparent and NOT functions this is the applied vector
//     itself (N even); for the EXOR configurations (4 and 5) it differs;
//   * S/R extraction k < N/2: the set/reset pattern after k clock steps. The
//     flip-flops of a line form two pipelines that advance two CLBs per
//     step, so the end of the line shows the set/reset pattern passed
//     through 2k fault-free CLBs (sr_walk below); from k = N/2 on, vector 0
//     has flushed the line and its response is expected;
//   * first EC extraction: still the response to the last vector (15);
//     second: the response to the applied vector. The diagnostic block stores the failing rows
// and columns. `cfg`, `vertical`, `ec` and `sr` go to the device: the first
// two name the configuration the device is expected to hold.
//
// `fail` rises in the cycle after the first faulty line and stays high;
// `row_fault`/`col_fault` hold the diagnosis when `done` rises.
module test_facility
  import rtdp_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         diagnose,
  input  logic         tdo,
  output logic         tdi,
  output logic         tms,
  output clb_cfg_t     cfg,
  output logic         vertical,
  output logic         ec,
  output logic         sr,
  output logic         busy,
  output logic         done,
  output logic         fail,
  output logic [N-1:0] row_fault,
  output logic [N-1:0] col_fault,
  output logic         sr_ext,
  output logic         ec_ext,
  output logic         word_ready
);
  logic [2:0]       cfg_idx;
  logic             gen_clr, load, apply, tdi_shift, analyse, line_clr, check;
  vec_t             vec, applied, expected, diff;
  logic             last, fault;
  logic [CPL_V-1:0] word;
  logic [$clog2(N)-1:0] line, sr_k;
  logic             ec_first;
  vec_t             sr_walk [N/2];

  rtdp_controller #(.N(N)) u_ctrl (
    .clk (clk), .rst_n (rst_n), .start (start), .diagnose (diagnose),
    .tms (tms), .cfg_idx (cfg_idx), .vertical (vertical), .ec (ec), .sr (sr),
    .gen_clr (gen_clr), .load (load), .apply (apply), .tdi_shift (tdi_shift),
    .analyse (analyse), .line_clr (line_clr), .check (check),
    .sr_ext (sr_ext), .sr_k (sr_k), .ec_ext (ec_ext), .ec_first (ec_first),
    .busy (busy), .done (done)
  );

  tpg u_tpg (
    .clk (clk), .rst_n (rst_n), .gen_clr (gen_clr), .load (load), .apply (apply),
    .tdi_shift (tdi_shift), .tdo_shift (analyse), .tdo (tdo), .tdi (tdi),
    .vec (vec), .applied (applied), .last (last), .word (word)
  );

  assign cfg      = cfg_table(cfg_idx);
  // set/reset pattern seen at the end of a line k steps after S/R
  always_comb begin
    sr_walk[0] = sr_response(cfg);
    for (int k = 1; k < N/2; k++) sr_walk[k] = clb_map(cfg, clb_map(cfg, sr_walk[k-1]));
  end

  always_comb begin
    if (sr_ext && sr_k < ($clog2(N))'(N/2))
      expected = sr_walk[sr_k[$clog2(N/2)-1:0]];
    else if (ec_first)
      expected = line_response(cfg, vec_t'(N_VECTORS - 1), N);
    else
      expected = line_response(cfg, applied, N);
  end

  comparator u_cmp (
    .word (word), .vertical (vertical), .expected (expected),
    .diff (diff), .fault (fault)
  );

  diagnostic_block #(.N(N)) u_diag (
    .clk (clk), .rst_n (rst_n), .clear (start), .line_clr (line_clr),
    .analyse (analyse), .vertical (vertical), .check (check), .fault (fault),
    .word_ready (word_ready), .line (line),
    .row_fault (row_fault), .col_fault (col_fault), .fault_seen (fail)
  );
endmodule
