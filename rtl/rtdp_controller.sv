// rtdp_controller: sequencer of the reuse-oriented test and diagnosis
// procedure. It steps through the test sessions and drives the FPGA's TAP
// (TMS) and the tester's shift registers.
//
// A session is one array orientation (horizontal, then vertical when
// `diagnose` is set) with one of the seven CLB configurations. Sessions run
// horizontal 0..6, then vertical 0..6; the configuration is taken to be in
// place when a session starts (loading the bit stream is outside this
// model). A session is a series of boundary-scan passes ("scans"). Each scan
// is: Run-Test/Idle for W cycles, Select-DR, Capture-DR, Shift-DR for
// L = 12 + CPL*N cycles (first the CPL*N response bits of the previous
// vector leave through TDO, then the 12 bits of the next vector enter through
// TDI), Exit1-DR and Update-DR, which applies the new vector. With
// W = N/2 + 2 a vector scan takes 12 + 3 + N/2 + 3 + CPL*N cycles, the
// published count (174 for a horizontal 24 x 24 array, 318 for a vertical).
//
// Scans of a session, P = N in the first SR_EC_CONFIGS configurations and
// P = 1 in the others:
//   0..P-1   S/R extractions (or, when P = 1, a scan that only loads vector
//            0). Extraction 0 holds the global S/R high through its wait and
//            Capture-DR; EC stays low from then on, except for one cycle in
//            the wait of each later extraction, so extraction k sees the
//            array k clock steps after S/R: the set/reset values walking out
//            of the lines, then the response to vector 0. All shift in
//            vector 0.
//   P..P+15  vector scans: check the responses to vectors 0..15 and load the
//            next vector (the last one loads vector 0 again, and so does the
//            first EC extraction).
//   P+16     first EC extraction: vector 0 propagates with EC toggling every
//            clock (a clock-like signal of twice the clock period) for N - 2
//            cycles, i.e. N/2 - 1 enabled steps, and EC is low up to the
//            capture. A fault-free line still shows the response to vector
//            15; an EC input stuck at 1 has already moved on.
//   P+17     second EC extraction: two more toggling cycles (one enabled
//            step, N/2 in all, twice the normal propagation time); the
//            response to vector 0 must now be there, which an EC stuck at 0
//            never delivers.
// The S/R and EC scans exist only in the first SR_EC_CONFIGS configurations,
// which set and reset their flip-flops in different combinations.
// `sr_ext`/`sr_k`, `ec_ext`/`ec_first` and `check` tell the rest of the
// tester what the current scan does. Scan order and wait lengths of the S/R
// and EC extractions are this design's choices.
module rtdp_controller
  import rtdp_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       diagnose,   // also run the vertical arrays
  output logic       tms,
  output logic [2:0] cfg_idx,
  output logic       vertical,
  output logic       ec,
  output logic       sr,
  output logic       gen_clr,
  output logic       load,       // load the TDI register
  output logic       apply,      // Update-DR: the new vector reaches the array
  output logic       tdi_shift,
  output logic       analyse,    // a response bit is on TDO
  output logic       line_clr,
  output logic       check,      // responses of the current scan are checked
  output logic       sr_ext,     // current scan is an S/R extraction
  output logic [$clog2(N)-1:0] sr_k,  // ... taken sr_k steps after S/R
  output logic       ec_ext,     // current scan is an EC extraction
  output logic       ec_first,   // ... the first one (old response expected)
  output logic       busy,
  output logic       done
);
  localparam int unsigned W_NORM = N/2 + 2;
  localparam int unsigned W_EC1  = N - 2;
  localparam int unsigned W_EC2  = 2;
  localparam int unsigned LH     = IN_CELLS + CPL_H*N;
  localparam int unsigned LV     = IN_CELLS + CPL_V*N;
  localparam int unsigned CW     = $clog2(LV + 1);
  localparam int unsigned SW     = $clog2(N + 19);

  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_SEL, S_CAP, S_SHIFT, S_EXIT1, S_UPD, S_DONE} st_e;

  st_e           st;
  logic [CW-1:0] cnt;
  logic [SW-1:0] scan;
  logic          sr_cfg;       // this configuration runs the S/R and EC extractions
  logic [SW-1:0] n_pre;        // scans before the first vector scan
  logic [CW-1:0] wait_len, scan_len, resp_len;
  logic          last_scan, vec_phase, ec_second;

  assign sr_cfg    = (cfg_idx < 3'(SR_EC_CONFIGS));
  assign n_pre     = sr_cfg ? SW'(N) : SW'(1);
  assign sr_ext    = sr_cfg && scan < SW'(N);
  assign sr_k      = sr_ext ? scan[$clog2(N)-1:0] : '0;
  assign vec_phase = scan >= n_pre && scan < n_pre + SW'(16);
  assign ec_first  = sr_cfg && scan == n_pre + SW'(16);
  assign ec_second = sr_cfg && scan == n_pre + SW'(17);
  assign ec_ext    = ec_first || ec_second;
  assign check     = (scan != '0) || sr_cfg;
  assign wait_len  = ec_first  ? CW'(W_EC1) :
                     ec_second ? CW'(W_EC2) :
                     (sr_ext && scan != '0) ? CW'(1) : CW'(W_NORM);
  assign scan_len  = vertical ? CW'(LV) : CW'(LH);
  assign resp_len  = vertical ? CW'(CPL_V*N) : CW'(CPL_H*N);
  assign last_scan = sr_cfg ? ec_second : (scan == SW'(16));

  // TAP moves, mirrored by the controller's own state
  always_comb begin
    unique case (st)
      S_IDLE:  tms = !start;                        // stay in Test-Logic-Reset
      S_WAIT:  tms = (cnt == wait_len - 1'b1);
      S_SEL:   tms = 1'b0;
      S_CAP:   tms = 1'b0;
      S_SHIFT: tms = (cnt == scan_len - 1'b1);
      S_EXIT1: tms = 1'b1;
      S_UPD:   tms = 1'b0;
      default: tms = 1'b0;                          // S_DONE: Run-Test/Idle
    endcase
  end

  assign sr = sr_ext && scan == '0 && (st == S_WAIT || st == S_SEL || st == S_CAP);

  always_comb begin
    if (sr_ext)      ec = (st == S_WAIT) && scan != '0;  // one step per extraction
    else if (ec_ext) ec = (st == S_WAIT) && cnt[0];      // clock-like, half rate
    else             ec = 1'b1;
  end

  assign load      = (st == S_CAP);
  assign apply     = (st == S_UPD);
  assign tdi_shift = (st == S_SHIFT) && (cnt >= resp_len);
  assign analyse   = (st == S_SHIFT) && (cnt <  resp_len);
  assign line_clr  = (st == S_CAP);
  // the generator stays at vector 0 through the S/R extractions, and the
  // first EC extraction loads vector 0 again so that the input does not
  // change while the EC extractions propagate it
  assign gen_clr   = (st == S_IDLE) ||
                     (st == S_UPD && (last_scan || (sr_ext && scan != SW'(N - 1)) ||
                                      (sr_cfg && scan == n_pre + SW'(15))));
  assign busy      = (st != S_IDLE) && (st != S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      cnt      <= '0;
      scan     <= '0;
      cfg_idx  <= '0;
      vertical <= 1'b0;
      done     <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE, S_DONE: if (start) begin
          st       <= S_WAIT;
          cnt      <= '0;
          scan     <= '0;
          cfg_idx  <= '0;
          vertical <= 1'b0;
          done     <= 1'b0;
        end
        S_WAIT: begin
          cnt <= cnt + 1'b1;
          if (tms) st <= S_SEL;
        end
        S_SEL: st <= S_CAP;
        S_CAP: begin
          st  <= S_SHIFT;
          cnt <= '0;
        end
        S_SHIFT: begin
          cnt <= cnt + 1'b1;
          if (tms) st <= S_EXIT1;
        end
        S_EXIT1: st <= S_UPD;
        S_UPD: begin
          cnt <= '0;
          st  <= S_WAIT;
          if (!last_scan) begin
            scan <= scan + 1'b1;
          end else begin
            scan <= '0;
            if (cfg_idx != 3'(N_CONFIGS - 1)) begin
              cfg_idx <= cfg_idx + 1'b1;
            end else if (diagnose && !vertical) begin
              cfg_idx  <= '0;
              vertical <= 1'b1;
            end else begin
              st   <= S_DONE;
              done <= 1'b1;
            end
          end
        end
        default: ;
      endcase
    end
  end

  // The TAP leaves Shift-DR only after the whole chain has moved.
  property p_full_scan;
    @(posedge clk) disable iff (!rst_n)
      (st == S_SHIFT && tms) |-> (cnt == scan_len - 1'b1);
  endproperty
  a_full_scan: assert property (p_full_scan);

  // Vector scans run with the flip-flops enabled.
  a_vec_ec: assert property (@(posedge clk) disable iff (!rst_n) (busy && vec_phase) |-> ec);
endmodule
