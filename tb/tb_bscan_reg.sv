// tb_bscan_reg: a 3 x 3 array's boundary-scan register. Random responses are
// captured and must leave TDO line by line, cell 0 first, four response bits
// then zero cells (6 cells per row, 12 per column). The last 12 bits shifted
// in must appear, after update, on the input-cell outputs, bit k shifted in
// at position (chain length - 12 + k). Update latches hold during shifting.
module tb_bscan_reg;
  import rtdp_pkg::*;
  localparam int unsigned N = 3;
  logic clk = 0, rst_n = 0, vertical = 0, tdi = 0, capture = 0, shift = 0, update = 0;
  vec_t resp_h [N];
  vec_t resp_v [N];
  logic tdo;
  logic [IN_CELLS-1:0] vec_out;
  int checks = 0, failures = 0;

  bscan_reg #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .vertical(vertical), .tdi(tdi), .capture(capture),
                          .shift(shift), .update(update), .resp_h(resp_h), .resp_v(resp_v),
                          .tdo(tdo), .vec_out(vec_out));
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int unsigned cpl, len;
      logic [IN_CELLS-1:0] pat, held;
      vertical = 1'(t % 2);
      cpl = vertical ? CPL_V : CPL_H;
      len = IN_CELLS + cpl * N;
      for (int r = 0; r < N; r++) begin resp_h[r] = 4'($urandom); resp_v[r] = 4'($urandom); end
      pat = 12'($urandom);
      held = vec_out;
      capture = 1; @(negedge clk); capture = 0;
      for (int r = 0; r < N; r++) begin resp_h[r] = '0; resp_v[r] = '0; end  // captured, not live
      shift = 1;
      for (int j = 0; j < len; j++) begin
        int r, b;
        logic exp;
        r = j / cpl; b = j % cpl;
        tdi = (j >= len - IN_CELLS) ? pat[j - (len - IN_CELLS)] : 1'b0;
        if (j < cpl * N) begin
          exp = (b < VEC_W) ? (vertical ? (resp_v_q[r] >> b) : (resp_h_q[r] >> b)) & 1'b1 : 1'b0;
          checks++;
          if (tdo !== exp) begin failures++; $display("FAIL v=%0d line %0d cell %0d", vertical, r, b); end
        end
        @(negedge clk);
      end
      shift = 0;
      checks++;
      if (vec_out !== held) begin failures++; $display("FAIL update latch changed while shifting"); end
      update = 1; @(negedge clk); update = 0;
      checks++;
      if (vec_out !== pat) begin failures++; $display("FAIL vec_out %h exp %h", vec_out, pat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // copy of the responses at capture time
  vec_t resp_h_q [N];
  vec_t resp_v_q [N];
  always @(posedge clk) if (capture) begin resp_h_q <= resp_h; resp_v_q <= resp_v; end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
