// tpg: test pattern generator of the tester. It holds the exhaustive 4-bit
// generator, the shift register feeding TDI and the shift register reading
// TDO.
//
// At `load` the current vector is expanded to the twelve used CLB inputs
// (the four independent bits repeated for the F, G and C input groups, so
// that every LUT sees all four signals on its address lines) and placed in
// the TDI register. At `apply` (the Update-DR cycle, when the boundary scan
// hands the vector to the array) the vector is remembered as `applied`, the
// vector whose response the next scan brings back, and the generator
// advances. `gen_clr` restarts the generator at vector 0. The TDO register
// collects the response bits during `tdo_shift`.
module tpg
  import rtdp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             gen_clr,
  input  logic             load,
  input  logic             apply,
  input  logic             tdi_shift,
  input  logic             tdo_shift,
  input  logic             tdo,
  output logic             tdi,
  output vec_t             vec,
  output vec_t             applied,
  output logic             last,
  output logic [CPL_V-1:0] word
);
  ex_generator #(.VEC_W(VEC_W)) u_gen (
    .clk (clk), .rst_n (rst_n), .clr (gen_clr), .step (apply),
    .vec (vec), .last (last)
  );

  tdi_shift_reg #(.W(IN_CELLS)) u_tdi (
    .clk (clk), .rst_n (rst_n), .load (load), .pattern ({IN_CELLS/VEC_W{vec}}),
    .shift_en (tdi_shift), .tdi (tdi)
  );

  tdo_shift_reg #(.W(CPL_V)) u_tdo (
    .clk (clk), .rst_n (rst_n), .shift_en (tdo_shift), .tdo (tdo), .word (word)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     applied <= '0;
    else if (apply) applied <= vec;
  end
endmodule
