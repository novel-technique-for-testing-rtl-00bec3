// tdi_shift_reg: the shift register that inserts a test pattern into the
// boundary scan through TDI.
//
// `load` copies a W-bit pattern in parallel; every cycle with `shift_en` the
// register moves one place towards bit 0, and bit 0 is what TDI carries.
// While `shift_en` is low TDI is held at 0, which fills the response part of
// the scan chain with zeros. Bits leave least significant first, so pattern
// bit k ends in boundary-scan input cell k.
module tdi_shift_reg #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] pattern,
  input  logic         shift_en,
  output logic         tdi
);
  logic [W-1:0] sreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sreg <= '0;
    else if (load)     sreg <= pattern;
    else if (shift_en) sreg <= {1'b0, sreg[W-1:1]};
  end

  assign tdi = shift_en & sreg[0];
endmodule
