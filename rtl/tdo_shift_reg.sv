// tdo_shift_reg: the shift register that extracts the FPGA responses from
// the boundary scan through TDO.
//
// Every cycle with `shift_en` the TDO bit enters at the top (bit W-1) and the
// register moves one place towards bit 0, so after k shifts the last k bits
// received sit in word[W-1 : W-k], the first of them lowest. `word` is
// the parallel view the comparator reads.
module tdo_shift_reg #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift_en,
  input  logic         tdo,
  output logic [W-1:0] word
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        word <= '0;
    else if (shift_en) word <= {tdo, word[W-1:1]};
  end
endmodule
