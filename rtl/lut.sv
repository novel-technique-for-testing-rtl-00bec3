// lut: memory look-up table of a CLB function generator.
//
// A K-input LUT is a column of 2^K configuration cells and an address
// decoder: the K inputs form the address (input 1 is the least significant
// bit), the decoder enables exactly one cell and that cell's stored bit is the
// output. The cells are written by the configuration (`cells`), which stays
// constant while the FPGA operates; the read path is purely combinational.
// Following the document, K = 4 for F' and G' and K = 3 for H'. The decoder
// is written out as a one-hot word so that an address-line fault of the
// decoder and a cell fault are distinct points of the structure.
module lut #(
  parameter int unsigned K = 4
) (
  input  logic [(1<<K)-1:0] cells,  // configuration memory (cell i at bit i)
  input  logic [K-1:0]      addr,   // LUT inputs
  output logic              out
);
  localparam int unsigned DEPTH = 1 << K;

  logic [DEPTH-1:0] sel;  // one-hot decoder output

  always_comb begin
    sel = '0;
    sel[addr] = 1'b1;
  end

  assign out = |(sel & cells);
endmodule
