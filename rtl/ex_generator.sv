// ex_generator: the exhaustive test-vector generator of the test pattern
// generator. A VEC_W-bit binary counter that walks through all 2^VEC_W
// vectors (16 for the four independent CLB inputs): `clr` returns it to 0,
// `step` advances it by one on the next rising edge, wrapping after the last
// vector. `last` flags the all-ones vector. Counting in binary order is this
// design's choice; the document only asks for an exhaustive 4-bit set.
module ex_generator #(
  parameter int unsigned VEC_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             step,
  output logic [VEC_W-1:0] vec,
  output logic             last
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     vec <= '0;
    else if (clr)   vec <= '0;
    else if (step)  vec <= vec + 1'b1;
  end

  assign last = &vec;
endmodule
