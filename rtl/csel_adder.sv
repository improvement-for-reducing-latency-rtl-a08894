// Carry-select adder section.
//
// Two W-bit sums of a and b are formed side by side, one assuming a carry-in
// of 0 and one assuming 1. The real carry-in only picks one of them, so the
// delay from carry-in to the outputs is one 2:1 multiplexer, not a carry
// chain. This is the arrangement the FAC-like predictor uses for each of its
// address fields (block offset, set index, tag), where the carry-out of a
// lower field selects the sum and carry-out of the next field.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
module csel_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] sum0;  // result for carry-in 0
  logic [W:0] sum1;  // result for carry-in 1

  always_comb begin
    sum0 = {1'b0, a} + {1'b0, b};
    sum1 = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, 1'b1};
    {cout, sum} = cin ? sum1 : sum0;
  end

endmodule
