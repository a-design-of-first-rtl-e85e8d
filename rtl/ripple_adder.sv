// Carry-ripple adder, the adder of the DCO's integrator.
// W full adders in a chain, each carry feeding the next bit, as the original
// design chose for its simplicity. Combinational; cout is the carry out of the
// top bit.
module ripple_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [W:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_fa
    assign sum[i] = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end
  assign cout = c[W];
endmodule
