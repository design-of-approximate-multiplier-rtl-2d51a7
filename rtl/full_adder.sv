// full_adder: one-bit full adder, the cell of the carry-save multiplier array.
//
// sum  = a xor b xor cin
// cout = majority(a, b, cin)
//
// Interface: three one-bit inputs a, b and cin, two one-bit outputs sum and
// cout. Purely combinational, no clock. The cell follows the adder the design
// is built from (inputs a and b, carry in, sum out); the gate-level equations
// are the textbook ones.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p;

  always_comb begin
    p    = a ^ b;
    sum  = p ^ cin;
    cout = (a & b) | (p & cin);
  end

endmodule
