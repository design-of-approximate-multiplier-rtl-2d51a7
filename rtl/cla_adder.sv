// cla_adder: W-bit carry look-ahead adder, the merging adder of the truncated
// array multiplier.
//
// Each bit forms a generate g = x & y and a propagate p = x ^ y. Every carry
// is then computed directly from the generates, the propagates and cin as a
// flat sum of products,
//   c[i] = g[i-1] | p[i-1]&g[i-2] | ... | p[i-1]&...&p[0]&cin,
// so no carry waits on the one below it, unlike a ripple-carry adder. The sum
// bit is p[i] ^ c[i]; c[W] is the carry out.
//
// Interface: addends x and y (W bits), carry in cin; sum (W bits) and cout.
// Purely combinational. Using a carry look-ahead adder for the final merge
// follows the design; the single-level (unblocked) look-ahead is this
// implementation's choice, suited to the small widths a multiplier of a few
// bits needs.
module cla_adder #(
  parameter int unsigned W = 6
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] g;
  logic [W-1:0] p;
  logic [W:0]   c;

  always_comb begin
    logic term;  // one product term of a carry equation
    logic ci;    // the carry being assembled
    g = x & y;
    p = x ^ y;
    for (int i = 0; i <= W; i++) begin
      // Term for cin propagated through bits 0..i-1.
      term = cin;
      for (int k = 0; k < i; k++) term = term & p[k];
      ci = term;
      // Terms for a carry generated at bit j and propagated up to bit i.
      for (int j = 0; j < i; j++) begin
        term = g[j];
        for (int k = j + 1; k < i; k++) term = term & p[k];
        ci = ci | term;
      end
      c[i] = ci;
    end
    sum  = p ^ c[W-1:0];
    cout = c[W];
  end

endmodule
