// tam: truncated array multiplier TM(N, K), an approximate unsigned N x N
// multiplier.
//
// The K least significant bits of both operands are dropped and the
// remaining M = N - K upper bits are multiplied exactly:
//   p = ((a >> K) * (b >> K)) << 2K.
// In an N x N array this is the same as omitting the cells of the K low
// bits of each operand, so the 2K low product bits are always zero. The
// M x M product is formed in three stages: partial product generation and
// reduction in a carry-save adder array (csa_array), then one M-bit carry
// look-ahead merging adder (cla_adder) that adds the array's saved sums and
// carries. The error is one-sided (p never exceeds a*b) and at most
//   WCE(N, K) = (2^K - 1) * (2^(N+1) - 2^K - 1),
// reached at a = b = 2^N - 1. K = 0 gives an exact multiplier.
//
// Interface: unsigned operands a and b (N bits), product p (2N bits).
// Purely combinational: p is valid one array-plus-adder delay after a and b
// settle, with no clock or handshake.
//
// The K low bits of a and b are deliberately left unread, and the merging
// adder's carry out is left open: the M x M product always fits in 2M bits,
// so that carry is always 0.
//
// The truncation scheme, the carry-save array, the carry look-ahead merging
// adder and N = 8 follow the design. K = 2 is this implementation's default;
// any 0 <= K < N may be set.
module tam #(
  parameter int unsigned N = 8,
  parameter int unsigned K = 2
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned M = N - K;

  logic [M-1:0]   p_low;
  logic [M-1:0]   sum_vec;
  logic [M-1:0]   carry_vec;
  logic [M-1:0]   p_high;
  logic [2*M-1:0] p_trunc;  // exact product of the kept bits

  csa_array #(.M(M)) u_array (
    .a        (a[N-1:K]),
    .b        (b[N-1:K]),
    .p_low    (p_low),
    .sum_vec  (sum_vec),
    .carry_vec(carry_vec)
  );

  cla_adder #(.W(M)) u_merge (
    .x   (sum_vec),
    .y   (carry_vec),
    .cin (1'b0),
    .sum (p_high),
    .cout()     // always 0: a*b < 2^(2M), so the sum fits in M bits
  );

  assign p_trunc = {p_high, p_low};

  assign p = (2*N)'(p_trunc) << (2 * K);

  initial begin
    assert (K < N) else $fatal(1, "tam: K must be below N");
  end

endmodule
