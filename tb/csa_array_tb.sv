// csa_array_tb: exhaustive self-check of the carry-save multiplier array.
// For every pair of operands (M = 6, 4096 pairs; M = 3, 64 pairs) it checks
// that p_low equals the low M bits of a * b, that the saved vectors hold
// the rest ((sum_vec + carry_vec) << M + p_low == a * b), and that the
// always-zero top bit of sum_vec is zero. It counts how often the last row
// left a nonzero carry vector, which the merging adder must then absorb,
// and fails if that never happened. One vector per time step, with a
// watchdog.
module csa_array_tb;

  localparam int unsigned M  = 6;
  localparam int unsigned M2 = 3;

  logic [M-1:0]  a, b, p_low, sum_vec, carry_vec;
  logic [M2-1:0] a2, b2, p_low2, sum_vec2, carry_vec2;

  int checks   = 0;
  int failures = 0;
  int n_carry  = 0;

  csa_array dut (.a(a), .b(b), .p_low(p_low), .sum_vec(sum_vec), .carry_vec(carry_vec));
  csa_array #(.M(M2)) dut3 (.a(a2), .b(b2), .p_low(p_low2), .sum_vec(sum_vec2),
                            .carry_vec(carry_vec2));

  initial begin
    for (int v = 0; v < (1 << (2 * M)); v++) begin
      int unsigned prod, recon;
      {a, b} = (2*M)'(v);
      a2 = M2'(v);
      b2 = M2'(v >> M2);
      prod = int'(a) * int'(b);
      #1;
      recon = ((int'(sum_vec) + int'(carry_vec)) << M) + int'(p_low);
      checks++;
      if (p_low !== M'(prod) || recon != prod || sum_vec[M-1] !== 1'b0) begin
        failures++;
        if (failures < 10)
          $display("FAIL M=%0d a=%0d b=%0d: p_low=%0d sum=%0d carry=%0d", M, a, b, p_low, sum_vec, carry_vec);
      end
      if (carry_vec != '0) n_carry++;
      if (v < (1 << (2 * M2))) begin
        prod  = int'(a2) * int'(b2);
        recon = ((int'(sum_vec2) + int'(carry_vec2)) << M2) + int'(p_low2);
        checks++;
        if (p_low2 !== M2'(prod) || recon != prod) begin
          failures++;
          if (failures < 10) $display("FAIL M=%0d a=%0d b=%0d", M2, a2, b2);
        end
      end
    end
    checks++;
    if (n_carry == 0) begin
      failures++;
      $display("FAIL coverage: carry vector never nonzero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
