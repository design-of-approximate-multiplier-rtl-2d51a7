// full_adder_tb: exhaustive self-check of the one-bit full adder.
// All eight input combinations are applied, one per time step, and sum and
// cout are compared with the bit count of the inputs (sum = count mod 2,
// cout = count >= 2). A watchdog ends the run if it stalls.
module full_adder_tb;

  logic a, b, cin, sum, cout;
  int   checks   = 0;
  int   failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      {a, b, cin} = 3'(v);
      ones = int'(a) + int'(b) + int'(cin);
      #1;
      checks++;
      if (sum !== ones[0] || cout !== (ones >= 2)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d: sum=%0d cout=%0d", a, b, cin, sum, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
