// cla_adder_tb: exhaustive self-check of the carry look-ahead adder.
// The default width (6) is run over every x, y and cin (8192 vectors), and
// a 16-bit instance over random vectors; each {cout, sum} is compared with
// the integer sum x + y + cin. The test also counts how often the carry out
// and a carry propagated across the full width occurred, and fails if
// either never did. One vector per time step; a watchdog ends a stalled run.
module cla_adder_tb;

  localparam int unsigned W  = 6;
  localparam int unsigned W2 = 16;

  logic [W-1:0]  x, y, sum;
  logic          cin, cout;
  logic [W2-1:0] x2, y2, sum2;
  logic          cin2, cout2;

  int checks   = 0;
  int failures = 0;
  int n_cout   = 0;
  int n_full_propagate = 0;

  cla_adder dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout));
  cla_adder #(.W(W2)) dut16 (.x(x2), .y(y2), .cin(cin2), .sum(sum2), .cout(cout2));

  initial begin
    x2 = '0; y2 = '0; cin2 = 1'b0;
    for (int v = 0; v < (1 << (2 * W + 1)); v++) begin
      int unsigned ref_sum;
      {cin, x, y} = (2*W+1)'(v);
      ref_sum = int'(x) + int'(y) + int'(cin);
      #1;
      checks++;
      if ({cout, sum} !== (W+1)'(ref_sum)) begin
        failures++;
        if (failures < 10) $display("FAIL W=%0d x=%0d y=%0d cin=%0d: got %0d", W, x, y, cin, {cout, sum});
      end
      if (cout) n_cout++;
      if ((x ^ y) == '1 && cin) n_full_propagate++;
    end
    for (int v = 0; v < 20000; v++) begin
      int unsigned ref_sum;
      x2 = W2'($urandom);
      y2 = (v % 7 == 0) ? ~x2 : W2'($urandom);
      cin2 = 1'($urandom);
      ref_sum = int'(x2) + int'(y2) + int'(cin2);
      #1;
      checks++;
      if ({cout2, sum2} !== (W2+1)'(ref_sum)) begin
        failures++;
        if (failures < 10) $display("FAIL W=%0d x=%0d y=%0d cin=%0d: got %0d", W2, x2, y2, cin2, {cout2, sum2});
      end
    end
    checks++;
    if (n_cout == 0 || n_full_propagate == 0) begin
      failures++;
      $display("FAIL coverage: cout=%0d full-width propagate=%0d", n_cout, n_full_propagate);
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
