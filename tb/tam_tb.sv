// tam_tb: end-to-end, full-size test of the truncated array multiplier.
// The multiplier is instantiated with its default parameters (N = 8, K = 2)
// and driven with all 2^16 operand pairs, one per time step. Each product
// is compared with an independent model, ((a >> K) * (b >> K)) << 2K, and
// also checked against the properties of truncation: the 2K low bits are
// zero, the result never exceeds the exact product, and the error never
// exceeds WCE = (2^K - 1)(2^(N+1) - 2^K - 1). The largest error seen must
// equal WCE. The test reports error rate and mean error distance, and
// counts how often each case occurred: an inexact (truncated) result, an
// exact result, and the worst-case error. A case that never occurred is a
// failure.
module tam_tb;

  localparam int unsigned N = 8;
  localparam int unsigned K = 2;
  localparam longint unsigned WCE = ((64'd1 << K) - 1) * ((64'd1 << (N + 1)) - (64'd1 << K) - 1);

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;

  int checks   = 0;
  int failures = 0;
  int n_inexact = 0;
  int n_exact   = 0;
  int n_wce     = 0;
  longint unsigned max_err = 0;
  longint unsigned sum_err = 0;

  tam dut (.a(a), .b(b), .p(p));

  initial begin
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      longint unsigned exact, model, err;
      {a, b} = (2*N)'(v);
      exact = longint'(a) * longint'(b);
      model = ((longint'(a) >> K) * (longint'(b) >> K)) << (2 * K);
      #1;
      checks++;
      if (longint'(p) != model) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d: p=%0d expected %0d", a, b, p, model);
      end
      if (K > 0 && p[(K > 0 ? 2*K-1 : 0):0] != '0) begin
        failures++;
        $display("FAIL a=%0d b=%0d: low bits not zero", a, b);
      end
      err = (longint'(p) <= exact) ? exact - longint'(p) : 64'hffff_ffff;
      if (err > WCE) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d: error %0d above WCE %0d", a, b, err, WCE);
      end
      if (err > max_err) max_err = err;
      if (err == WCE) n_wce++;
      sum_err += err;
      if (err != 0) n_inexact++;
      else n_exact++;
    end
    checks++;
    if (max_err != WCE) begin
      failures++;
      $display("FAIL worst-case error %0d, expected %0d", max_err, WCE);
    end
    $display("TM(%0d,%0d): WCE=%0d error rate=%0.4f mean error distance=%0.3f",
             N, K, max_err, real'(n_inexact) / real'(1 << (2 * N)),
             real'(sum_err) / real'(1 << (2 * N)));
    $display("mechanisms: inexact=%0d exact=%0d worst case=%0d", n_inexact, n_exact, n_wce);
    checks++;
    if (n_exact == 0 || n_wce == 0 || (K > 0 && n_inexact == 0)) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
