// tam_configs_tb: every meaningful configuration of the truncated array
// multiplier at two widths, each over all of its operand pairs.
// Width 5 (the size of the small worked example) is built for K = 0..4 and
// width 8 (the default) for K = 0..7. For each configuration the products
// are compared with ((a >> K) * (b >> K)) << 2K, K = 0 must be exact, and
// the largest error seen must equal WCE(N, K) = (2^K-1)(2^(N+1)-2^K-1).
// All instances share the operands; one vector pair per time step, with a
// watchdog.
module tam_configs_tb;

  localparam int unsigned NA = 5;
  localparam int unsigned NB = 8;

  logic [NB-1:0]   a, b;
  logic [2*NA-1:0] pa [NA];
  logic [2*NB-1:0] pb [NB];

  int checks   = 0;
  int failures = 0;
  longint unsigned max_a [NA];
  longint unsigned max_b [NB];

  for (genvar k = 0; k < NA; k++) begin : g_a
    tam #(.N(NA), .K(k)) dut (.a(a[NA-1:0]), .b(b[NA-1:0]), .p(pa[k]));
  end
  for (genvar k = 0; k < NB; k++) begin : g_b
    tam #(.N(NB), .K(k)) dut (.a(a), .b(b), .p(pb[k]));
  end

  function automatic longint unsigned wce(int unsigned n, int unsigned k);
    return ((64'd1 << k) - 1) * ((64'd1 << (n + 1)) - (64'd1 << k) - 1);
  endfunction

  // Independent model of TM(n, k): drop k low bits of each operand.
  function automatic longint unsigned model(int unsigned k, longint unsigned x,
                                            longint unsigned y);
    return ((x >> k) * (y >> k)) << (2 * k);
  endfunction

  initial begin
    foreach (max_a[k]) max_a[k] = 0;
    foreach (max_b[k]) max_b[k] = 0;
    for (int v = 0; v < (1 << (2 * NB)); v++) begin
      {a, b} = (2*NB)'(v);
      #1;
      for (int k = 0; k < NB; k++) begin
        longint unsigned x, y, got;
        x = longint'(a);
        y = longint'(b);
        got = longint'(pb[k]);
        checks++;
        if (got != model(k, x, y) || got > x * y) begin
          failures++;
          if (failures < 10) $display("FAIL TM(%0d,%0d) a=%0d b=%0d: p=%0d", NB, k, x, y, got);
        end else if (x * y - got > max_b[k]) begin
          max_b[k] = x * y - got;
        end
      end
      // Width 5 takes the low bits of both operands, so it sees every pair too.
      for (int k = 0; k < NA; k++) begin
        longint unsigned x, y, got;
        x = longint'(a[NA-1:0]);
        y = longint'(b[NA-1:0]);
        got = longint'(pa[k]);
        checks++;
        if (got != model(k, x, y) || got > x * y) begin
          failures++;
          if (failures < 10) $display("FAIL TM(%0d,%0d) a=%0d b=%0d: p=%0d", NA, k, x, y, got);
        end else if (x * y - got > max_a[k]) begin
          max_a[k] = x * y - got;
        end
      end
    end
    for (int k = 0; k < NA; k++) begin
      checks++;
      $display("TM(%0d,%0d): worst-case error %0d (formula %0d)", NA, k, max_a[k], wce(NA, k));
      if (max_a[k] != wce(NA, k)) failures++;
    end
    for (int k = 0; k < NB; k++) begin
      checks++;
      $display("TM(%0d,%0d): worst-case error %0d (formula %0d)", NB, k, max_b[k], wce(NB, k));
      if (max_b[k] != wce(NB, k)) failures++;
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
