// tb_feynman_gate: exhaustive check of the Feynman gate, P = A, Q = A xor B,
// written out as the four-row truth table, plus a check that the gate is
// reversible (the four input pairs give four different output pairs).
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  // Expected {P,Q} for {A,B} = 00, 01, 10, 11.
  logic [1:0] expect_pq [4] = '{2'b00, 2'b01, 2'b11, 2'b10};
  logic [3:0] seen;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({p, q} !== expect_pq[i]) begin
        failures++;
        $display("FAIL a=%b b=%b p=%b q=%b", a, b, p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen !== 4'hF) begin
      failures++;
      $display("FAIL outputs not one-to-one: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
