// Self-checking test of the Feynman gate: all four input pairs against the
// gate's truth table written out here, plus a check that the four outputs
// are all different (the gate is reversible).
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  logic [1:0] seen [4];

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  // expected {P,Q} for input {A,B} = 00, 01, 10, 11
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({p, q} !== EXP[i]) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", 2'(i), {p, q}, EXP[i]);
      end
      seen[i] = {p, q};
    end
    for (int i = 0; i < 4; i++)
      for (int j = i + 1; j < 4; j++) begin
        checks++;
        if (seen[i] == seen[j]) begin
          failures++;
          $display("FAIL not reversible: inputs %0d and %0d collide", i, j);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
