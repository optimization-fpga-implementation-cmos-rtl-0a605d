// Self-checking test of the Fredkin gate: all eight inputs against the
// controlled-swap rule (A = 0 passes B, C to Q, R; A = 1 swaps them), plus a
// check that the outputs are all different and keep the number of ones.
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  logic [2:0] exp_out;
  int checks = 0, failures = 0;
  logic [2:0] seen [8];

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      exp_out = a ? {a, c, b} : {a, b, c};
      checks++;
      if ({p, q, r} !== exp_out) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", 3'(i), {p, q, r}, exp_out);
      end
      checks++;
      if ($countones({p, q, r}) != $countones(3'(i))) begin
        failures++;
        $display("FAIL ones not conserved for in=%b", 3'(i));
      end
      seen[i] = {p, q, r};
    end
    for (int i = 0; i < 8; i++)
      for (int j = i + 1; j < 8; j++) begin
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
