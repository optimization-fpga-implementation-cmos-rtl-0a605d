// Self-checking test of the Sayem gate: all sixteen inputs against the gate's
// equations worked out case by case (A selects between B and C), plus a check
// that the sixteen outputs are all different (the gate is reversible).
module tb_sayem_gate;
  logic a, b, c, d, p, q, r, s;
  logic [3:0] exp_out;
  logic chosen, other;
  int checks = 0, failures = 0;
  logic [3:0] seen [16];

  sayem_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      if (a) begin chosen = c; other = b; end
      else   begin chosen = b; other = c; end
      exp_out = {a, chosen, d ? ~chosen : chosen, d ? ~other : other};
      checks++;
      if ({p, q, r, s} !== exp_out) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", 4'(i), {p, q, r, s}, exp_out);
      end
      seen[i] = {p, q, r, s};
    end
    for (int i = 0; i < 16; i++)
      for (int j = i + 1; j < 16; j++) begin
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
