// tb_r_gate: exhaustive test of the R gate against its truth table, plus a
// check that with C=0 (its use as a 1-to-2 demultiplexer) the four (A,B)
// patterns give four different output patterns. The gate equations are not
// one-to-one over all eight inputs: with A=0, C reaches no output.
module tb_r_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  // expected {P,Q,R} for input {A,B,C} = 0..7
  localparam logic [2:0] EXP [8] = '{3'b000, 3'b000, 3'b001, 3'b001,
                                     3'b100, 3'b101, 3'b110, 3'b111};
  logic [7:0] seen;

  r_gate dut (.a, .b, .c, .p, .q, .r);

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== EXP[v]) begin
        failures++;
        $display("FAIL abc=%03b pqr=%b%b%b exp=%03b", v[2:0], p, q, r, EXP[v]);
      end
      if (c == 1'b0) seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if ($countones(seen) != 4) begin
      failures++;
      $display("FAIL outputs with C=0 are not distinct, seen=%b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
