// tb_rev_demux4: exhaustive test of the 1-to-4 R-gate demultiplexer, including
// its garbage outputs (G1 = S1, G2 = G3 = S0).
module tb_rev_demux4;
  logic       i;
  logic [1:0] s;
  logic [3:0] z;
  logic [3:1] g;
  int checks = 0, failures = 0;

  rev_demux4 dut (.i, .s, .z, .g);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {i, s} = 3'(v);
      #1;
      checks++;
      if (z !== (i ? 4'(1) << s : 4'b0)) begin
        failures++;
        $display("FAIL i=%b s=%0d z=%b", i, s, z);
      end
      checks++;
      if (g !== {s[0], s[0], s[1]}) begin
        failures++;
        $display("FAIL garbage i=%b s=%0d g=%b", i, s, g);
      end
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
