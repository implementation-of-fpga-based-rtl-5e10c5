// tb_rev_demux64: exhaustive test of the 1-to-64 demultiplexer tree: every
// select value with data 0 and 1, output must be one-hot at the selected
// index (or all zero).
module tb_rev_demux64;
  logic        i;
  logic [5:0]  sel;
  logic [63:0] z;
  int checks = 0, failures = 0;

  rev_demux64 dut (.i, .sel, .z);

  initial begin
    for (int v = 0; v < 128; v++) begin
      {i, sel} = 7'(v);
      #1;
      for (int k = 0; k < 64; k++) begin
        checks++;
        if (z[k] !== (i && k == int'(sel))) begin
          failures++;
          $display("FAIL i=%b sel=%0d z[%0d]=%b", i, sel, k, z[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
