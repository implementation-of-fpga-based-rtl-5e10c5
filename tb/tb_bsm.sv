// tb_bsm: all eight pin patterns of the bit-select memory against the
// expected {mask, store} codes: 0 -> 00, 1 -> 01, X -> 10, others 00.
module tb_bsm;
  import tcam_pkg::*;
  logic       ix, i1, i0;
  tbit_code_e code;
  int checks = 0, failures = 0;
  // expected code for {Ix,I1,I0} = 0..7
  localparam logic [1:0] EXP [8] = '{2'b00, 2'b00, 2'b01, 2'b00,
                                     2'b10, 2'b00, 2'b00, 2'b00};

  bsm dut (.ix, .i1, .i0, .code);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {ix, i1, i0} = 3'(v);
      #1;
      checks++;
      if (code !== EXP[v]) begin
        failures++;
        $display("FAIL pins=%03b code=%b exp=%b", v[2:0], code, EXP[v]);
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
