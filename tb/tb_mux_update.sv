// tb_mux_update: random inputs to the MUX-Update write path; checks that the
// storing cycle puts the pins on the even bits with the odd bits cleared and
// all bits enabled, and that the masking cycle puts them on the odd bits with
// only the odd bits enabled.
module tb_mux_update;
  localparam int WIDTH = 36;
  localparam int DEPTH = 64;

  logic                     upd_valid, sm, we;
  logic [WIDTH-1:0]         din;
  logic [$clog2(DEPTH)-1:0] addr, waddr;
  logic [2*WIDTH-1:0]       wdata, wbe;
  logic [2*WIDTH-1:0]       exp_data, exp_be;
  int checks = 0, failures = 0;

  mux_update dut (.*);

  initial begin
    for (int it = 0; it < 2000; it++) begin
      upd_valid = 1'($urandom_range(0, 1));
      sm        = 1'($urandom_range(0, 1));
      din       = {$urandom(), $urandom()};
      addr      = 6'($urandom_range(0, DEPTH - 1));
      #1;
      for (int b = 0; b < WIDTH; b++) begin
        exp_data[2*b]   = sm ? 1'b0 : din[b];
        exp_data[2*b+1] = sm ? din[b] : 1'b0;
        exp_be[2*b]     = !sm;
        exp_be[2*b+1]   = 1'b1;
      end
      checks++;
      if (we !== upd_valid || waddr !== addr) begin
        failures++;
        $display("FAIL we=%b waddr=%0d", we, waddr);
      end
      checks++;
      if (wdata !== exp_data || wbe !== exp_be) begin
        failures++;
        $display("FAIL sm=%b din=%h wdata=%h exp=%h wbe=%h exp=%h", sm, din, wdata, exp_data, wbe, exp_be);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
