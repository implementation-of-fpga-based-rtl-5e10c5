// tb_lut_update: the LUT-Update write path at two sizes.
//  - WIDTH=4: the entry "10X1" (bit 3 first as written, sent bit 0 first)
//    must fill the 8-bit buffer register with 01 00 10 01 and be committed
//    in the fifth clock, i.e. WIDTH+1 clocks after its first bit.
//  - WIDTH=36 (default): random entries, with gaps in the valid bits, with
//    pin patterns that are not one-hot (coded as 0) and with entries that
//    start in the previous entry's commit cycle; checks the buffer register
//    after each bit, the commit strobe, address and data, and the latency.
module tb_lut_update;
  localparam int DEPTH = 64;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // ---------------- WIDTH = 4 example ----------------
  logic          v4, a0, a1, ax;
  logic [AW-1:0] addr4, waddr4;
  logic          we4;
  logic [7:0]    wdata4, wbe4, br4;
  logic [5:0]    cnt4;

  lut_update #(.WIDTH(4), .DEPTH(DEPTH)) dut4 (
    .clk, .rst_n, .in_valid(v4), .i0(a0), .i1(a1), .ix(ax), .addr(addr4),
    .we(we4), .waddr(waddr4), .wdata(wdata4), .wbe(wbe4), .br(br4), .cnt(cnt4)
  );

  // ---------------- WIDTH = 36 ----------------
  logic          v, p0, p1, px;
  logic [AW-1:0] addr, waddr;
  logic          we;
  logic [71:0]   wdata, wbe, br;
  logic [5:0]    cnt;

  lut_update dut (
    .clk, .rst_n, .in_valid(v), .i0(p0), .i1(p1), .ix(px), .addr,
    .we, .waddr, .wdata, .wbe, .br, .cnt
  );

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // pins for a ternary digit: 0, 1, 2 = X, 3 = a random pattern that is not one-hot
  function automatic logic [2:0] pins_for(int t);
    logic [2:0] bad [5] = '{3'b000, 3'b011, 3'b101, 3'b110, 3'b111};
    case (t)
      0: return 3'b001;
      1: return 3'b010;
      2: return 3'b100;
      default: return bad[$urandom_range(0, 4)];
    endcase
  endfunction

  int back_to_back = 0, gaps = 0, bad_codes = 0, commits = 0;

  initial begin
    rst_n = 1'b0; v4 = 0; a0 = 0; a1 = 0; ax = 0; addr4 = '0;
    v = 0; p0 = 0; p1 = 0; px = 0; addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // "10X1": bit0=1, bit1=X, bit2=0, bit3=1
    begin
      automatic logic [2:0] seq [4] = '{3'b010, 3'b100, 3'b001, 3'b010};  // {Ix,I1,I0}
      automatic int edges;
      edges = 0;
      for (int b = 0; b < 4; b++) begin
        {ax, a1, a0} = seq[b];
        v4 = 1'b1;
        addr4 = (b == 3) ? AW'(37) : AW'(0);
        @(negedge clk);
        edges++;
        if (b < 3) check(we4 == 1'b0, "W=4: commit before the last bit was loaded");
      end
      v4 = 1'b0;
      check(br4 == 8'b01_00_10_01, $sformatf("W=4: BR=%b, expected 01001001", br4));
      check(we4 == 1'b1 && waddr4 == AW'(37) && wdata4 == 8'b01001001 && wbe4 == 8'hFF,
            "W=4: no commit of BR in the cycle after the last bit");
      @(negedge clk);
      edges++;
      // the commit is taken at this (fifth) clock edge
      check(edges == 5, "W=4: update does not take W+1 = 5 clocks");
      check(we4 == 1'b0, "W=4: commit strobe longer than one clock");
    end

    // WIDTH = 36 random entries
    for (int e = 0; e < 300; e++) begin
      automatic int t [36];
      automatic logic [71:0] exp_br;
      automatic int a;
      a = $urandom_range(0, DEPTH - 1);
      for (int b = 0; b < 36; b++) begin
        t[b] = $urandom_range(0, 9);
        if (t[b] > 3) t[b] = t[b] % 3;
      end
      exp_br = br;
      for (int b = 0; b < 36; b++) begin
        // occasional idle clock inside an entry
        if (b > 0 && $urandom_range(0, 7) == 0) begin
          v = 1'b0;
          {px, p1, p0} = 3'($urandom());
          @(negedge clk);
          gaps++;
          check(br == exp_br && we == 1'b0 && cnt == 6'(b), "W=36: state changed on an idle clock");
        end
        {px, p1, p0} = pins_for(t[b]);
        if (t[b] == 3) bad_codes++;
        v = 1'b1;
        addr = AW'((b == 35) ? a : $urandom_range(0, DEPTH - 1));
        if (b == 0 && we) back_to_back++;
        case (t[b])
          1: exp_br[2*b +: 2] = 2'b01;
          2: exp_br[2*b +: 2] = 2'b10;
          default: exp_br[2*b +: 2] = 2'b00;
        endcase
        @(negedge clk);
        check(br == exp_br, $sformatf("W=36: BR after bit %0d is %h, expected %h", b, br, exp_br));
        if (b < 35) check(we == 1'b0, "W=36: early commit");
      end
      v = 1'b0;
      check(we == 1'b1 && waddr == AW'(a) && wdata == exp_br && wbe == '1,
            $sformatf("W=36: commit wrong: we=%b waddr=%0d", we, waddr));
      check(cnt == 6'd0, "W=36: counter did not wrap after bit 35");
      if (we) commits++;
      // half of the entries start the next entry in the commit cycle
      if ($urandom_range(0, 1) == 1) begin
        @(negedge clk);
        check(we == 1'b0, "W=36: commit strobe longer than one clock");
      end
    end
    check(back_to_back > 0 && gaps > 0 && bad_codes > 0 && commits == 300,
          "W=36: a case was never exercised");
    $display("commits=%0d back_to_back=%0d gaps=%0d bad_codes=%0d", commits, back_to_back, gaps, bad_codes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
