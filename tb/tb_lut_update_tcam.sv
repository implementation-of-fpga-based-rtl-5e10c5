// tb_lut_update_tcam: writes random ternary entries into the 64 x 36
// LUT-Update TCAM, one bit per clock on the I0/I1/Ix pins, while a search
// runs every clock; every match line and per-bit match vector is compared
// with a reference one clock after its key. The reference takes an entry in
// the clock after its last bit, so the test also checks the WIDTH+1 update
// latency, and it checks that upd_done pulses exactly then.
module tb_lut_update_tcam;
  import tb_tcam_ref::*;
  localparam int DEPTH = 64;
  localparam int WIDTH = 36;
  localparam int AW    = $clog2(DEPTH);

  logic             clk = 1'b0;
  logic             rst_n, in_valid, i0, i1, ix, upd_done;
  logic [WIDTH-1:0] s_w;
  logic [AW-1:0]    addr;
  logic [DEPTH-1:0] m_l;
  logic [WIDTH-1:0] bit_match [DEPTH];

  tcam_model        mdl;
  logic [DEPTH-1:0] exp_ml;
  logic [WIDTH-1:0] exp_bm [DEPTH];
  int checks = 0, failures = 0;
  int hits = 0, commits = 0;
  // entry whose last bit was sent in the previous clock
  logic             pend;
  int               pend_addr;
  logic [MAXW-1:0]  pend_v, pend_x;

  lut_update_tcam dut (.*);

  always #5 clk = ~clk;

  task automatic step(input logic v, input logic [2:0] pins, input int a,
                      input logic [WIDTH-1:0] key, input logic last,
                      input logic [MAXW-1:0] ev, input logic [MAXW-1:0] ex);
    in_valid = v; {ix, i1, i0} = pins; addr = AW'(a); s_w = key;
    for (int w = 0; w < DEPTH; w++) begin
      exp_bm[w] = WIDTH'(mdl.bit_match(w, MAXW'(key)));
      exp_ml[w] = mdl.word_match(w, MAXW'(key));
    end
    checks++;
    if (upd_done !== pend) begin
      failures++;
      $display("FAIL upd_done=%b expected %b", upd_done, pend);
    end
    if (pend) begin
      mdl.val[pend_addr] = pend_v;
      mdl.dc[pend_addr]  = pend_x;
      commits++;
    end
    pend = last; pend_addr = a; pend_v = ev; pend_x = ex;
    @(negedge clk);
    checks++;
    if (m_l !== exp_ml) begin
      failures++;
      $display("FAIL m_l=%h exp=%h", m_l, exp_ml);
    end
    for (int w = 0; w < DEPTH; w++) begin
      checks++;
      if (bit_match[w] !== exp_bm[w]) begin
        failures++;
        $display("FAIL word %0d bit_match=%h exp=%h", w, bit_match[w], exp_bm[w]);
      end
    end
    hits += $countones(m_l);
  endtask

  function automatic logic [WIDTH-1:0] any_key();
    return ($urandom_range(0, 2) != 0) ? WIDTH'(mdl.key_for($urandom_range(0, DEPTH - 1)))
                                       : WIDTH'({$urandom(), $urandom()});
  endfunction

  initial begin
    logic [MAXW-1:0] v, x;
    mdl = new(DEPTH, WIDTH);
    pend = 1'b0; pend_addr = 0; pend_v = '0; pend_x = '0;
    rst_n = 1'b0; in_valid = 1'b0; {ix, i1, i0} = 3'b000; addr = '0; s_w = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int e = 0; e < 120; e++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      rand_ternary(WIDTH, 2, v, x);
      for (int b = 0; b < WIDTH; b++) begin
        logic [2:0] pins;
        pins = x[b] ? 3'b100 : (v[b] ? 3'b010 : 3'b001);
        if (b > 0 && $urandom_range(0, 9) == 0)
          step(1'b0, 3'($urandom()), 0, any_key(), 1'b0, '0, '0);
        step(1'b1, pins, (b == WIDTH - 1) ? a : 0, any_key(), b == WIDTH - 1, v, x);
      end
      repeat ($urandom_range(0, 2)) step(1'b0, 3'b000, 0, any_key(), 1'b0, '0, '0);
    end
    step(1'b0, 3'b000, 0, any_key(), 1'b0, '0, '0);
    checks++;
    if (commits != 120 || hits == 0) begin
      failures++;
      $display("FAIL commits=%0d hits=%0d", commits, hits);
    end
    $display("commits=%0d hits=%0d", commits, hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
