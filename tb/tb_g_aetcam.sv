// tb_g_aetcam: random writes (with random bit enables) and searches on the
// 64 x 36 G-AETCAM against a reference that keeps every word as a value
// vector and a don't-care vector. Checks every match line and every per-bit
// match vector one clock after each search, the reset state, and that a
// search in the same cycle as a write sees the old contents.
module tb_g_aetcam;
  localparam int DEPTH = 64;
  localparam int WIDTH = 36;
  localparam int AW    = $clog2(DEPTH);

  logic               clk = 1'b0;
  logic               rst_n;
  logic               we;
  logic [AW-1:0]      waddr;
  logic [2*WIDTH-1:0] wdata, wbe;
  logic [WIDTH-1:0]   s_w;
  logic [DEPTH-1:0]   m_l;
  logic [WIDTH-1:0]   bit_match [DEPTH];

  logic [WIDTH-1:0]   ref_val [DEPTH];
  logic [WIDTH-1:0]   ref_dc  [DEPTH];
  logic [DEPTH-1:0]   exp_ml;
  logic [WIDTH-1:0]   exp_bm  [DEPTH];
  int checks = 0, failures = 0;
  int hits = 0;

  g_aetcam #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [WIDTH-1:0] rand_w();
    return {$urandom(), $urandom()};
  endfunction

  // expected result of searching key in the reference
  task automatic expect_search(input logic [WIDTH-1:0] key);
    for (int w = 0; w < DEPTH; w++) begin
      exp_bm[w] = '0;
      for (int b = 0; b < WIDTH; b++)
        exp_bm[w][b] = ref_dc[w][b] || (ref_val[w][b] == key[b]);
      exp_ml[w] = (exp_bm[w] == '1);
    end
  endtask

  task automatic check_outputs();
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

  initial begin
    rst_n = 1'b0; we = 1'b0; waddr = '0; wdata = '0; wbe = '0; s_w = '0;
    for (int w = 0; w < DEPTH; w++) begin ref_val[w] = '0; ref_dc[w] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // reset state: all words hold zeros without don't cares
    s_w = 36'h0003c0001;
    expect_search(s_w);
    @(negedge clk);
    check_outputs();
    for (int it = 0; it < 3000; it++) begin
      logic [WIDTH-1:0] key;
      int src;
      we    = ($urandom_range(0, 1) == 1);
      waddr = AW'($urandom_range(0, DEPTH - 1));
      wdata = {rand_w(), rand_w()};
      // bias the don't-care bits towards 0 so that matches stay rare but occur
      for (int b = 0; b < WIDTH; b++) wdata[2*b+1] = ($urandom_range(0, 3) == 0);
      case ($urandom_range(0, 2))
        0: wbe = '1;
        1: wbe = {rand_w(), rand_w()};
        default: for (int b = 0; b < WIDTH; b++) wbe[2*b +: 2] = 2'b10;
      endcase
      // search keys: random, or a stored word with its don't cares scrambled
      src = $urandom_range(0, DEPTH - 1);
      key = rand_w();
      if ($urandom_range(0, 3) != 0)
        key = (ref_val[src] & ~ref_dc[src]) | (key & ref_dc[src]);
      s_w = key;
      expect_search(key);  // search sees the table before this cycle's write
      if (we) begin
        for (int b = 0; b < WIDTH; b++) begin
          if (wbe[2*b])   ref_val[waddr][b] = wdata[2*b];
          if (wbe[2*b+1]) ref_dc[waddr][b]  = wdata[2*b+1];
        end
      end
      @(negedge clk);
      check_outputs();
    end
    checks++;
    if (hits == 0) begin
      failures++;
      $display("FAIL no search ever matched");
    end
    $display("hits=%0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
