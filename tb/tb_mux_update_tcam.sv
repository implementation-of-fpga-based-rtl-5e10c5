// tb_mux_update_tcam: writes random ternary entries into the 64 x 36
// MUX-Update TCAM, two clocks per entry (store bits, then mask bits), while a
// search runs every clock; every match line and per-bit match vector is
// compared with a reference one clock after its key. Also checks the update
// latency: between the two update cycles an entry's don't cares are not yet
// set, and a search issued after the second cycle finds the full entry.
module tb_mux_update_tcam;
  import tb_tcam_ref::*;
  localparam int DEPTH = 64;
  localparam int WIDTH = 36;
  localparam int AW    = $clog2(DEPTH);

  logic             clk = 1'b0;
  logic             rst_n, upd_valid, sm;
  logic [WIDTH-1:0] din, s_w;
  logic [AW-1:0]    addr;
  logic [DEPTH-1:0] m_l;
  logic [WIDTH-1:0] bit_match [DEPTH];

  tcam_model        mdl;
  logic [DEPTH-1:0] exp_ml;
  logic [WIDTH-1:0] exp_bm [DEPTH];
  int checks = 0, failures = 0;
  int hits = 0, half_written_misses = 0, full_written_hits = 0;

  mux_update_tcam dut (.*);

  always #5 clk = ~clk;

  // one clock: present an update half-word and a search key, then check
  task automatic step(input logic v, input logic s, input logic [WIDTH-1:0] d,
                      input int a, input logic [WIDTH-1:0] key);
    upd_valid = v; sm = s; din = d; addr = AW'(a); s_w = key;
    for (int w = 0; w < DEPTH; w++) begin
      exp_bm[w] = WIDTH'(mdl.bit_match(w, MAXW'(key)));
      exp_ml[w] = mdl.word_match(w, MAXW'(key));
    end
    if (v) begin
      if (!s) begin
        mdl.val[a] = MAXW'(d);  // storing cycle: new values, no don't cares yet
        mdl.dc[a]  = '0;
      end else begin
        mdl.dc[a]  = MAXW'(d);  // masking cycle: don't cares
      end
    end
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

  initial begin
    logic [MAXW-1:0] v, x;
    logic [WIDTH-1:0] probe;
    mdl = new(DEPTH, WIDTH);
    rst_n = 1'b0; upd_valid = 1'b0; sm = 1'b0; din = '0; addr = '0; s_w = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int e = 0; e < 400; e++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      rand_ternary(WIDTH, 2, v, x);
      x[0] = 1'b1;  // at least one X, at bit 0
      v[0] = 1'b0;
      // probe: the entry's values with the X bit 0 set to 1
      probe = WIDTH'(v) | WIDTH'(1);
      step(1'b1, 1'b0, WIDTH'(v), a, WIDTH'(mdl.key_for($urandom_range(0, DEPTH - 1))));
      // after the storing cycle only: bit 0 is still a stored 0
      step(1'b1, 1'b1, WIDTH'(x), a, probe);
      checks++;
      if (m_l[a] !== 1'b0) begin
        failures++;
        $display("FAIL entry %0d matched before its mask bits were written", a);
      end else half_written_misses++;
      // after both cycles the X at bit 0 matches the probe
      step(1'b0, 1'b0, '0, 0, probe);
      checks++;
      if (m_l[a] !== 1'b1) begin
        failures++;
        $display("FAIL entry %0d not found two clocks after its update started", a);
      end else full_written_hits++;
      // a few idle clocks with random or stored keys
      repeat ($urandom_range(0, 2)) begin
        logic [WIDTH-1:0] k;
        k = ($urandom_range(0, 1) == 1) ? WIDTH'(mdl.key_for($urandom_range(0, DEPTH - 1)))
                                         : WIDTH'({$urandom(), $urandom()});
        step(1'b0, 1'($urandom_range(0, 1)), WIDTH'({$urandom(), $urandom()}), 0, k);
      end
    end
    $display("hits=%0d half_written_misses=%0d full_written_hits=%0d", hits, half_written_misses, full_written_hits);
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
