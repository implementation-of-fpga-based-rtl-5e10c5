// tb_tcam_update_top: end-to-end test of both TCAM designs at full size
// (64 x 36, top parameters left at their defaults).
//
// Both tables are loaded with random ternary entries through their own
// update path while each is searched every clock with keys drawn from its
// stored entries or at random; every match line and per-bit match vector is
// compared with a reference one clock after its key. It first checks the
// reset state with the key 0003c0001 (every untouched word, holding 0...0,
// answers fffc3fffe per bit). Each mechanism of the design is counted and
// must occur: MUX-Update storing and masking cycles, a search between the
// two cycles of an entry, LUT-Update bit loads, commits, idle clocks inside
// an entry, entries started in the previous commit cycle, pin patterns that
// are not one-hot, don't-care matches, multiple matches and misses.
module tb_tcam_update_top;
  import tb_tcam_ref::*;
  localparam int DEPTH = 64;
  localparam int WIDTH = 36;
  localparam int AW    = $clog2(DEPTH);

  logic             clk = 1'b0;
  logic             rst_n;
  logic             mux_upd_valid, mux_sm;
  logic [WIDTH-1:0] mux_din, mux_s_w;
  logic [AW-1:0]    mux_addr;
  logic [DEPTH-1:0] mux_m_l;
  logic [WIDTH-1:0] mux_bit_match [DEPTH];
  logic             lut_in_valid, lut_i0, lut_i1, lut_ix, lut_upd_done;
  logic [AW-1:0]    lut_addr;
  logic [WIDTH-1:0] lut_s_w;
  logic [DEPTH-1:0] lut_m_l;
  logic [WIDTH-1:0] lut_bit_match [DEPTH];

  tcam_update_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_mux_store = 0, n_mux_mask = 0, n_mux_half = 0;
  int n_lut_bits = 0, n_lut_commit = 0, n_lut_gap = 0, n_lut_b2b = 0, n_lut_bad = 0;
  int n_x_match = 0, n_multi = 0, n_miss = 0, n_hit = 0;

  tcam_model mux_mdl, lut_mdl;

  // ---------------- stimulus streams ----------------
  typedef struct {
    logic            valid;
    logic            sm;
    logic [MAXW-1:0] din;
    int              addr;
  } mux_op_t;

  typedef struct {
    logic            valid;
    logic [2:0]      pins;   // {Ix, I1, I0}
    int              addr;
    logic            last;
    logic            bad;
    logic            gap;    // idle clock inside an entry
    logic [MAXW-1:0] v, x;   // entry as the reference will hold it
  } lut_op_t;

  mux_op_t mux_q [$];
  lut_op_t lut_q [$];
  int      mux_probe_addr [$];  // entries whose second cycle is next

  task automatic gen_mux_entry();
    logic [MAXW-1:0] v, x;
    int a;
    a = $urandom_range(0, DEPTH - 1);
    rand_ternary(WIDTH, 2, v, x);
    mux_q.push_back('{1'b1, 1'b0, v, a});
    mux_q.push_back('{1'b1, 1'b1, x, a});
    repeat ($urandom_range(0, 3)) mux_q.push_back('{1'b0, 1'($urandom()), MAXW'({$urandom(), $urandom()}), 0});
  endtask

  task automatic gen_lut_entry();
    logic [MAXW-1:0] v, x;
    automatic logic [2:0] bad [5] = '{3'b000, 3'b011, 3'b101, 3'b110, 3'b111};
    int a;
    a = $urandom_range(0, DEPTH - 1);
    rand_ternary(WIDTH, 2, v, x);
    for (int b = 0; b < WIDTH; b++) begin
      lut_op_t op;
      if (b > 0 && $urandom_range(0, 15) == 0)
        lut_q.push_back('{1'b0, 3'($urandom()), 0, 1'b0, 1'b0, 1'b1, '0, '0});
      op.valid = 1'b1;
      op.bad   = 1'b0;
      op.gap   = 1'b0;
      op.pins  = x[b] ? 3'b100 : (v[b] ? 3'b010 : 3'b001);
      if (!x[b] && !v[b] && $urandom_range(0, 19) == 0) begin
        op.pins = bad[$urandom_range(0, 4)];  // not one-hot: stored as 0
        op.bad  = 1'b1;
      end
      op.addr = (b == WIDTH - 1) ? a : $urandom_range(0, DEPTH - 1);
      op.last = (b == WIDTH - 1);
      op.v = v;
      op.x = x;
      lut_q.push_back(op);
    end
    if ($urandom_range(0, 1) == 1) lut_q.push_back('{1'b0, 3'b000, 0, 1'b0, 1'b0, 1'b0, '0, '0});
  endtask

  function automatic logic [WIDTH-1:0] pick_key(tcam_model m);
    return ($urandom_range(0, 3) != 0) ? WIDTH'(m.key_for($urandom_range(0, DEPTH - 1)))
                                       : WIDTH'({$urandom(), $urandom()});
  endfunction

  // compare a table's outputs with the expectation and count what happened
  task automatic compare(string side, logic [DEPTH-1:0] ml, logic [WIDTH-1:0] bm [DEPTH],
                         logic [DEPTH-1:0] exp_ml, logic [WIDTH-1:0] exp_bm [DEPTH],
                         logic xm);
    checks++;
    if (ml !== exp_ml) begin
      failures++;
      $display("FAIL %s m_l=%h exp=%h", side, ml, exp_ml);
    end
    for (int w = 0; w < DEPTH; w++) begin
      checks++;
      if (bm[w] !== exp_bm[w]) begin
        failures++;
        $display("FAIL %s word %0d bit_match=%h exp=%h", side, w, bm[w], exp_bm[w]);
      end
    end
    if (ml == '0) n_miss++;
    else n_hit++;
    if ($countones(ml) > 1) n_multi++;
    if (xm) n_x_match++;
  endtask

  function automatic void expect_of(tcam_model m, logic [WIDTH-1:0] key,
                                    output logic [DEPTH-1:0] eml,
                                    output logic [WIDTH-1:0] ebm [DEPTH],
                                    output logic xm);
    xm = 1'b0;
    for (int w = 0; w < DEPTH; w++) begin
      ebm[w] = WIDTH'(m.bit_match(w, MAXW'(key)));
      eml[w] = m.word_match(w, MAXW'(key));
      // a match that needed a don't care
      if (eml[w] && ((m.val[w][WIDTH-1:0] ^ key) & m.dc[w][WIDTH-1:0]) != '0) xm = 1'b1;
    end
  endfunction

  logic             lut_pend;
  lut_op_t          lut_pend_op;

  initial begin
    logic [DEPTH-1:0] mux_eml, lut_eml;
    logic [WIDTH-1:0] mux_ebm [DEPTH];
    logic [WIDTH-1:0] lut_ebm [DEPTH];
    logic             mux_xm, lut_xm;
    logic             probe_now;
    int               probe_addr;

    mux_mdl = new(DEPTH, WIDTH);
    lut_mdl = new(DEPTH, WIDTH);
    lut_pend = 1'b0;
    rst_n = 1'b0;
    mux_upd_valid = 1'b0; mux_sm = 1'b0; mux_din = '0; mux_addr = '0; mux_s_w = '0;
    lut_in_valid = 1'b0; {lut_ix, lut_i1, lut_i0} = 3'b000; lut_addr = '0; lut_s_w = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // reset state, searched with the key 0003c0001
    mux_s_w = 36'h0003c0001;
    lut_s_w = 36'h0003c0001;
    @(negedge clk);
    for (int w = 0; w < DEPTH; w++) begin
      checks++;
      if (mux_bit_match[w] !== 36'hfffc3fffe || lut_bit_match[w] !== 36'hfffc3fffe) begin
        failures++;
        $display("FAIL reset state of word %0d", w);
      end
    end

    for (int cyc = 0; cyc < 6000; cyc++) begin
      mux_op_t mo;
      lut_op_t lo;
      if (mux_q.size() == 0) gen_mux_entry();
      if (lut_q.size() == 0) gen_lut_entry();
      mo = mux_q.pop_front();
      lo = lut_q.pop_front();

      // ---- MUX-Update side ----
      mux_upd_valid = mo.valid; mux_sm = mo.sm; mux_din = WIDTH'(mo.din); mux_addr = AW'(mo.addr);
      probe_now = mo.valid && mo.sm && ($urandom_range(0, 1) == 1) && (mux_mdl.dc[mo.addr] == '0);
      probe_addr = mo.addr;
      // between the two cycles: search for the stored values, with a bit that
      // is about to become X flipped when there is one
      mux_s_w = probe_now ? WIDTH'(mux_mdl.val[mo.addr] ^ (mo.din & -mo.din)) : pick_key(mux_mdl);
      expect_of(mux_mdl, mux_s_w, mux_eml, mux_ebm, mux_xm);
      if (mo.valid) begin
        if (!mo.sm) begin
          mux_mdl.val[mo.addr] = mo.din;
          mux_mdl.dc[mo.addr]  = '0;
          n_mux_store++;
        end else begin
          mux_mdl.dc[mo.addr] = mo.din;
          n_mux_mask++;
        end
      end

      // ---- LUT-Update side ----
      lut_in_valid = lo.valid; {lut_ix, lut_i1, lut_i0} = lo.pins; lut_addr = AW'(lo.addr);
      lut_s_w = pick_key(lut_mdl);
      expect_of(lut_mdl, lut_s_w, lut_eml, lut_ebm, lut_xm);
      checks++;
      if (lut_upd_done !== lut_pend) begin
        failures++;
        $display("FAIL upd_done=%b expected %b", lut_upd_done, lut_pend);
      end
      if (lut_pend) begin
        lut_mdl.val[lut_pend_op.addr] = lut_pend_op.v;
        lut_mdl.dc[lut_pend_op.addr]  = lut_pend_op.x;
        n_lut_commit++;
        if (lo.valid) n_lut_b2b++;
      end
      lut_pend = lo.valid && lo.last;
      lut_pend_op = lo;
      if (lo.valid) n_lut_bits++;
      if (lo.gap) n_lut_gap++;
      if (lo.bad) n_lut_bad++;

      @(negedge clk);
      compare("mux", mux_m_l, mux_bit_match, mux_eml, mux_ebm, mux_xm);
      compare("lut", lut_m_l, lut_bit_match, lut_eml, lut_ebm, lut_xm);
      if (probe_now) begin
        checks++;
        if (mux_m_l[probe_addr] !== (mux_din == '0)) begin
          failures++;
          $display("FAIL mux entry %0d: half-written entry answered %b", probe_addr, mux_m_l[probe_addr]);
        end
        n_mux_half++;
      end
    end

    $display("mux: store=%0d mask=%0d half_written_probes=%0d", n_mux_store, n_mux_mask, n_mux_half);
    $display("lut: bits=%0d commits=%0d gaps=%0d back_to_back=%0d not_one_hot=%0d",
             n_lut_bits, n_lut_commit, n_lut_gap, n_lut_b2b, n_lut_bad);
    $display("search: hits=%0d misses=%0d multi=%0d x_matches=%0d", n_hit, n_miss, n_multi, n_x_match);
    begin
      automatic int cnt [12] = '{n_mux_store, n_mux_mask, n_mux_half, n_lut_bits, n_lut_commit,
                                 n_lut_gap, n_lut_b2b, n_lut_bad, n_hit, n_miss, n_multi, n_x_match};
      foreach (cnt[i]) begin
        checks++;
        if (cnt[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", i);
        end
      end
    end
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
