// g_aetcam: gate-area-effective ternary CAM of DEPTH words x WIDTH ternary
// bits (64 x 36 by default).
//
// Each ternary bit is kept as two flip-flops of a 2*WIDTH-bit word: the store
// bit at even position 2i and the mask bit at odd position 2i+1 (mask 1 = X,
// "don't care"). Bit i of a word matches the search word S_w when its mask is
// 1 or its store bit equals S_w[i]; the word's match line M_L is the AND of its
// WIDTH bit matches. All words are compared in parallel.
//
// Write port: when we=1 the bits of word waddr whose wbe bit is 1 take the
// value of wdata at the clock edge. The bit enables let an update path write
// the store half and the mask half of a word in separate cycles.
// Search port: S_w is sampled at the clock edge and m_l (one bit per word) and
// bit_match (the per-bit match vector of every word) are valid after it, so a
// search takes one clock. A search in the same cycle as a write sees the table
// before the write. Reset (active low) clears the table to all zeros, i.e.
// every word holds 0...0 with no don't-care bits.
//
// The published design gives this table's size, its word layout and its ports
// (Clk, S_w, M_L); the register-array organisation, the write address and bit
// enables, the registered outputs and the reset are this implementation's
// choices.
module g_aetcam
  import tcam_pkg::*;
#(
  parameter int unsigned DEPTH = TCAM_DEPTH,
  parameter int unsigned WIDTH = TCAM_WIDTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // write port
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [2*WIDTH-1:0]       wdata,
  input  logic [2*WIDTH-1:0]       wbe,
  // search port
  input  logic [WIDTH-1:0]         s_w,
  output logic [DEPTH-1:0]         m_l,
  output logic [WIDTH-1:0]         bit_match [DEPTH]
);

  logic [2*WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0]   bm_next [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < DEPTH; w++) mem[w] <= '0;
    end else if (we) begin
      mem[waddr] <= (mem[waddr] & ~wbe) | (wdata & wbe);
    end
  end

  always_comb begin
    for (int w = 0; w < DEPTH; w++) begin
      for (int b = 0; b < WIDTH; b++) begin
        bm_next[w][b] = mem[w][2*b+1] | (mem[w][2*b] ~^ s_w[b]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_l <= '0;
      for (int w = 0; w < DEPTH; w++) bit_match[w] <= '0;
    end else begin
      for (int w = 0; w < DEPTH; w++) begin
        bit_match[w] <= bm_next[w];
        m_l[w]       <= &bm_next[w];
      end
    end
  end

endmodule
