// lut_update: write path of the LUT-Update mechanism.
//
// An entry is sent one ternary bit per clock over three pins I0, I1 and Ix
// (one-hot: the bit is 0, 1 or X). The bit-select memory (bsm) turns the
// pins into the bit's 2-bit G-AETCAM code {mask, store}. A CNT_W-bit counter
// counts the bits of the entry from 0 to WIDTH-1 and selects, through a
// 1-to-2**CNT_W reversible demultiplexer, which pair BR[2i+1:2i] of the
// 2*WIDTH-bit buffer register (BR) the code is dropped into. The
// demultiplexer carries three lanes, the two code bits and a load strobe, so
// only the selected pair changes. In the clock after the last bit the whole
// BR is written into word addr of the G-AETCAM, so an entry takes WIDTH+1
// clocks (37 for WIDTH=36).
//
// Interface: in_valid marks a cycle whose pins carry the next bit; bits of
// an entry need not be back to back. addr is sampled with the last bit. The
// outputs form the G-AETCAM write port (we is high for the commit cycle,
// wbe all ones). A new entry may start in the commit cycle, because the
// table takes the BR contents from before that clock edge.
// The BSM tables, the counter-driven demultiplexer, the BR and the WIDTH+1
// latency follow the published design; the valid/address handshake, the
// three-lane demultiplexer and the reset are this implementation's choices.
module lut_update
  import tcam_pkg::*;
#(
  parameter int unsigned WIDTH = TCAM_WIDTH,
  parameter int unsigned DEPTH = TCAM_DEPTH,
  parameter int unsigned CNT_W = 6
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     i0,
  input  logic                     i1,
  input  logic                     ix,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic                     we,
  output logic [$clog2(DEPTH)-1:0] waddr,
  output logic [2*WIDTH-1:0]       wdata,
  output logic [2*WIDTH-1:0]       wbe,
  output logic [2*WIDTH-1:0]       br,
  output logic [CNT_W-1:0]         cnt
);

  localparam int unsigned NOUT = 2**CNT_W;

  if (WIDTH > NOUT || WIDTH < 1) begin : g_bad_width
    $error("lut_update: WIDTH must be between 1 and 2**CNT_W");
  end

  tbit_code_e               code;
  logic [NOUT-1:0]          lane_store;
  logic [NOUT-1:0]          lane_mask;
  logic [NOUT-1:0]          lane_load;
  logic                     last_bit;
  logic                     commit_q;
  logic [$clog2(DEPTH)-1:0] addr_q;

  bsm u_bsm (.ix, .i1, .i0, .code);

  rev_demux64 #(.SEL_W(CNT_W)) u_dmux_store (.i(code[0]), .sel(cnt), .z(lane_store));
  rev_demux64 #(.SEL_W(CNT_W)) u_dmux_mask  (.i(code[1]), .sel(cnt), .z(lane_mask));
  rev_demux64 #(.SEL_W(CNT_W)) u_dmux_load  (.i(in_valid), .sel(cnt), .z(lane_load));

  assign last_bit = in_valid && (cnt == CNT_W'(WIDTH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      br       <= '0;
      commit_q <= 1'b0;
      addr_q   <= '0;
    end else begin
      for (int k = 0; k < WIDTH; k++) begin
        if (lane_load[k]) br[2*k +: 2] <= {lane_mask[k], lane_store[k]};
      end
      if (in_valid) cnt <= last_bit ? '0 : cnt + 1'b1;
      commit_q <= last_bit;
      if (last_bit) addr_q <= addr;
    end
  end

  assign we    = commit_q;
  assign waddr = addr_q;
  assign wdata = br;
  assign wbe   = '1;

  // the counter never leaves 0..WIDTH-1
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n) cnt < CNT_W'(WIDTH))
    else $error("lut_update: bit counter out of range");

endmodule
