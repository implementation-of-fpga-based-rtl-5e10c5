// lut_update_tcam: the LUT-Update TCAM, a DEPTH x WIDTH G-AETCAM (64 x 36 by
// default) updated through the LUT-Update path.
//
// An entry is sent as WIDTH consecutive valid bits on the three pins I0, I1,
// Ix, bit 0 first, with addr valid together with the last bit. upd_done
// pulses in the clock after the last bit, when the buffer register is written
// into the table; a search presented in that cycle or later sees the new
// entry, with m_l and bit_match answering one clock after s_w. Composition as
// in the published block diagram; see lut_update and g_aetcam for details.
// The buffer-register and counter observation outputs of lut_update are left
// unused here (a lint tool reports them as unused signals).
module lut_update_tcam
  import tcam_pkg::*;
#(
  parameter int unsigned DEPTH = TCAM_DEPTH,
  parameter int unsigned WIDTH = TCAM_WIDTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     i0,
  input  logic                     i1,
  input  logic                     ix,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         s_w,
  output logic [DEPTH-1:0]         m_l,
  output logic [WIDTH-1:0]         bit_match [DEPTH],
  output logic                     upd_done
);

  logic                     we;
  logic [$clog2(DEPTH)-1:0] waddr;
  logic [2*WIDTH-1:0]       wdata;
  logic [2*WIDTH-1:0]       wbe;
  logic [2*WIDTH-1:0]       br;
  logic [5:0]               cnt;

  lut_update #(.WIDTH(WIDTH), .DEPTH(DEPTH), .CNT_W(6)) u_upd (
    .clk, .rst_n, .in_valid, .i0, .i1, .ix, .addr,
    .we, .waddr, .wdata, .wbe, .br, .cnt
  );

  g_aetcam #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_tcam (
    .clk, .rst_n, .we, .waddr, .wdata, .wbe,
    .s_w, .m_l, .bit_match
  );

  assign upd_done = we;

endmodule
