// mux_update_tcam: the MUX-Update TCAM, a DEPTH x WIDTH G-AETCAM (64 x 36 by
// default) updated through the MUX-Update path.
//
// An entry takes two update cycles on the WIDTH data pins: first its store
// bits with sm=0, then its mask bits (1 = X) with sm=1, both with upd_valid=1
// and the same addr. The table is searched every cycle with s_w; m_l and
// bit_match answer one clock after s_w is presented. Composition as in the
// published block diagram; see mux_update and g_aetcam for the details.
module mux_update_tcam
  import tcam_pkg::*;
#(
  parameter int unsigned DEPTH = TCAM_DEPTH,
  parameter int unsigned WIDTH = TCAM_WIDTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     upd_valid,
  input  logic                     sm,
  input  logic [WIDTH-1:0]         din,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         s_w,
  output logic [DEPTH-1:0]         m_l,
  output logic [WIDTH-1:0]         bit_match [DEPTH]
);

  logic                     we;
  logic [$clog2(DEPTH)-1:0] waddr;
  logic [2*WIDTH-1:0]       wdata;
  logic [2*WIDTH-1:0]       wbe;

  mux_update #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_upd (
    .upd_valid, .sm, .din, .addr,
    .we, .waddr, .wdata, .wbe
  );

  g_aetcam #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_tcam (
    .clk, .rst_n, .we, .waddr, .wdata, .wbe,
    .s_w, .m_l, .bit_match
  );

endmodule
