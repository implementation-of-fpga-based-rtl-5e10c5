// tcam_update_top: the two proposed FPGA TCAM designs side by side.
//
// Both hold a DEPTH x WIDTH ternary table (64 x 36 by default) in a
// gate-area-effective layout (store bit and mask bit per ternary bit) and
// differ in how an entry is written:
//  - MUX-Update (mux_* ports): two clocks per entry over WIDTH data pins,
//    store bits first (mux_sm=0), then mask bits (mux_sm=1).
//  - LUT-Update (lut_* ports): WIDTH+1 clocks per entry over three pins
//    I0/I1/Ix, one ternary bit per clock, through a lookup-table encoder, a
//    reversible 1-to-64 demultiplexer and a buffer register.
// Each design has its own table and its own search port; they share only
// clock and reset. Searches answer one clock after the key is presented.
module tcam_update_top
  import tcam_pkg::*;
#(
  parameter int unsigned DEPTH = TCAM_DEPTH,
  parameter int unsigned WIDTH = TCAM_WIDTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // MUX-Update TCAM
  input  logic                     mux_upd_valid,
  input  logic                     mux_sm,
  input  logic [WIDTH-1:0]         mux_din,
  input  logic [$clog2(DEPTH)-1:0] mux_addr,
  input  logic [WIDTH-1:0]         mux_s_w,
  output logic [DEPTH-1:0]         mux_m_l,
  output logic [WIDTH-1:0]         mux_bit_match [DEPTH],
  // LUT-Update TCAM
  input  logic                     lut_in_valid,
  input  logic                     lut_i0,
  input  logic                     lut_i1,
  input  logic                     lut_ix,
  input  logic [$clog2(DEPTH)-1:0] lut_addr,
  input  logic [WIDTH-1:0]         lut_s_w,
  output logic [DEPTH-1:0]         lut_m_l,
  output logic [WIDTH-1:0]         lut_bit_match [DEPTH],
  output logic                     lut_upd_done
);

  mux_update_tcam #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_mux_tcam (
    .clk, .rst_n,
    .upd_valid (mux_upd_valid),
    .sm        (mux_sm),
    .din       (mux_din),
    .addr      (mux_addr),
    .s_w       (mux_s_w),
    .m_l       (mux_m_l),
    .bit_match (mux_bit_match)
  );

  lut_update_tcam #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_lut_tcam (
    .clk, .rst_n,
    .in_valid  (lut_in_valid),
    .i0        (lut_i0),
    .i1        (lut_i1),
    .ix        (lut_ix),
    .addr      (lut_addr),
    .s_w       (lut_s_w),
    .m_l       (lut_m_l),
    .bit_match (lut_bit_match),
    .upd_done  (lut_upd_done)
  );

endmodule
