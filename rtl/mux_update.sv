// mux_update: write path of the MUX-Update mechanism.
//
// An entry is written in two clock cycles over WIDTH input pins. In the
// storing cycle (sm=0) the pins carry the entry's store bits; in the masking
// cycle (sm=1) they carry its mask bits (1 for every X). A 1-to-2
// demultiplexer, one R gate per bit with A=sm, B=din[i], C=0, steers the pins
// to the odd (mask) positions [2W-1:2:1] through Q when sm=1, or to the even
// (store) positions [2W-2:2:0] through R when sm=0.
// The storing cycle writes the whole word, clearing the mask bits, so the
// entry starts from all zeros; the masking cycle writes only the odd bits and
// leaves the store bits as they are.
//
// Interface: upd_valid marks a cycle that carries a half-word for word addr.
// The outputs form the G-AETCAM write port and are combinational from the
// inputs, so the half-word is stored at the same clock edge; the complete
// entry is in the table after two edges and searchable one clock later.
// The two-cycle storing/masking scheme and the bit positions follow the
// published design; the R-gate realisation of the 1-to-2 demultiplexer, the
// valid and address inputs are this implementation's choices.
module mux_update
  import tcam_pkg::*;
#(
  parameter int unsigned WIDTH = TCAM_WIDTH,
  parameter int unsigned DEPTH = TCAM_DEPTH
) (
  input  logic                     upd_valid,
  input  logic                     sm,       // 0: storing bits, 1: masking bits
  input  logic [WIDTH-1:0]         din,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic                     we,
  output logic [$clog2(DEPTH)-1:0] waddr,
  output logic [2*WIDTH-1:0]       wdata,
  output logic [2*WIDTH-1:0]       wbe
);

  logic [WIDTH-1:0] to_odd;   // Q outputs: mask bits
  logic [WIDTH-1:0] to_even;  // R outputs: store bits
  logic [WIDTH-1:0] unused_p;

  for (genvar b = 0; b < WIDTH; b++) begin : g_dmux
    r_gate u_dmux (
      .a(sm), .b(din[b]), .c(1'b0),
      .p(unused_p[b]), .q(to_odd[b]), .r(to_even[b])
    );
    assign wdata[2*b]   = to_even[b];
    assign wdata[2*b+1] = to_odd[b];
    // storing cycle: both halves (mask cleared); masking cycle: odd half only
    assign wbe[2*b]     = ~sm;
    assign wbe[2*b+1]   = 1'b1;
  end

  assign we    = upd_valid;
  assign waddr = addr;

endmodule
