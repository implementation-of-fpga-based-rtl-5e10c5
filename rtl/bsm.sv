// bsm: bit-select memory of the LUT-Update path.
//
// Two 3-input lookup tables addressed by the input pins {Ix, I1, I0}, which
// carry one ternary bit in one-hot form. LUT 1 gives the mask bit and LUT 0
// the store bit of the bit's G-AETCAM code:
//   {Ix,I1,I0} = 001 (bit is 0) -> 00
//   {Ix,I1,I0} = 010 (bit is 1) -> 01
//   {Ix,I1,I0} = 100 (bit is X) -> 10
// and every pattern that is not one-hot gives 00. These eight entries are the
// published table contents; the tables are written out as 8-bit constants so
// that a synthesis tool maps each onto one 3-input LUT.
//
// Interface: code = {mask, store}. Combinational.
module bsm
  import tcam_pkg::*;
(
  input  logic       ix,
  input  logic       i1,
  input  logic       i0,
  output tbit_code_e code
);

  // entry k is the output for address {Ix,I1,I0} = k
  localparam logic [7:0] LUT_MASK  = 8'b0001_0000;  // 1 only at 100
  localparam logic [7:0] LUT_STORE = 8'b0000_0100;  // 1 only at 010

  logic [2:0] lut_addr;

  assign lut_addr = {ix, i1, i0};
  assign code     = tbit_code_e'({LUT_MASK[lut_addr], LUT_STORE[lut_addr]});

endmodule
