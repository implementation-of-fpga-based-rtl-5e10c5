// tcam_pkg: sizes and the bit code shared by the G-AETCAM and its two update
// paths.
//
// A ternary bit (0, 1 or X) is stored in the G-AETCAM as two binary bits of a
// 2*WIDTH-bit word: the store bit at even position 2i and the mask bit at odd
// position 2i+1. The 2-bit code {mask, store} is therefore 00 for 0, 01 for 1
// and 10 for X; 11 is never produced by the update paths and behaves like X.
// The 64 x 36 default size is the one the design is specified for; the code
// assignment is the one the LUT-Update tables use.
package tcam_pkg;

  localparam int unsigned TCAM_DEPTH = 64;  // words
  localparam int unsigned TCAM_WIDTH = 36;  // ternary bits per word

  // {mask, store} code of one ternary bit as held in the G-AETCAM
  typedef enum logic [1:0] {
    CODE_ZERO = 2'b00,
    CODE_ONE  = 2'b01,
    CODE_X    = 2'b10
  } tbit_code_e;

endpackage
