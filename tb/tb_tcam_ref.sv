// tb_tcam_ref: reference model of a ternary CAM for the testbenches.
//
// Each word is kept as a value vector and a don't-care vector (1 = X); the
// model knows nothing of the hardware's interleaved store/mask layout. A word
// matches a key when every bit is X or equals the key bit.
package tb_tcam_ref;

  localparam int MAXW = 64;  // widest word the model supports

  class tcam_model;
    int                depth;
    int                width;
    logic [MAXW-1:0]   val [];
    logic [MAXW-1:0]   dc  [];

    function new(int depth_i, int width_i);
      depth = depth_i;
      width = width_i;
      val = new[depth];
      dc  = new[depth];
      foreach (val[w]) begin
        val[w] = '0;
        dc[w]  = '0;
      end
    endfunction

    // per-bit match of word w against key
    function logic [MAXW-1:0] bit_match(int w, logic [MAXW-1:0] key);
      logic [MAXW-1:0] bm;
      bm = '0;
      for (int b = 0; b < width; b++) bm[b] = dc[w][b] || (val[w][b] == key[b]);
      return bm;
    endfunction

    function logic word_match(int w, logic [MAXW-1:0] key);
      logic [MAXW-1:0] bm;
      bm = bit_match(w, key);
      for (int b = 0; b < width; b++) if (!bm[b]) return 1'b0;
      return 1'b1;
    endfunction

    // key that matches word w, with random values under its don't cares
    function logic [MAXW-1:0] key_for(int w);
      logic [MAXW-1:0] r;
      r = {$urandom(), $urandom()};
      return (val[w] & ~dc[w]) | (r & dc[w]);
    endfunction
  endclass

  // random ternary word: each bit 0, 1 or X; x_rate out of 8 bits is X
  function automatic void rand_ternary(int width, int x_rate,
                                       output logic [MAXW-1:0] v,
                                       output logic [MAXW-1:0] x);
    v = '0;
    x = '0;
    for (int b = 0; b < width; b++) begin
      x[b] = ($urandom_range(0, 7) < x_rate);
      v[b] = x[b] ? 1'b0 : 1'($urandom_range(0, 1));
    end
  endfunction

endpackage
