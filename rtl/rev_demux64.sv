// rev_demux64: 1-to-2**SEL_W demultiplexer (1-to-64 by default) as a tree of
// R-gate 1-to-4 demultiplexers.
//
// Level 0 is one rev_demux4 selected by the two most significant select
// bits; each further level splits every output again by the next two select
// bits, so 1-to-64 takes three levels (1 + 4 + 16 = 21 rev_demux4, 63 R
// gates). The published design shows the 1-to-64 demultiplexer as a block and
// the 1-to-4 R-gate demultiplexer as its building principle; the tree
// arrangement is this implementation's choice. SEL_W must be even.
//
// Interface: z[k] = i when sel == k, else 0. Combinational. Garbage outputs
// of the R gates are left unconnected inside the tree.
module rev_demux64 #(
  parameter int unsigned SEL_W = 6
) (
  input  logic                  i,
  input  logic [SEL_W-1:0]      sel,
  output logic [2**SEL_W-1:0]   z
);

  localparam int unsigned LEVELS = SEL_W / 2;

  if (SEL_W % 2 != 0 || SEL_W == 0) begin : g_bad_sel_w
    $error("rev_demux64: SEL_W must be even and non-zero");
  end

  // node[l] holds the 4**l signals entering level l
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    logic [4**l-1:0]     node_in;
    logic [4**(l+1)-1:0] node_out;

    if (l == 0) begin : g_root
      assign node_in = i;
    end else begin : g_inner
      assign node_in = g_level[l-1].node_out;
    end

    for (genvar n = 0; n < 4**l; n++) begin : g_node
      logic [3:1] unused_g;
      rev_demux4 u_dmx (
        .i (node_in[n]),
        .s (sel[SEL_W-1-2*l -: 2]),
        .z (node_out[4*n +: 4]),
        .g (unused_g)
      );
    end
  end

  assign z = g_level[LEVELS-1].node_out;

endmodule
