// pof_control: control unit of the compound primitive operator graph.
//
// The graph has one input vertex per distinct coefficient magnitude of each
// tap (19 in all). For a given filter, every tap m uses at most one of its
// vertices; that vertex is switched to the folded sample x_m and all other
// vertices of the tap are switched to ground. A vertex whose coefficient is
// negative in the selected filter also has its input data inverted
// (bitwise, ~x = -x - 1). This unit turns the 3-bit filter identifier code
// {mode, hp} into the 19 switch enables and 19 inversion controls, and into
// corr, the sum of the magnitudes of the inverted vertices, which the graph
// adds back to make up for the -1 of each inversion.
//
// Purely combinational: the decode compares the coefficient vectors with the
// vertex magnitudes; both are constants, so it reduces to a small decoder of
// the 3-bit code and cannot disagree with the coefficient table.
//
// Switching each vertex only between x_m and ground, under control of a
// 3-bit code, and inverting the input data follow the source design; the
// correction constant is this design's own.
module pof_control
  import sbf_pkg::*;
(
  input  fid_t             fid,       // {mode, hp}
  output logic [NVERT-1:0] vert_en,   // 1: vertex fed by x_m, 0: ground
  output logic [NVERT-1:0] vert_inv,  // 1: vertex input bit-inverted
  output corr_t            corr       // sum of |c| over inverted vertices
);

  always_comb begin
    corr = '0;
    for (int v = 0; v < NVERT; v++) begin
      int c;
      c = COEF[fid][VERT_TAP[v]];
      vert_en[v]  = (c == VERT_MAG[v]) || (c == -VERT_MAG[v]);
      vert_inv[v] = (c == -VERT_MAG[v]);
      if (vert_inv[v]) corr = corr + corr_t'(VERT_MAG[v]);
    end
  end

endmodule
