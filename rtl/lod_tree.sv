// Leading-one detector of W bits (W a power of two, at least 2), built as a tree.
//
// Level 1 holds the 2-bit detectors (LOD2:1): v = in[1] | in[0], and position 0 when in[1]
// is set, else 1. Each higher level joins two detectors of the level below (LOD4:2,
// LOD8:3, ...): v = v_hi | v_lo, and cnt = {1'b0, cnt_hi} when the upper one holds a one,
// else {1'b1, cnt_lo}. The root's cnt is the number of leading zeros, i.e. the left shift
// that normalises the input; with no one in the input (v = 0) it is all ones. The node
// function and hierarchy follow the document; the tree is written level by level in one
// module. Purely combinational.
module lod_tree #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]         in,
  output logic                 v,
  output logic [$clog2(W)-1:0] cnt
);
  localparam int unsigned L = $clog2(W);

  // Level l has W >> l nodes; node n covers in[(n+1)*2^l-1 : n*2^l] and its count uses
  // the low l bits of its L-bit slot.
  for (genvar l = 0; l <= L; l++) begin : g_lvl
    localparam int unsigned N = W >> l;
    logic [N-1:0]        vv;
    logic [N-1:0][L-1:0] cc;
    if (l == 0) begin : g_inputs
      assign vv = in;
      assign cc = '0;
    end else begin : g_nodes
      for (genvar n = 0; n < N; n++) begin : g_node
        logic         vh;
        logic [L-1:0] ch, clo;
        assign vh        = g_lvl[l-1].vv[2*n+1];
        assign ch        = g_lvl[l-1].cc[2*n+1];
        assign clo       = g_lvl[l-1].cc[2*n];
        assign vv[n]     = vh | g_lvl[l-1].vv[2*n];
        assign cc[n]     = (L'(~vh) << (l - 1)) | ((vh ? ch : clo) & L'((1 << (l - 1)) - 1));
      end
    end
  end

  assign v   = g_lvl[L].vv[0];
  assign cnt = g_lvl[L].cc[0];
endmodule
