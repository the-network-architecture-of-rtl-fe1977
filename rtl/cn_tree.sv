// cn_tree: a complete binary tree of control network nodes.
//
// 2**HEIGHT leaf links, numbered left to right in data network address order, and one root
// link (root_up leaves the top node, root_dn enters it). Nodes are numbered as a heap: node k
// has children 2k and 2k+1, and leaf j sits at position 2**HEIGHT + j. Each level adds one clock
// going down and one or two clocks going up (see cn_node). The root turnaround is not part
// of the tree, so that a partition root can sit above further leaves such as the control
// processor. The binary tree with processors at the leaves follows the document.
module cn_tree
  import cm5_pkg::*;
#(
  parameter int HEIGHT = 6,     // 64 leaves
  parameter int QDEPTH = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  cn_pkt_t leaf_up [2**HEIGHT],
  output cn_pkt_t leaf_dn [2**HEIGHT],
  output cn_pkt_t root_up,
  input  cn_pkt_t root_dn,
  output logic    collision_err,
  output logic    mismatch_err
);
  localparam int NL = 2**HEIGHT;

  cn_pkt_t up [2*NL];     // packet leaving position k upward
  cn_pkt_t dn [2*NL];     // packet entering position k from above
  logic [NL-1:0] coll, mism;

  for (genvar j = 0; j < NL; j++) begin : g_leaf
    assign up[NL + j]  = leaf_up[j];
    assign leaf_dn[j]  = dn[NL + j];
  end

  for (genvar k = 1; k < NL; k++) begin : g_node
    cn_pkt_t to_kids [2];
    assign dn[2*k]   = to_kids[0];
    assign dn[2*k+1] = to_kids[1];
    cn_node #(.QDEPTH(QDEPTH)) u_node (
      .clk, .rst_n,
      .up_in ('{up[2*k], up[2*k+1]}),
      .up_out(up[k]),
      .dn_in (dn[k]),
      .dn_out(to_kids),
      .collision_err(coll[k]),
      .mismatch_err (mism[k])
    );
  end
  assign coll[0] = 1'b0;
  assign mism[0] = 1'b0;
  assign up[0]   = CN_IDLE;
  assign root_up = up[1];
  assign dn[1]   = root_dn;
  assign dn[0]   = CN_IDLE;

  assign collision_err = |coll;
  assign mismatch_err  = |mism;
endmodule
