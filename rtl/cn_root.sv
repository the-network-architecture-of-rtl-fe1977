// cn_root: turnaround at the root of a control network partition.
//
// The packet that reaches the root going up is sent back down one clock later. A
// single-source packet and a reduction result go down unchanged. For a scan the root
// starts the down phase with the identity of the operator, because nothing lies before the
// first leaf (forward scan) or after the last one (backward scan). The minor-stream bits are
// reflected, so the ORs gathered from all leaves reach all leaves. Following the document: the
// packet turns around at the root of the partition's tree; the scan identity is this design's
// way of starting an exclusive scan.
module cn_root
  import cm5_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  cn_pkt_t up_in,
  output cn_pkt_t dn_out
);
  cn_pkt_t d;
  always_comb begin
    d = up_in;
    if (up_in.ptype == PT_MULTI && cn_is_scan(up_in.op)) begin
      d.data = cn_identity(up_in.comb);
      d.seg  = 1'b0;
      d.ovf  = 1'b0;
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dn_out <= CN_IDLE;
    else        dn_out <= d;
  end
endmodule
