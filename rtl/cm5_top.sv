// cm5_top: the three CM-5 networks joined to their network interfaces.
//
// 4**LEVELS processing nodes each own a network interface (ni) that the processor reaches
// through a memory-mapped bus; the processors themselves are outside this design and their
// buses are ports. Each interface has a left and a right link into two independent data
// network fat-trees (dn_fat_tree), so a message sent on one side can only arrive on that side.
// The control network is a binary tree (cn_tree) over the processing nodes in address order;
// one more cn_node joins that tree with the leaf of the control processor's interface, and
// cn_root turns packets around above it, so the partition spans all processing nodes plus
// the control processor. The diagnostic network (diag_tree) is separate: its root is driven
// by the diagnostic processor's ports and its leaves are the JTAG pods, both outside.
// All blocks run on one clock. The organisation (three networks, one interface per node,
// control processor as an extra control-network leaf) follows the document; keeping the
// control processor off the data network is this design's simplification.
// Size: the document's machines have 32 to 16384 processing nodes; the default here is 64
// (LEVELS = 3), one of the machine sizes the document mentions. Every other size that is a power
// of 4 is a parameter change. The diagnostic tree height is set separately (64 pods).
module cm5_top
  import cm5_pkg::*;
#(
  parameter int LEVELS      = 3,   // data network height: 4**3 = 64 processing nodes
  parameter int DIAG_HEIGHT = 6    // diagnostic tree height: 64 pods
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // processing-node buses
  input  logic [4**LEVELS-1:0]          pn_bus_wr,
  input  logic [4**LEVELS-1:0]          pn_bus_rd,
  input  logic [4**LEVELS-1:0][7:0]     pn_bus_addr,
  input  logic [4**LEVELS-1:0][31:0]    pn_bus_wdata,
  input  logic [4**LEVELS-1:0]          pn_bus_sup,
  output logic [4**LEVELS-1:0][31:0]    pn_bus_rdata,
  output logic [4**LEVELS-1:0]          pn_irq,
  // control processor bus
  input  logic                          cp_bus_wr,
  input  logic                          cp_bus_rd,
  input  logic [7:0]                    cp_bus_addr,
  input  logic [31:0]                   cp_bus_wdata,
  input  logic                          cp_bus_sup,
  output logic [31:0]                   cp_bus_rdata,
  output logic                          cp_irq,
  // data network configuration and status
  input  logic                          afd_mode,
  input  logic [7:0][1:0]               afd_perm,
  output logic                          dn_primary_err,
  output logic                          dn_secondary_err,
  output logic                          dn_route_err,
  output logic [1:0][31:0]              dn_msgs_delivered,
  // control network status
  output logic                          cn_collision_err,
  output logic                          cn_mismatch_err,
  // diagnostic processor
  input  logic                          dg_erase,
  input  logic                          dg_tok_valid,
  input  dg_digit_e                     dg_tok_digit,
  input  logic                          dg_jtag_step,
  input  logic                          dg_jtag_tms,
  input  logic                          dg_jtag_tdi,
  input  logic                          dg_comb_and,
  output logic                          dg_tdo,
  // pods
  output logic [2**DIAG_HEIGHT-1:0]     pod_step,
  output logic                          pod_tms,
  output logic                          pod_tdi,
  input  logic [2**DIAG_HEIGHT-1:0]     pod_tdo,
  output logic [2**DIAG_HEIGHT-1:1]     dg_node_selected
);
  localparam int NN = 4**LEVELS;

  // ---------------- interfaces ----------------
  logic [1:0][NN-1:0]      tx_v, tx_r, rx_v, rx_r;
  logic [1:0][NN-1:0][3:0] tx_d, rx_d;
  cn_pkt_t                 leaf_up [NN], leaf_dn [NN];

  for (genvar i = 0; i < NN; i++) begin : g_pn
    logic [1:0]      n_txv, n_txr, n_rxv, n_rxr;
    logic [1:0][3:0] n_txd, n_rxd;
    ni #(.LEVELS(LEVELS)) u_ni (
      .clk, .rst_n,
      .self_addr  ((2*LEVELS)'(i)),
      .bus_wr     (pn_bus_wr[i]),
      .bus_rd     (pn_bus_rd[i]),
      .bus_addr   (pn_bus_addr[i]),
      .bus_wdata  (pn_bus_wdata[i]),
      .bus_sup    (pn_bus_sup[i]),
      .bus_rdata  (pn_bus_rdata[i]),
      .irq        (pn_irq[i]),
      .dn_tx_valid(n_txv), .dn_tx_data(n_txd), .dn_tx_ready(n_txr),
      .dn_rx_valid(n_rxv), .dn_rx_data(n_rxd), .dn_rx_ready(n_rxr),
      .cn_up      (leaf_up[i]),
      .cn_dn      (leaf_dn[i])
    );
    for (genvar s = 0; s < 2; s++) begin : g_s
      assign tx_v[s][i] = n_txv[s];
      assign tx_d[s][i] = n_txd[s];
      assign n_txr[s]   = tx_r[s][i];
      assign n_rxv[s]   = rx_v[s][i];
      assign n_rxd[s]   = rx_d[s][i];
      assign rx_r[s][i] = n_rxr[s];
    end
  end

  // control processor interface: control network only
  cn_pkt_t cp_up, cp_dn;
  ni #(.LEVELS(LEVELS)) u_cp_ni (
    .clk, .rst_n,
    .self_addr  ('0),
    .bus_wr     (cp_bus_wr),
    .bus_rd     (cp_bus_rd),
    .bus_addr   (cp_bus_addr),
    .bus_wdata  (cp_bus_wdata),
    .bus_sup    (cp_bus_sup),
    .bus_rdata  (cp_bus_rdata),
    .irq        (cp_irq),
    .dn_tx_valid(), .dn_tx_data(), .dn_tx_ready(2'b00),
    .dn_rx_valid(2'b00), .dn_rx_data('0), .dn_rx_ready(),
    .cn_up      (cp_up),
    .cn_dn      (cp_dn)
  );

  // ---------------- data network, two sides ----------------
  logic [1:0] perr, serr, rerr;
  for (genvar s = 0; s < 2; s++) begin : g_dn
    dn_fat_tree #(.LEVELS(LEVELS)) u_side (
      .clk, .rst_n,
      .leaf_in_valid (tx_v[s]), .leaf_in_data(tx_d[s]), .leaf_in_ready(tx_r[s]),
      .leaf_out_valid(rx_v[s]), .leaf_out_data(rx_d[s]), .leaf_out_ready(rx_r[s]),
      .afd_mode, .afd_perm,
      .primary_err(perr[s]), .secondary_err(serr[s]), .route_err(rerr[s]),
      .msgs_delivered(dn_msgs_delivered[s])
    );
  end
  assign dn_primary_err   = |perr;
  assign dn_secondary_err = |serr;
  assign dn_route_err     = |rerr;

  // ---------------- control network ----------------
  cn_pkt_t tree_up, tree_dn, top_up, top_dn;
  logic    coll_t, mism_t, coll_r, mism_r;

  cn_tree #(.HEIGHT(2*LEVELS)) u_cn_tree (
    .clk, .rst_n, .leaf_up, .leaf_dn,
    .root_up(tree_up), .root_dn(tree_dn),
    .collision_err(coll_t), .mismatch_err(mism_t)
  );
  cn_pkt_t top_kids [2];
  assign tree_dn = top_kids[0];
  assign cp_dn   = top_kids[1];
  cn_node u_cn_cp (
    .clk, .rst_n,
    .up_in ('{tree_up, cp_up}),
    .up_out(top_up),
    .dn_in (top_dn),
    .dn_out(top_kids),
    .collision_err(coll_r), .mismatch_err(mism_r)
  );
  cn_root u_cn_root (.clk, .rst_n, .up_in(top_up), .dn_out(top_dn));
  assign cn_collision_err = coll_t | coll_r;
  assign cn_mismatch_err  = mism_t | mism_r;

  // ---------------- diagnostic network ----------------
  diag_tree #(.HEIGHT(DIAG_HEIGHT)) u_diag (
    .clk, .rst_n,
    .erase(dg_erase), .tok_valid(dg_tok_valid), .tok_digit(dg_tok_digit),
    .jtag_step(dg_jtag_step), .jtag_tms(dg_jtag_tms), .jtag_tdi(dg_jtag_tdi),
    .comb_and(dg_comb_and), .tdo(dg_tdo),
    .pod_step, .pod_tms, .pod_tdi, .pod_tdo,
    .node_selected(dg_node_selected)
  );
endmodule
