// bridge_hop: multicast bridge hop joining the Control and Communication
// Network (CCN) ring to the high-level PC ring.
//
// Two QuickRing controllers sit back to back through the Address Conversion
// Decoder: the CCN-side controller (node CCN_NODE of the CCN ring) copies
// every multicast packet whose mask includes it and hands it, through the
// forward conversion, to the PC-side controller (node HP_NODE of the PC ring),
// which launches it with a multicast field for the PC ring. Traffic from the
// PC ring addressed to HP_NODE goes back the same way through the reverse
// conversion. Both controllers share the ring clocks; the client-side clock
// clt_clk runs the two conversion paths and both client ports. The structure
// (two controllers plus conversion decoder, node 2 on the CCN, node 0 on the
// PC ring) follows the design.
module bridge_hop
  import qr_pkg::*;
#(
  parameter logic [3:0] CCN_NODE = 4'd2,
  parameter logic [3:0] HP_NODE  = 4'd0
) (
  input  logic       rg_clk,
  input  logic       ss_clk,
  input  logic       clt_clk,
  input  logic       rst_n,
  input  logic [5:0] ccn_up_ss,
  output logic [5:0] ccn_dn_ss,
  input  logic [5:0] hp_up_ss,
  output logic [5:0] hp_dn_ss,
  output logic [1:0] ring_abort,
  output logic       ev_fwd_convert,
  output logic       ev_rev_convert,
  output logic [1:0] ev_mc_drop
);
  ctype_t      a_rx_t, a_tx_t, b_rx_t, b_tx_t;
  logic [31:0] a_rx_s, a_tx_s, b_rx_s, b_tx_s;
  logic        a_rx_stall, b_rx_stall, a_tx_ok, b_tx_ok;

  qr_controller u_qc_ccn (
    .rg_clk, .ss_clk, .tx_clk(clt_clk), .rx_clk(clt_clk), .rst_n, .node_id(CCN_NODE),
    .up_ss(ccn_up_ss), .dn_ss(ccn_dn_ss),
    .tx_t(a_tx_t), .tx_s(a_tx_s), .tx_ok(a_tx_ok),
    .rx_stall(a_rx_stall), .rx_t(a_rx_t), .rx_s(a_rx_s), .rx_et(),
    .ring_abort(ring_abort[0]), .ev_mc_drop(ev_mc_drop[0]), .ev_mc_absorbed(),
    .ev_local_launch(), .ev_fwd_deferred(), .ev_head_stripped()
  );

  qr_controller u_qc_hp (
    .rg_clk, .ss_clk, .tx_clk(clt_clk), .rx_clk(clt_clk), .rst_n, .node_id(HP_NODE),
    .up_ss(hp_up_ss), .dn_ss(hp_dn_ss),
    .tx_t(b_tx_t), .tx_s(b_tx_s), .tx_ok(b_tx_ok),
    .rx_stall(b_rx_stall), .rx_t(b_rx_t), .rx_s(b_rx_s), .rx_et(),
    .ring_abort(ring_abort[1]), .ev_mc_drop(ev_mc_drop[1]), .ev_mc_absorbed(),
    .ev_local_launch(), .ev_fwd_deferred(), .ev_head_stripped()
  );

  acd_path #(.FORWARD(1'b1)) u_acd_fwd (
    .clk(clt_clk), .rst_n,
    .rx_t(a_rx_t), .rx_s(a_rx_s), .rx_stall(a_rx_stall),
    .tx_t(b_tx_t), .tx_s(b_tx_s), .tx_ok(b_tx_ok), .converted(ev_fwd_convert)
  );

  acd_path #(.FORWARD(1'b0)) u_acd_rev (
    .clk(clt_clk), .rst_n,
    .rx_t(b_rx_t), .rx_s(b_rx_s), .rx_stall(b_rx_stall),
    .tx_t(a_tx_t), .tx_s(a_tx_s), .tx_ok(a_tx_ok), .converted(ev_rev_convert)
  );
endmodule
