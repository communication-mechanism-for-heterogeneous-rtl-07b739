// hetero_ccn_top: communication network of the two-layer heterogeneous image
// processing system.
//
// Three QuickRing controllers form the Control and Communication Network
// (CCN) ring: node 0 serves the Master Controller (MC), node 1 the DSP Layer
// Controller (DLC) and node 2 is the CCN side of the bridge hop. The bridge's
// other side is node 0 of the high-level ring, whose nodes 1..N_HP serve the
// high-level PCs (HPs). All traffic is multicast: a packet's 16-bit multicast
// field names the destination nodes on its ring, and a packet for the PCs
// names node 2 and carries, in its 8-bit group field, the code that the bridge's
// Address Conversion Decoder turns into the PC-ring destination set. PCs reach
// the MC and DLC by naming node 0 of their ring and setting group bit 0 (MC)
// or bit 1 (DLC).
//
// The MC, the DLC's two DSPs (its receive controller reads the DLC Rx port and
// its transmit controller writes the DLC Tx port) and the PCs are processors
// running software and are outside this RTL: their client ports are the top's
// ports, all clocked by clt_clk. Ring timing: rg_clk is the 40 MHz ring symbol
// clock, ss_clk is 7 x rg_clk with aligned rising edges. rst_n is synchronous,
// active low, released on a common edge of all clocks. The event outputs are
// ORs of the controllers' one-cycle pulses. The ring sizes (3-node CCN,
// 15 PCs) follow the design.
module hetero_ccn_top
  import qr_pkg::*;
#(
  parameter int unsigned N_HP = 15
) (
  input  logic        rg_clk,
  input  logic        ss_clk,
  input  logic        clt_clk,
  input  logic        rst_n,
  // Master Controller client ports (CCN node 0)
  input  ctype_t      mc_tx_t,
  input  logic [31:0] mc_tx_s,
  output logic        mc_tx_ok,
  input  logic        mc_rx_stall,
  output ctype_t      mc_rx_t,
  output logic [31:0] mc_rx_s,
  // DSP Layer Controller client ports (CCN node 1)
  input  ctype_t      dlc_tx_t,
  input  logic [31:0] dlc_tx_s,
  output logic        dlc_tx_ok,
  input  logic        dlc_rx_stall,
  output ctype_t      dlc_rx_t,
  output logic [31:0] dlc_rx_s,
  // high-level PC client ports (PC ring nodes 1..N_HP, array index i-1)
  input  ctype_t      hp_tx_t     [N_HP],
  input  logic [31:0] hp_tx_s     [N_HP],
  output logic        hp_tx_ok    [N_HP],
  input  logic        hp_rx_stall [N_HP],
  output ctype_t      hp_rx_t     [N_HP],
  output logic [31:0] hp_rx_s     [N_HP],
  // status and events
  output logic        any_abort,
  output logic        ev_mc_drop,
  output logic        ev_fwd_deferred,
  output logic        ev_local_launch,
  output logic        ev_fwd_convert,
  output logic        ev_rev_convert
);
  logic [5:0] ccn_ss [3];       // ccn_ss[k] = downstream output of CCN node k
  logic [5:0] hp_ss  [N_HP+1];  // hp_ss[k]  = downstream output of PC-ring node k
  logic [1:0] br_abort, br_drop;
  logic [N_HP+1:0] abort_v, drop_v, defer_v, launch_v;

  qr_controller u_qc_mc (
    .rg_clk, .ss_clk, .tx_clk(clt_clk), .rx_clk(clt_clk), .rst_n, .node_id(4'd0),
    .up_ss(ccn_ss[2]), .dn_ss(ccn_ss[0]),
    .tx_t(mc_tx_t), .tx_s(mc_tx_s), .tx_ok(mc_tx_ok),
    .rx_stall(mc_rx_stall), .rx_t(mc_rx_t), .rx_s(mc_rx_s), .rx_et(),
    .ring_abort(abort_v[0]), .ev_mc_drop(drop_v[0]), .ev_mc_absorbed(),
    .ev_local_launch(launch_v[0]), .ev_fwd_deferred(defer_v[0]), .ev_head_stripped()
  );

  qr_controller u_qc_dlc (
    .rg_clk, .ss_clk, .tx_clk(clt_clk), .rx_clk(clt_clk), .rst_n, .node_id(4'd1),
    .up_ss(ccn_ss[0]), .dn_ss(ccn_ss[1]),
    .tx_t(dlc_tx_t), .tx_s(dlc_tx_s), .tx_ok(dlc_tx_ok),
    .rx_stall(dlc_rx_stall), .rx_t(dlc_rx_t), .rx_s(dlc_rx_s), .rx_et(),
    .ring_abort(abort_v[1]), .ev_mc_drop(drop_v[1]), .ev_mc_absorbed(),
    .ev_local_launch(launch_v[1]), .ev_fwd_deferred(defer_v[1]), .ev_head_stripped()
  );

  bridge_hop #(.CCN_NODE(4'd2), .HP_NODE(4'd0)) u_bridge (
    .rg_clk, .ss_clk, .clt_clk, .rst_n,
    .ccn_up_ss(ccn_ss[1]), .ccn_dn_ss(ccn_ss[2]),
    .hp_up_ss(hp_ss[N_HP]), .hp_dn_ss(hp_ss[0]),
    .ring_abort(br_abort), .ev_fwd_convert, .ev_rev_convert, .ev_mc_drop(br_drop)
  );

  for (genvar i = 1; i <= N_HP; i++) begin : g_hp
    qr_controller u_qc_hp (
      .rg_clk, .ss_clk, .tx_clk(clt_clk), .rx_clk(clt_clk), .rst_n, .node_id(4'(i)),
      .up_ss(hp_ss[i-1]), .dn_ss(hp_ss[i]),
      .tx_t(hp_tx_t[i-1]), .tx_s(hp_tx_s[i-1]), .tx_ok(hp_tx_ok[i-1]),
      .rx_stall(hp_rx_stall[i-1]), .rx_t(hp_rx_t[i-1]), .rx_s(hp_rx_s[i-1]), .rx_et(),
      .ring_abort(abort_v[i+1]), .ev_mc_drop(drop_v[i+1]), .ev_mc_absorbed(),
      .ev_local_launch(launch_v[i+1]), .ev_fwd_deferred(defer_v[i+1]), .ev_head_stripped()
    );
  end

  assign any_abort       = (abort_v != '0) || (br_abort != '0);
  assign ev_mc_drop      = (drop_v != '0) || (br_drop != '0);
  assign ev_fwd_deferred = (defer_v != '0);
  assign ev_local_launch = (launch_v != '0);
endmodule
