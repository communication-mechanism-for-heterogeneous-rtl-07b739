// qr_controller: model of one QuickRing controller (QR1001) as used in
// multicast mode: a client interface with Tx and Rx ports and a ring
// interface with Up and Down ports.
//
// Transmit path (client to ring): Tx Port (4-deep pipeline, TxOK) -> Tx
// Resynchronizer (32-deep dual-clock FIFO) -> Tx Router with the X/Y FIFOs and
// packet former -> downstream mux with the Ring/Multicast FIFO -> serializer
// (7 sub-symbols of 6 bits per ring cycle).
// Receive and forwarding path (ring to client): deserializer -> upstream
// router / multicast handler, which forwards to the Ring/Multicast FIFO and
// copies to Head Stripper -> Target FIFO (3 packets) -> Rx Resynchronizer
// (8-deep dual-clock FIFO) -> Rx Port.
//
// Clocks: tx_clk and rx_clk are the client clocks; rg_clk is the ring symbol
// clock (40 MHz in QuickRing); ss_clk is exactly 7 x rg_clk with rising edges
// aligned, and clocks the ring serializer and deserializer. All domains share
// one synchronous active-low reset, released on a common edge. node_id is the
// ring address, fixed while running. abort rises on a ring symbol whose error
// code does not match and stays high until reset (ring_abort). The event outputs are
// one-cycle pulses in the ring clock domain for observation.
// The structure follows the QuickRing block diagrams; voucher/ticket
// reservation and the low-bandwidth FIFO (used only by directed mode) are not
// built.
module qr_controller
  import qr_pkg::*;
#(
  parameter int unsigned TX_RESYNC_DEPTH = 32,
  parameter int unsigned RX_RESYNC_DEPTH = 8,
  parameter int unsigned XY_DEPTH        = 42,
  parameter int unsigned RING_DEPTH      = 40,
  parameter int unsigned LOCAL_MAX       = 12,
  parameter int unsigned TARGET_PKTS     = 3
) (
  input  logic        rg_clk,
  input  logic        ss_clk,
  input  logic        tx_clk,
  input  logic        rx_clk,
  input  logic        rst_n,
  input  logic [3:0]  node_id,
  // ring interface
  input  logic [5:0]  up_ss,
  output logic [5:0]  dn_ss,
  // client transmit port
  input  ctype_t      tx_t,
  input  logic [31:0] tx_s,
  output logic        tx_ok,
  // client receive port
  input  logic        rx_stall,
  output ctype_t      rx_t,
  output logic [31:0] rx_s,
  output ctype_t      rx_et,
  // status
  output logic        ring_abort,
  output logic        ev_mc_drop,
  output logic        ev_mc_absorbed,
  output logic        ev_local_launch,
  output logic        ev_fwd_deferred,
  output logic        ev_head_stripped
);
  // ---------------- transmit path ----------------
  logic        txf_wr, txf_full, txf_empty, txf_pop;
  client_sym_t txf_wdata, txf_rdata;
  logic [$clog2(TX_RESYNC_DEPTH):0] txf_wcount;

  qr_tx_port #(.FIFO_DEPTH(TX_RESYNC_DEPTH)) u_tx_port (
    .clk(tx_clk), .rst_n,
    .tx_t, .tx_s, .tx_ok,
    .fifo_wr(txf_wr), .fifo_data(txf_wdata), .fifo_full(txf_full), .fifo_count(txf_wcount)
  );

  async_fifo #(.DW($bits(client_sym_t)), .DEPTH(TX_RESYNC_DEPTH)) u_tx_resync (
    .wclk(tx_clk), .wrst_n(rst_n), .wr_en(txf_wr), .wr_data(txf_wdata),
    .full(txf_full), .wcount(txf_wcount),
    .rclk(rg_clk), .rrst_n(rst_n), .rd_en(txf_pop), .rd_data(txf_rdata), .empty(txf_empty)
  );

  logic      lp_avail, lp_start, lp_valid, lp_last;
  ring_sym_t lp_sym;
  logic [1:0] buf_busy;

  qr_tx_router #(.XY_DEPTH(XY_DEPTH)) u_tx_router (
    .clk(rg_clk), .rst_n, .node_id,
    .in_valid(!txf_empty), .in_sym(txf_rdata), .in_pop(txf_pop),
    .pkt_avail(lp_avail), .start(lp_start),
    .out_valid(lp_valid), .out_sym(lp_sym), .out_last(lp_last),
    .buf_busy
  );

  logic      fwd_valid;
  ring_sym_t fwd_sym, dn_sym;
  logic [$clog2(RING_DEPTH+1)-1:0] ring_count;

  qr_ring_out #(.RING_DEPTH(RING_DEPTH), .LOCAL_MAX(LOCAL_MAX)) u_ring_out (
    .clk(rg_clk), .rst_n,
    .fwd_valid, .fwd_sym,
    .lp_avail, .lp_start, .lp_valid, .lp_sym, .lp_last,
    .dn_sym,
    .local_launch(ev_local_launch), .fwd_deferred(ev_fwd_deferred), .ring_count
  );

  ring_serializer u_ser (.ss_clk, .rst_n, .sym_in(dn_sym), .dn_ss);

  // ---------------- receive path ----------------
  ring_sym_t up_sym_ss, up_sym;
  logic      edc_err_ss, edc_err;

  ring_deserializer u_deser (.ss_clk, .rst_n, .up_ss, .sym_out(up_sym_ss), .edc_err(edc_err_ss));

  // take the completed symbol into the ring clock domain (clocks are related)
  always_ff @(posedge rg_clk) begin
    if (!rst_n) begin
      up_sym  <= RING_NULL;
      edc_err <= 1'b0;
      ring_abort <= 1'b0;
    end else begin
      up_sym  <= up_sym_ss;
      edc_err <= edc_err_ss;
      if (edc_err) ring_abort <= 1'b1;
    end
  end

  logic      slot_avail, slot_take, copy_valid;
  ring_sym_t copy_sym;

  qr_mcast_handler u_mcast (
    .clk(rg_clk), .rst_n, .node_id,
    .up_sym, .slot_avail, .slot_take,
    .copy_valid, .copy_sym, .fwd_valid, .fwd_sym,
    .mc_drop(ev_mc_drop), .mc_absorbed(ev_mc_absorbed)
  );

  logic      hs_valid;
  ring_sym_t hs_sym;

  qr_head_stripper u_head_strip (
    .clk(rg_clk), .rst_n,
    .in_valid(copy_valid), .in_sym(copy_sym),
    .out_valid(hs_valid), .out_sym(hs_sym), .stripped(ev_head_stripped)
  );

  logic      tf_wr, rxf_full, rxf_empty, rxf_pop;
  ring_sym_t tf_sym, rxf_sym;
  logic [$clog2(TARGET_PKTS+1)-1:0] slots_free;

  qr_target_fifo #(.NPKT(TARGET_PKTS)) u_target_fifo (
    .clk(rg_clk), .rst_n,
    .in_valid(hs_valid), .in_sym(hs_sym),
    .slot_take, .slot_avail,
    .out_wr(tf_wr), .out_sym(tf_sym), .out_full(rxf_full), .slots_free
  );

  async_fifo #(.DW($bits(ring_sym_t)), .DEPTH(RX_RESYNC_DEPTH)) u_rx_resync (
    .wclk(rg_clk), .wrst_n(rst_n), .wr_en(tf_wr), .wr_data(tf_sym),
    .full(rxf_full), .wcount(),
    .rclk(rx_clk), .rrst_n(rst_n), .rd_en(rxf_pop), .rd_data(rxf_sym), .empty(rxf_empty)
  );

  qr_rx_port u_rx_port (
    .clk(rx_clk), .rst_n,
    .in_empty(rxf_empty), .in_sym(rxf_sym), .in_pop(rxf_pop),
    .rx_stall, .rx_t, .rx_s, .rx_et
  );
endmodule
