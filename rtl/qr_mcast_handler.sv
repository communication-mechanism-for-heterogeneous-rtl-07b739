// qr_mcast_handler: Upstream Router / Multicast Handler of the QuickRing ring
// interface (ring clock).
//
// Examines every symbol arriving at the Up port. Nulls and other access
// symbols are consumed. At each head it decides, for the whole packet, whether
// to copy it to the local receive pipeline and whether to forward it:
//  * multicast head: if this node's bit of the 16-bit multicast field is set
//    and the Target FIFO has a free packet slot, the packet is copied and a
//    slot is taken (slot_take). If the bit is set but no slot is free, the copy
//    is lost (mc_drop). Either way the bit is cleared in the forwarded head, and
//    the packet is forwarded only if some bit is still set. A packet whose
//    source field is this node has gone round the ring and is never forwarded.
//  * directed head: copied if its target field is this node and a slot is
//    free, otherwise forwarded (unless it came back to its source). This is a
//    best-effort path: the voucher/ticket reservation of directed mode is not
//    modelled, so a directed packet that finds no slot is dropped.
// Payload symbols follow the decision made at their head; the tail ends the
// packet. Both outputs are registered, one cycle after the input. The
// multicast rules follow the QuickRing description; the handling of directed
// heads without reservation is this design's simplification.
module qr_mcast_handler
  import qr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] node_id,
  input  ring_sym_t  up_sym,
  input  logic       slot_avail,
  output logic       slot_take,
  output logic       copy_valid,
  output ring_sym_t  copy_sym,
  output logic       fwd_valid,
  output ring_sym_t  fwd_sym,
  output logic       mc_drop,      // pulse: a multicast copy was lost for lack of a slot
  output logic       mc_absorbed   // pulse: a multicast packet ended its trip here
);
  logic in_pkt, do_copy, do_fwd;

  // head decision
  logic       h_copy, h_fwd, h_drop, h_end;
  ring_sym_t  h_out;
  mc_head_t   mh;
  dir_head_t  dh;
  logic       mine;
  logic [15:0] rest;
  always_comb begin
    mine   = 1'b0;
    rest   = '0;
    mh     = mc_head_t'(up_sym.data);
    dh     = dir_head_t'(up_sym.data);
    h_out  = up_sym;
    h_copy = 1'b0;
    h_fwd  = 1'b0;
    h_drop = 1'b0;
    h_end  = 1'b0;
    if (up_sym.frame) begin : multicast
      mine   = mh.mcast[node_id];
      rest   = mh.mcast & ~(16'd1 << node_id);
      h_copy = mine && slot_avail;
      h_drop = mine && !slot_avail;
      h_fwd  = (rest != '0) && (mh.src != node_id);
      h_end  = !h_fwd;
      h_out.data[15:0] = rest;
    end else begin : directed
      h_copy = (dh.trgt == node_id) && slot_avail;
      h_fwd  = (dh.trgt != node_id) && (dh.src != node_id);
    end
  end

  wire is_hd = (up_sym.typ == RT_HEAD);
  wire is_pl = (up_sym.typ == RT_PAYLOAD) || (up_sym.typ == RT_TAIL);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_pkt <= 1'b0; do_copy <= 1'b0; do_fwd <= 1'b0;
      copy_valid <= 1'b0; fwd_valid <= 1'b0;
      copy_sym <= RING_NULL; fwd_sym <= RING_NULL;
      slot_take <= 1'b0; mc_drop <= 1'b0; mc_absorbed <= 1'b0;
    end else begin
      copy_valid  <= 1'b0;
      fwd_valid   <= 1'b0;
      slot_take   <= 1'b0;
      mc_drop     <= 1'b0;
      mc_absorbed <= 1'b0;
      if (is_hd) begin
        in_pkt      <= 1'b1;
        do_copy     <= h_copy;
        do_fwd      <= h_fwd;
        copy_valid  <= h_copy;
        copy_sym    <= up_sym;
        fwd_valid   <= h_fwd;
        fwd_sym     <= h_out;
        slot_take   <= h_copy;
        mc_drop     <= up_sym.frame && h_drop;
        mc_absorbed <= up_sym.frame && h_end;
      end else if (is_pl && in_pkt) begin
        copy_valid <= do_copy;
        copy_sym   <= up_sym;
        fwd_valid  <= do_fwd;
        fwd_sym    <= up_sym;
        if (up_sym.typ == RT_TAIL) in_pkt <= 1'b0;
      end
    end
  end
endmodule
