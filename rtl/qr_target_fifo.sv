// qr_target_fifo: Target FIFO of the QuickRing receive pipeline (ring clock).
//
// Stores packets copied from the ring for this node until the Rx
// Resynchronizer takes them. Space is managed in whole packets: NPKT slots of
// PKT_SYMS symbols each. slot_avail tells the upstream router a slot is free;
// slot_take (at a copied head) claims one; a slot is given back when the tail
// of a packet leaves towards the Rx Resynchronizer. Symbols leave in order,
// one per cycle, whenever the resynchronizer is not full. Three normal
// packets and the 21-symbol packet size follow the QuickRing description;
// the six low-bandwidth packet places are not built, because low-bandwidth
// packets are not used in multicast operation.
module qr_target_fifo
  import qr_pkg::*;
#(
  parameter int unsigned NPKT     = 3,
  parameter int unsigned PKT_LEN  = PKT_SYMS
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  ring_sym_t in_sym,
  input  logic      slot_take,
  output logic      slot_avail,
  // to the Rx Resynchronizer
  output logic      out_wr,
  output ring_sym_t out_sym,
  input  logic      out_full,
  output logic [$clog2(NPKT+1)-1:0] slots_free
);
  localparam int unsigned DEPTH = NPKT * PKT_LEN;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;

  sync_fifo #(.DW($bits(ring_sym_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(in_valid), .wr_data(in_sym),
    .rd_en(out_wr), .rd_data(out_sym),
    .empty, .full, .count
  );

  assign out_wr     = !empty && !out_full;
  assign slot_avail = (slots_free != '0);

  wire give_back = out_wr && (out_sym.typ == RT_TAIL);

  always_ff @(posedge clk) begin
    if (!rst_n) slots_free <= ($bits(slots_free))'(NPKT);
    else slots_free <= slots_free - ($bits(slots_free))'(slot_take) + ($bits(slots_free))'(give_back);
  end

  a_take_ok: assert property (@(posedge clk) disable iff (!rst_n) slot_take |-> slot_avail)
    else $error("qr_target_fifo: slot taken while none is free");
endmodule
