// qr_head_stripper: Head Stripper at the entry of the QuickRing receive
// pipeline (ring clock).
//
// Directed heads have their routing fields rotated as they enter the
// receiving node: TRGT moves to [27:24], HOP1..HOP4 move up one field each and
// the source ID lands in [7:4], so a response can be addressed from the
// received head; HCNT[3:0] is not moved but decremented. Of a variable
// directed stream (ACC = 0) only the head that starts the stream is kept: a
// head equal to the previous head that passed is redundant and removed.
// Multicast heads and fixed-length directed heads (ACC = 1) pass unchanged,
// as do payloads. Output is registered, one cycle after the input. The field
// rotation and HCNT rule follow the QuickRing description; matching against
// the previous head to find redundant heads is this design's choice.
module qr_head_stripper
  import qr_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  ring_sym_t in_sym,
  output logic      out_valid,
  output ring_sym_t out_sym,
  output logic      stripped      // pulse: a redundant head was removed
);
  logic [31:0] prev_head;
  logic        prev_valid;

  dir_head_t dh, sh;
  ring_sym_t conv;
  logic      redundant;
  always_comb begin
    dh   = dir_head_t'(in_sym.data);
    sh   = '{acc: dh.acc, conn: dh.conn, src: dh.trgt, trgt: dh.hop1, hop1: dh.hop2,
             hop2: dh.hop3, hop3: dh.hop4, hop4: dh.src, hcnt: dh.hcnt - 4'd1};
    conv = in_sym;
    redundant = 1'b0;
    if (in_sym.typ == RT_HEAD && !in_sym.frame) begin
      conv.data = sh;
      redundant = (dh.acc == 2'd0) && prev_valid && (in_sym.data == prev_head);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_sym    <= RING_NULL;
      stripped   <= 1'b0;
      prev_head  <= '0;
      prev_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && !redundant;
      out_sym   <= conv;
      stripped  <= in_valid && redundant;
      if (in_valid && in_sym.typ == RT_HEAD) begin
        prev_head  <= in_sym.data;
        prev_valid <= !in_sym.frame;
      end
    end
  end
endmodule
