// qr_tx_router: Tx Router and the X/Y transmit FIFOs of the QuickRing
// controller (ring clock), with the packet former that cuts client streams
// into ring packets.
//
// A stream is a head followed by payload symbols. Each of the two FIFOs, X and
// Y, holds the payloads of one stream only, together with that stream's head
// (whose source field is overwritten with this node's ID). A new head closes
// the current stream and opens the other FIFO once that FIFO has drained; the
// router stalls the Tx Resynchronizer until then. Payloads go to the FIFO of
// the open stream.
//
// A FIFO holds a launchable packet when it contains 20 payloads, or a tail, or
// its stream is closed. A packet is the stored head followed by up to 20
// payloads, ending at the first tail, at the 20th payload, or at the last
// payload of a closed stream; its last payload always leaves as a ring tail.
// The head is kept, so the next packet of the same stream repeats it.
//
// Interface to the downstream mux: pkt_avail says a packet can be launched;
// a one-cycle start while pkt_avail begins it, after which one symbol is
// presented per cycle (out_valid) and consumed without back-pressure, the
// last one flagged by out_last. X and Y are served alternately when both are
// ready. The 20-payload packet limit, the one-stream-per-FIFO rule and the
// packet-ending rules follow the QuickRing description; FIFO depth 42 comes
// from "2 packets and 2 symbols"; the alternate service order is this
// design's choice. The LB FIFO is not built (see the design notes).
module qr_tx_router
  import qr_pkg::*;
#(
  parameter int unsigned XY_DEPTH = 42
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  node_id,
  // from the Tx Resynchronizer (show-ahead)
  input  logic        in_valid,
  input  client_sym_t in_sym,
  output logic        in_pop,
  // to the downstream mux
  output logic        pkt_avail,
  input  logic        start,
  output logic        out_valid,
  output ring_sym_t   out_sym,
  output logic        out_last,
  // observation
  output logic [1:0]  buf_busy
);
  localparam int unsigned CW = $clog2(XY_DEPTH + 1);

  typedef struct packed {
    logic        tail;
    logic        frame;
    logic [31:0] data;
  } entry_t;

  logic [1:0]  hv, closed, mc;
  logic [31:0] hd [2];
  logic [CW-1:0] tailcnt [2];
  logic        cur, cur_active;

  // FIFO wires
  logic [1:0]  f_wr, f_rd, f_empty, f_full;
  entry_t      f_rdata [2];
  logic [CW-1:0] f_count [2];
  entry_t      f_wdata;

  assign f_wdata = '{tail: is_tail(in_sym.t), frame: is_frame(in_sym.t), data: in_sym.s};

  for (genvar b = 0; b < 2; b++) begin : g_xy
    sync_fifo #(.DW($bits(entry_t)), .DEPTH(XY_DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en(f_wr[b]), .wr_data(f_wdata),
      .rd_en(f_rd[b]), .rd_data(f_rdata[b]),
      .empty(f_empty[b]), .full(f_full[b]), .count(f_count[b])
    );
  end

  // sender state
  logic       sending, sel, last_sel, in_head;
  logic [4:0] sent;

  // --- input side ---
  logic       take_head, free_sel, any_free;
  always_comb begin
    any_free = !hv[0] || !hv[1];
    free_sel = (!hv[!cur]) ? !cur : cur;
    if (!hv[0] && !hv[1]) free_sel = !cur;
    take_head = in_valid && is_head(in_sym.t) && any_free && !cur_active;
    f_wr = '0;
    if (in_valid && is_payload(in_sym.t) && cur_active && !f_full[cur]) f_wr[cur] = 1'b1;
    in_pop = take_head || (f_wr != '0) || (in_valid && is_payload(in_sym.t) && !cur_active);
  end

  // --- packet readiness ---
  logic [1:0] ready;
  always_comb begin
    for (int b = 0; b < 2; b++)
      ready[b] = hv[b] && !f_empty[b] &&
                 ((f_count[b] >= CW'(MAX_PAYLOAD)) || (tailcnt[b] != '0) || closed[b]);
  end
  assign pkt_avail = !sending && (ready != '0);
  wire start_sel = (ready[0] && ready[1]) ? !last_sel : ready[1];

  // --- output side ---
  entry_t cur_e;
  assign cur_e = f_rdata[sel];
  always_comb begin
    out_valid = sending;
    out_last  = 1'b0;
    f_rd      = '0;
    if (in_head) begin
      out_sym = '{typ: RT_HEAD, frame: mc[sel], data: hd[sel]};
    end else begin
      out_last = cur_e.tail || (sent == 5'(MAX_PAYLOAD - 1)) ||
                 (closed[sel] && (f_count[sel] == CW'(1)));
      out_sym  = '{typ: out_last ? RT_TAIL : RT_PAYLOAD, frame: cur_e.frame, data: cur_e.data};
      if (sending) f_rd[sel] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hv <= '0; closed <= '0; mc <= '0;
      hd[0] <= '0; hd[1] <= '0;
      tailcnt[0] <= '0; tailcnt[1] <= '0;
      cur <= 1'b0; cur_active <= 1'b0;
      sending <= 1'b0; sel <= 1'b0; last_sel <= 1'b1; in_head <= 1'b0; sent <= '0;
    end else begin
      // a new head closes the open stream at once, then waits for a free FIFO
      if (in_valid && is_head(in_sym.t) && cur_active) begin
        closed[cur] <= 1'b1;
        cur_active  <= 1'b0;
      end
      if (take_head) begin
        hv[free_sel]     <= 1'b1;
        closed[free_sel] <= 1'b0;
        mc[free_sel]     <= (in_sym.t == CT_MC_HEAD);
        hd[free_sel]     <= {in_sym.s[31:28], node_id, in_sym.s[23:0]};
        cur              <= free_sel;
        cur_active       <= 1'b1;
      end
      for (int b = 0; b < 2; b++) begin
        tailcnt[b] <= tailcnt[b] + CW'(f_wr[b] && f_wdata.tail) - CW'(f_rd[b] && f_rdata[b].tail);
        // release a drained, closed stream
        if (hv[b] && closed[b] && f_empty[b] && !(sending && sel == 1'(b)) && !(take_head && free_sel == 1'(b)))
          hv[b] <= 1'b0;
      end
      if (!sending) begin
        if (start && pkt_avail) begin
          sending  <= 1'b1;
          sel      <= start_sel;
          last_sel <= start_sel;
          in_head  <= 1'b1;
          sent     <= '0;
        end
      end else if (in_head) begin
        in_head <= 1'b0;
      end else begin
        sent <= sent + 5'd1;
        if (out_last) sending <= 1'b0;
      end
    end
  end

  assign buf_busy = hv;

  a_start_ok: assert property (@(posedge clk) disable iff (!rst_n) start |-> pkt_avail)
    else $error("qr_tx_router: start without a ready packet");
endmodule
