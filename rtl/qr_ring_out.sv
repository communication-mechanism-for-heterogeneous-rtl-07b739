// qr_ring_out: downstream side of the QuickRing ring interface (ring clock):
// the Ring/Multicast FIFO and the downstream port multiplexer.
//
// Every symbol the upstream router decides to forward is written into the
// Ring/Multicast FIFO (RING_DEPTH entries). Each ring cycle the multiplexer
// sends exactly one symbol: a forwarded symbol, a symbol of a locally sourced
// packet, or a null. Packets are never interleaved: once a forwarded packet
// has begun, the mux keeps taking its symbols from the FIFO (sending nulls if
// the rest has not arrived yet) until its tail; once a local packet has begun
// all its symbols go out back to back. At a packet boundary a local packet is
// started if one is ready and the FIFO holds at most LOCAL_MAX symbols (that
// is, it has at least RING_DEPTH-LOCAL_MAX free places, enough to absorb
// everything that arrives during a 21-symbol local packet); otherwise
// forwarding continues. The 40-entry depth and the 28-free / 12-used launch
// thresholds follow the QuickRing traffic-priority rules; the
// no-interleaving policy is this design's choice. dn_sym is registered.
module qr_ring_out
  import qr_pkg::*;
#(
  parameter int unsigned RING_DEPTH = 40,
  parameter int unsigned LOCAL_MAX  = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  // symbols to forward
  input  logic       fwd_valid,
  input  ring_sym_t  fwd_sym,
  // local packets from the Tx router
  input  logic       lp_avail,
  output logic       lp_start,
  input  logic       lp_valid,
  input  ring_sym_t  lp_sym,
  input  logic       lp_last,
  // downstream symbol (to the serializer)
  output ring_sym_t  dn_sym,
  // observation
  output logic       local_launch,   // pulses when a local packet starts
  output logic       fwd_deferred,   // a local packet went while forwarded data waited
  output logic [$clog2(RING_DEPTH+1)-1:0] ring_count
);
  localparam int unsigned CW = $clog2(RING_DEPTH + 1);

  ring_sym_t r_head;
  logic      r_empty, r_full, r_rd;

  sync_fifo #(.DW($bits(ring_sym_t)), .DEPTH(RING_DEPTH)) u_ring_fifo (
    .clk, .rst_n,
    .wr_en(fwd_valid), .wr_data(fwd_sym),
    .rd_en(r_rd), .rd_data(r_head),
    .empty(r_empty), .full(r_full), .count(ring_count)
  );

  typedef enum logic [1:0] {S_IDLE, S_FWD, S_LOCAL, S_START} state_t;
  state_t st;

  logic      go_local;
  ring_sym_t nxt;
  always_comb begin
    go_local = (st == S_IDLE) && lp_avail && (ring_count <= CW'(LOCAL_MAX));
    lp_start = go_local;
    r_rd     = 1'b0;
    nxt      = RING_NULL;
    unique case (st)
      S_IDLE: if (!go_local && !r_empty) begin
        r_rd = 1'b1;
        nxt  = r_head;
      end
      S_FWD: if (!r_empty) begin
        r_rd = 1'b1;
        nxt  = r_head;
      end
      S_START, S_LOCAL: if (lp_valid) nxt = lp_sym;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st           <= S_IDLE;
      dn_sym       <= RING_NULL;
      local_launch <= 1'b0;
      fwd_deferred <= 1'b0;
    end else begin
      dn_sym       <= nxt;
      local_launch <= go_local;
      fwd_deferred <= go_local && !r_empty;
      unique case (st)
        S_IDLE:  if (go_local) st <= S_START;
                 else if (r_rd && (r_head.typ == RT_HEAD || r_head.typ == RT_PAYLOAD)) st <= S_FWD;
        S_FWD:   if (r_rd && r_head.typ == RT_TAIL) st <= S_IDLE;
        S_START: st <= S_LOCAL;
        S_LOCAL: if (lp_valid && lp_last) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  a_ring_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(fwd_valid && r_full))
    else $error("qr_ring_out: Ring/Multicast FIFO overflow");
endmodule
