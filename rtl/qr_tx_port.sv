// qr_tx_port: first stage of the QuickRing transmit pipeline (client clock).
//
// The client presents TxT (3-bit type) and TxS (32-bit word) every cycle,
// non-pipelined timing (type and word in the same cycle). Null and reserved
// codes are discarded; after reset every payload is discarded until the first
// head arrives; a head identical to the previous symbol's head with nothing in
// between is redundant and discarded. Accepted symbols travel through a 4-deep
// pipeline into the Tx Resynchronizer. The pipeline is elastic: a stage moves
// on whenever the next stage is free, so bubbles close up while the
// resynchronizer is full.
//
// TxOK is high while the pipeline and resynchronizer together have room for
// more than TXOK_SLACK symbols, so a client that stops writing within
// TXOK_SLACK symbols after TxOK falls never loses data. The 4-deep pipeline,
// the filtering rules and the 20-symbol TxOK slack follow the QuickRing
// description; the elastic pipeline is this design's choice.
module qr_tx_port
  import qr_pkg::*;
#(
  parameter int unsigned STAGES     = 4,
  parameter int unsigned FIFO_DEPTH = 32,
  parameter int unsigned TXOK_SLACK = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ctype_t      tx_t,
  input  logic [31:0] tx_s,
  output logic        tx_ok,
  // to Tx Resynchronizer write side
  output logic        fifo_wr,
  output client_sym_t fifo_data,
  input  logic        fifo_full,
  input  logic [$clog2(FIFO_DEPTH):0] fifo_count
);
  client_sym_t     stg   [STAGES];
  logic [STAGES-1:0] vld;
  logic            seen_head;   // a head has been accepted since reset
  logic            last_head;   // the last accepted symbol was a head
  logic [31:0]     last_head_s;
  ctype_t          last_head_t;

  // elastic pipeline: a stage takes a new symbol when it is empty or its
  // content moves on
  logic [STAGES-1:0] rdy;
  always_comb begin
    rdy[STAGES-1] = !vld[STAGES-1] || !fifo_full;
    for (int i = int'(STAGES) - 2; i >= 0; i--) rdy[i] = !vld[i] || rdy[i+1];
  end

  // input filter
  logic accept;
  always_comb begin
    accept = 1'b0;
    if (is_head(tx_t))
      accept = !(last_head && (tx_t == last_head_t) && (tx_s == last_head_s));
    else if (is_payload(tx_t))
      accept = seen_head;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld         <= '0;
      seen_head   <= 1'b0;
      last_head   <= 1'b0;
      last_head_s <= '0;
      last_head_t <= CT_NULL;
      for (int i = 0; i < int'(STAGES); i++) stg[i] <= '{t: CT_NULL, s: '0};
    end else begin
      if (accept) begin
        last_head <= is_head(tx_t);
        if (is_head(tx_t)) begin
          seen_head   <= 1'b1;
          last_head_s <= tx_s;
          last_head_t <= tx_t;
        end
      end
      if (rdy[0]) begin
        stg[0] <= '{t: tx_t, s: tx_s};
        vld[0] <= accept;
      end
      for (int i = 1; i < int'(STAGES); i++) begin
        if (rdy[i]) begin
          stg[i] <= stg[i-1];
          vld[i] <= vld[i-1] && rdy[i-1];
        end
      end
    end
  end

  assign fifo_wr   = vld[STAGES-1] && !fifo_full;
  assign fifo_data = stg[STAGES-1];

  // room left in pipeline plus resynchronizer
  logic [$clog2(FIFO_DEPTH + STAGES + 1):0] used;
  always_comb begin
    used = ($bits(used))'(fifo_count);
    for (int i = 0; i < int'(STAGES); i++) used = used + ($bits(used))'(vld[i]);
  end
  assign tx_ok = (($bits(used))'(FIFO_DEPTH + STAGES) - used) > ($bits(used))'(TXOK_SLACK);

  a_no_loss: assert property (@(posedge clk) disable iff (!rst_n) !(accept && !rdy[0]))
    else $error("qr_tx_port: symbol written while the pipeline is blocked");
endmodule
