// sync_fifo: single-clock first-in first-out buffer used for the X and Y
// transmit FIFOs, the Ring/Multicast FIFO and the Target FIFO.
//
// Show-ahead read: rd_data is the oldest entry whenever empty is low, and
// rd_en removes it. wr_en on a full FIFO is ignored (and flagged by an
// assertion); count gives the exact occupancy. DEPTH need not be a power of
// two. Writes and reads take effect on the rising clock edge; reset is
// synchronous and active low.
module sync_fifo #(
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  input  logic          rd_en,
  output logic [DW-1:0] rd_data,
  output logic          empty,
  output logic          full,
  output logic [CW-1:0] count
);
  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= nxt(wptr);
      if (do_rd) rptr <= nxt(rptr);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  assign rd_data = mem[rptr];
  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full))
    else $error("sync_fifo: write to a full FIFO");
endmodule
