// async_fifo: dual-clock FIFO used as the QuickRing Tx Resynchronizer (32 deep,
// client clock to ring clock) and Rx Resynchronizer (8 deep, ring clock to
// client clock).
//
// Classic Gray-coded pointer design: each side keeps a binary and a Gray
// pointer one bit wider than the address; the Gray pointer crosses to the other
// clock through two flip-flops. Full and the write-side fill level wcount are
// computed from the synchronised read pointer, so they are pessimistic by the
// synchroniser delay, which is safe. Read is show-ahead: rd_data is valid while
// empty is low and rd_en pops it. DEPTH must be a power of two. The depths
// follow the QuickRing description; the Gray-code structure is this design's
// choice. Each side has its own synchronous active-low reset.
module async_fifo #(
  parameter int unsigned DW    = 35,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  output logic          full,
  output logic [AW:0]   wcount,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rd_en,
  output logic [DW-1:0] rd_data,
  output logic          empty
);
  logic [DW-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] b2g(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] g2b(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  wire do_wr = wr_en && !full;
  always_ff @(posedge wclk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= wr_data;
  end
  always_ff @(posedge wclk) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (do_wr) begin
        wbin  <= wbin + 1'b1;
        wgray <= b2g(wbin + 1'b1);
      end
    end
  end
  assign wcount = wbin - g2b(rgray_w2);
  assign full   = (wcount == (AW+1)'(DEPTH));

  // read side
  wire do_rd = rd_en && !empty;
  always_ff @(posedge rclk) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (do_rd) begin
        rbin  <= rbin + 1'b1;
        rgray <= b2g(rbin + 1'b1);
      end
    end
  end
  assign empty   = (rgray == wgray_r2);
  assign rd_data = mem[rbin[AW-1:0]];

  a_no_overflow: assert property (@(posedge wclk) disable iff (!wrst_n) !(wr_en && full))
    else $error("async_fifo: write to a full FIFO");
endmodule
