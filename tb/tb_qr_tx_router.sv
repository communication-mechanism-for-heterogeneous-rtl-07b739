// tb_qr_tx_router: self-checking test of the Tx Router, the X/Y FIFOs and the
// packet former.
//
// Four client streams are fed in through a show-ahead FIFO model (as the Tx
// Resynchronizer would deliver them): a long multicast stream without a tail,
// a directed stream with frame payloads and two tails, a multicast stream
// whose tail is its 25th payload, and a short one. The downstream side starts
// a packet at random moments while pkt_avail is high. An independent model
// cuts each stream into the expected packets: a packet ends at a tail, at its
// 20th payload, or with the last payload of a stream closed by the next head;
// it starts with the stream's head (source field replaced by this node's ID)
// and its last symbol is a ring tail. Packets of different streams may
// alternate (X and Y), so the received packets are sorted by head and
// compared per stream. Also checked: one symbol per cycle inside a packet,
// no packet over 21 symbols. A watchdog ends the run.
module tb_qr_tx_router;
  import qr_pkg::*;

  localparam logic [3:0] ME = 4'd3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, in_pop, pkt_avail, start = 0, out_valid, out_last;
  client_sym_t in_sym;
  ring_sym_t   out_sym;
  logic [1:0]  buf_busy;

  qr_tx_router dut (.clk, .rst_n, .node_id(ME), .in_valid, .in_sym, .in_pop,
                    .pkt_avail, .start, .out_valid, .out_sym, .out_last, .buf_busy);

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input FIFO model
  client_sym_t iq[$];
  bit feed = 0;
  assign in_valid = feed && iq.size() != 0;
  assign in_sym   = (iq.size() != 0) ? iq[0] : '{CT_NULL, 32'h0};

  // expected packets per stream, as lists of ring symbols
  typedef ring_sym_t pkt_t[$];
  pkt_t exp_pk[$];     // all expected packets
  pkt_t got_pk[$];
  ring_sym_t cur[$];
  int gap_bad = 0;

  // build a stream, queue its symbols and its expected packets
  task automatic stream(ctype_t ht, logic [31:0] hw, ctype_t pts[$], logic [31:0] pws[$]);
    ring_sym_t hd, s;
    pkt_t p;
    int n;
    iq.push_back('{ht, hw});
    hd = '{typ: RT_HEAD, frame: (ht == CT_MC_HEAD), data: {hw[31:28], ME, hw[23:0]}};
    p = {hd};
    n = 0;
    foreach (pts[i]) begin
      bit last;
      iq.push_back('{pts[i], pws[i]});
      n++;
      last = is_tail(pts[i]) || n == 20 || i == pts.size() - 1;
      s = '{typ: last ? RT_TAIL : RT_PAYLOAD, frame: is_frame(pts[i]), data: pws[i]};
      p.push_back(s);
      if (last) begin
        exp_pk.push_back(p);
        p = {hd};
        n = 0;
      end
    end
  endtask

  // drive: pops take effect just after the rising edge
  initial forever begin
    bit pop;
    @(negedge clk);
    pop = in_pop;
    start = pkt_avail && ($urandom_range(2) == 0);
    // output monitor
    if (out_valid) begin
      cur.push_back(out_sym);
      if (out_last) begin
        got_pk.push_back(cur);
        cur.delete();
      end
    end else if (cur.size() != 0) gap_bad++;
    @(posedge clk);
    #1;
    if (pop) void'(iq.pop_front());
  end

  initial begin
    ctype_t ts[$];
    logic [31:0] ws[$];
    repeat (3) @(posedge clk);
    rst_n <= 1;

    ts.delete(); ws.delete();
    for (int i = 0; i < 45; i++) begin ts.push_back(CT_DATA); ws.push_back(32'h1000 + i); end
    stream(CT_MC_HEAD, 32'hC0AA_0006, ts, ws);
    ts.delete(); ws.delete();
    for (int i = 0; i < 5; i++) begin ts.push_back(CT_FRAME); ws.push_back(32'h2000 + i); end
    ts.push_back(CT_FRAME_TAIL); ws.push_back(32'h2005);
    for (int i = 0; i < 3; i++) begin ts.push_back(CT_DATA); ws.push_back(32'h2100 + i); end
    ts.push_back(CT_DATA_TAIL); ws.push_back(32'h2103);
    stream(CT_DIR_HEAD, 32'h0012_3401, ts, ws);
    ts.delete(); ws.delete();
    for (int i = 0; i < 24; i++) begin ts.push_back(CT_DATA); ws.push_back(32'h3000 + i); end
    ts.push_back(CT_DATA_TAIL); ws.push_back(32'h3018);
    stream(CT_MC_HEAD, 32'hC0BB_00F0, ts, ws);
    ts.delete(); ws.delete();
    ts.push_back(CT_DATA); ws.push_back(32'h4000);
    ts.push_back(CT_DATA); ws.push_back(32'h4001);
    ts.push_back(CT_DATA_TAIL); ws.push_back(32'h4002);
    stream(CT_MC_HEAD, 32'hC0CC_0001, ts, ws);
    // one more head so that nothing is left open; it has no payloads
    iq.push_back('{CT_MC_HEAD, 32'hC0DD_0002});

    feed = 1;
    repeat (600) @(negedge clk);

    check(got_pk.size() == exp_pk.size(),
          $sformatf("%0d packets, %0d expected", got_pk.size(), exp_pk.size()));
    // compare per stream (same head word), in order
    begin
      int bad = 0, too_long = 0;
      pkt_t e[$], g[$];
      logic [31:0] heads[$];
      foreach (exp_pk[i]) if (!(exp_pk[i][0].data inside {heads})) heads.push_back(exp_pk[i][0].data);
      foreach (heads[h]) begin
        e.delete(); g.delete();
        foreach (exp_pk[i]) if (exp_pk[i][0].data == heads[h]) e.push_back(exp_pk[i]);
        foreach (got_pk[i]) if (got_pk[i][0].data == heads[h]) g.push_back(got_pk[i]);
        check(e.size() == g.size(), $sformatf("stream %08h: %0d packets, %0d expected", heads[h], g.size(), e.size()));
        foreach (e[i]) if (i < g.size() && e[i] != g[i]) bad++;
      end
      foreach (got_pk[i]) if (got_pk[i].size() > 21) too_long++;
      check(bad == 0, $sformatf("packet contents (%0d wrong)", bad));
      check(too_long == 0, "no packet longer than head + 20 payloads");
    end
    check(gap_bad == 0, "packet symbols leave back to back");
    check(iq.size() == 0, "all input consumed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
