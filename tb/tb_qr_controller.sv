// tb_qr_controller: self-checking test of one QuickRing controller model,
// with two instances (nodes 0 and 1) closed into a two-node ring.
//
// Host models write client symbols while TxOK is high and log what the Rx
// ports deliver. Checked:
//  1. a 50-word multicast stream from node 0 to node 1 arrives intact, cut
//     into packets of at most 20 payloads, each starting with the head whose
//     source field now holds 0; node 0 gets no copy of it;
//  2. a 30-word variable directed stream (ACC = 0) from node 1 to node 0
//     arrives with only one head, its routing fields rotated;
//  3. the ring rate: a long stream moves 20 payloads per 21 ring cycles, so
//     200 words need at least 210 ring cycles from first to last symbol;
//  4. with node 1's client stalling, node 0 sends 8 multicast packets: only
//     as many whole packets as the Target FIFO and Rx Resynchronizer hold are
//     kept, the rest are lost (drop events), and every packet that does
//     arrive is complete;
//  5. a bit flipped on the ring wire raises ring_abort at the receiver.
// A watchdog ends the run.
module tb_qr_controller;
  import qr_pkg::*;

  logic rg_clk, ss_clk, clt_clk, rst_n;
  initial begin
    ss_clk = 0; rg_clk = 0;
    forever begin
      for (int k = 0; k < 7; k++) begin
        #1 ss_clk = 1;
        if (k == 0) rg_clk = 1;
        if (k == 4) rg_clk = 0;
        #1 ss_clk = 0;
      end
    end
  end
  initial begin
    clt_clk = 0;
    forever #5 clt_clk = ~clt_clk;
  end

  logic [5:0]  a2b, b2a, flip;
  ctype_t      tx_t [2], rx_t [2], rx_et [2];
  logic [31:0] tx_s [2], rx_s [2];
  logic        tx_ok [2], rx_stall [2], abort [2], drop [2], absorbed [2], launch [2], defer [2], strip [2];
  logic [5:0]  dn [2];

  assign a2b = dn[0] ^ flip;
  assign b2a = dn[1];

  for (genvar i = 0; i < 2; i++) begin : g_node
    qr_controller u_qc (
      .rg_clk, .ss_clk, .tx_clk(clt_clk), .rx_clk(clt_clk), .rst_n, .node_id(4'(i)),
      .up_ss(i == 0 ? b2a : a2b), .dn_ss(dn[i]),
      .tx_t(tx_t[i]), .tx_s(tx_s[i]), .tx_ok(tx_ok[i]),
      .rx_stall(rx_stall[i]), .rx_t(rx_t[i]), .rx_s(rx_s[i]), .rx_et(rx_et[i]),
      .ring_abort(abort[i]), .ev_mc_drop(drop[i]), .ev_mc_absorbed(absorbed[i]),
      .ev_local_launch(launch[i]), .ev_fwd_deferred(defer[i]), .ev_head_stripped(strip[i])
    );
  end

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge rg_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  client_sym_t txq [2][$], rxq [2][$];
  int n_drop = 0, n_strip = 0;
  longint first_rg [2], last_rg [2];
  longint rg_cycle = 0;

  always @(posedge rg_clk) begin
    rg_cycle++;
    if (rst_n) begin
      n_drop  += int'(drop[1]);
      n_strip += int'(strip[0]);
    end
  end

  for (genvar i = 0; i < 2; i++) begin : g_host
    always @(posedge clt_clk) begin
      if (txq[i].size() != 0 && tx_ok[i]) begin
        tx_t[i] <= txq[i][0].t; tx_s[i] <= txq[i][0].s; void'(txq[i].pop_front());
      end else tx_t[i] <= CT_NULL;
      if (rst_n && rx_t[i] != CT_NULL) begin
        if (rxq[i].size() == 0) first_rg[i] = rg_cycle;
        last_rg[i] = rg_cycle;
        rxq[i].push_back('{t: rx_t[i], s: rx_s[i]});
      end
    end
  end

  task automatic send(int node, ctype_t ht, logic [31:0] head, int n, logic [31:0] base);
    txq[node].push_back('{t: ht, s: head});
    for (int k = 0; k < n; k++)
      txq[node].push_back('{t: (k == n - 1) ? CT_DATA_TAIL : CT_DATA, s: base + k});
  endtask

  // split what a node received into packets (a head starts one)
  typedef client_sym_t pkt_t[$];
  function automatic void packets(int node, ref pkt_t p[$]);
    p.delete();
    foreach (rxq[node][k]) begin
      if (is_head(rxq[node][k].t)) p.push_back({rxq[node][k]});
      else if (p.size() != 0) p[p.size()-1].push_back(rxq[node][k]);
    end
    rxq[node].delete();
  endfunction

  initial begin
    pkt_t p[$];
    logic [31:0] words[$];
    flip = '0;
    rst_n = 0;
    for (int i = 0; i < 2; i++) begin
      tx_t[i] = CT_NULL; tx_s[i] = '0; rx_stall[i] = 0;
    end
    repeat (10) @(posedge rg_clk);
    rst_n <= 1;
    repeat (10) @(posedge rg_clk);

    // ---- 1. multicast stream 0 -> 1 ----
    send(0, CT_MC_HEAD, 32'h0055_0002, 50, 32'h1000);
    repeat (400) @(posedge rg_clk);
    packets(1, p);
    check(p.size() == 3, $sformatf("50 words in %0d packets", p.size()));
    words.delete();
    foreach (p[i]) begin
      check(p[i][0].t == CT_MC_HEAD && p[i][0].s == 32'h0055_0002, $sformatf("packet %0d head %h", i, p[i][0].s));
      check(p[i].size() <= 21, "at most 20 payloads per packet");
      check(is_tail(p[i][p[i].size()-1].t), "packet ends with a tail");
      for (int k = 1; k < p[i].size(); k++) words.push_back(p[i][k].s);
    end
    begin
      bit ok;
      ok = (words.size() == 50);
      foreach (words[k]) if (words[k] != 32'h1000 + k) ok = 0;
      check(ok, $sformatf("multicast words intact (%0d)", words.size()));
    end
    check(rxq[0].size() == 0, "sender gets no copy");

    // ---- 2. variable directed stream 1 -> 0 ----
    // SRC=1 TRGT=0 HOP1=1 HCNT=1, ACC=0
    send(1, CT_DIR_HEAD, {2'b00, 2'b00, 4'h0, 4'h0, 4'h1, 4'h0, 4'h0, 4'h0, 4'h1}, 30, 32'h2000);
    repeat (400) @(posedge rg_clk);
    packets(0, p);
    check(p.size() == 1, $sformatf("one head kept for the directed stream (%0d)", p.size()));
    if (p.size() != 0) begin
      check(p[0][0].t == CT_DIR_HEAD &&
            p[0][0].s == {2'b00, 2'b00, 4'h0, 4'h1, 4'h0, 4'h0, 4'h0, 4'h1, 4'h0},
            $sformatf("rotated directed head %h", p[0][0].s));
      check(p[0].size() == 31, $sformatf("30 payloads (%0d)", p[0].size() - 1));
    end
    check(n_strip == 1, $sformatf("redundant head stripped once (%0d)", n_strip));

    // ---- 3. ring rate ----
    send(0, CT_MC_HEAD, 32'h0066_0002, 200, 32'h3000);
    repeat (900) @(posedge rg_clk);
    packets(1, p);
    check(p.size() == 10, $sformatf("200 words in %0d packets", p.size()));
    check(last_rg[1] - first_rg[1] >= 209,
          $sformatf("200 words took %0d ring cycles (at least 210 symbols)", last_rg[1] - first_rg[1] + 1));
    check(last_rg[1] - first_rg[1] <= 260,
          $sformatf("near full ring rate (%0d ring cycles)", last_rg[1] - first_rg[1] + 1));

    // ---- 4. overflow while the receiver stalls ----
    rx_stall[1] = 1;
    for (int k = 0; k < 8; k++) send(0, CT_MC_HEAD, 32'h0077_0002 + (k << 16), 20, 32'h4000 + 32 * k);
    repeat (600) @(posedge rg_clk);
    @(posedge clt_clk);
    rx_stall[1] <= 0;
    repeat (300) @(posedge rg_clk);
    packets(1, p);
    check(n_drop > 0, $sformatf("multicast copies lost while stalled (%0d)", n_drop));
    check(p.size() + n_drop == 8, $sformatf("%0d packets kept + %0d lost = 8", p.size(), n_drop));
    check(p.size() >= 3, "at least the Target FIFO's three packets kept");
    foreach (p[i]) begin
      int k0;
      bit ok;
      k0 = int'((p[i][0].s - 32'h0077_0002) >> 16);
      ok = (p[i].size() == 21);
      for (int k = 1; k < p[i].size(); k++) if (p[i][k].s != 32'h4000 + 32 * k0 + k - 1) ok = 0;
      check(ok, $sformatf("kept packet %0d complete", k0));
    end

    // ---- 5. ring error ----
    check(!abort[0] && !abort[1], "no ring error so far");
    send(0, CT_MC_HEAD, 32'h0088_0002, 5, 32'h5000);
    repeat (20) @(posedge rg_clk);
    @(posedge ss_clk);
    flip <= 6'b000100;
    @(posedge ss_clk);
    flip <= 6'b000000;
    repeat (10) @(posedge rg_clk);
    check(abort[1] && !abort[0], "flipped wire bit raises ring_abort at the receiver");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
