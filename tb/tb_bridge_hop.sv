// tb_bridge_hop: self-checking test of the bridge hop between the CCN ring
// and the PC ring.
//
// Two small rings are built around the bridge: on the CCN side one controller
// as node 0 (the Master Controller's position) closes a ring with the
// bridge's node 2; on the PC side one controller as node 1 (the first PC)
// closes a ring with the bridge's node 0. Host models write and log client
// symbols. Checked:
//  * CCN -> PC: multicast streams addressed to the bridge (mask bit 2) with
//    group codes 0x10 (pattern 1, includes PC 1), 0x31 (range 1..3) and 0x20
//    (pattern 2, excludes PC 1) reach PC 1 only when its bit is in the
//    converted mask; the head that arrives carries the converted mask, the
//    original group field and the bridge's PC-ring ID 0 as source;
//  * PC -> CCN: group 0x01 and 0x03 reach node 0 with the reverse-converted
//    mask and the bridge's CCN ID 2 as source;
//  * payload words arrive intact and the conversion events are counted.
// A watchdog ends the run.
module tb_bridge_hop;
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

  logic [5:0] ccn_to_br, br_to_ccn, hp_to_br, br_to_hp;
  logic [1:0] br_abort, br_drop;
  logic       fconv, rconv;

  bridge_hop dut (
    .rg_clk, .ss_clk, .clt_clk, .rst_n,
    .ccn_up_ss(ccn_to_br), .ccn_dn_ss(br_to_ccn), .hp_up_ss(hp_to_br), .hp_dn_ss(br_to_hp),
    .ring_abort(br_abort), .ev_fwd_convert(fconv), .ev_rev_convert(rconv), .ev_mc_drop(br_drop)
  );

  // node 0 of the CCN (index 0) and PC 1 (index 1)
  ctype_t      tx_t [2], rx_t [2];
  logic [31:0] tx_s [2], rx_s [2];
  logic        tx_ok [2], abort [2];

  qr_controller u_ccn0 (
    .rg_clk, .ss_clk, .tx_clk(clt_clk), .rx_clk(clt_clk), .rst_n, .node_id(4'd0),
    .up_ss(br_to_ccn), .dn_ss(ccn_to_br),
    .tx_t(tx_t[0]), .tx_s(tx_s[0]), .tx_ok(tx_ok[0]),
    .rx_stall(1'b0), .rx_t(rx_t[0]), .rx_s(rx_s[0]), .rx_et(),
    .ring_abort(abort[0]), .ev_mc_drop(), .ev_mc_absorbed(), .ev_local_launch(),
    .ev_fwd_deferred(), .ev_head_stripped()
  );
  qr_controller u_pc1 (
    .rg_clk, .ss_clk, .tx_clk(clt_clk), .rx_clk(clt_clk), .rst_n, .node_id(4'd1),
    .up_ss(br_to_hp), .dn_ss(hp_to_br),
    .tx_t(tx_t[1]), .tx_s(tx_s[1]), .tx_ok(tx_ok[1]),
    .rx_stall(1'b0), .rx_t(rx_t[1]), .rx_s(rx_s[1]), .rx_et(),
    .ring_abort(abort[1]), .ev_mc_drop(), .ev_mc_absorbed(), .ev_local_launch(),
    .ev_fwd_deferred(), .ev_head_stripped()
  );

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
  int n_fconv = 0, n_rconv = 0;

  for (genvar i = 0; i < 2; i++) begin : g_host
    always @(posedge clt_clk) begin
      if (txq[i].size() != 0 && tx_ok[i]) begin
        tx_t[i] <= txq[i][0].t; tx_s[i] <= txq[i][0].s; void'(txq[i].pop_front());
      end else tx_t[i] <= CT_NULL;
      if (rst_n && rx_t[i] != CT_NULL) rxq[i].push_back('{t: rx_t[i], s: rx_s[i]});
    end
  end
  always @(posedge clt_clk) if (rst_n) begin
    n_fconv += int'(fconv);
    n_rconv += int'(rconv);
  end

  task automatic send(int node, logic [7:0] group, logic [15:0] mask, int n, logic [31:0] base);
    txq[node].push_back('{t: CT_MC_HEAD, s: {2'b00, 2'b00, 4'h0, group, mask}});
    for (int k = 0; k < n; k++)
      txq[node].push_back('{t: (k == n - 1) ? CT_DATA_TAIL : CT_DATA, s: base + k});
  endtask

  // one received stream: all heads equal to exp_head, payloads base..base+n-1
  task automatic expect_stream(int node, logic [31:0] exp_head, int n, logic [31:0] base, string what);
    int heads, bad_head, k;
    bit ok;
    heads = 0; bad_head = 0; k = 0; ok = 1;
    foreach (rxq[node][i]) begin
      if (is_head(rxq[node][i].t)) begin
        heads++;
        if (rxq[node][i].t != CT_MC_HEAD || rxq[node][i].s != exp_head) bad_head++;
      end else begin
        if (rxq[node][i].s != base + k) ok = 0;
        k++;
      end
    end
    check(heads > 0 && bad_head == 0, $sformatf("%s: head %h expected", what, exp_head));
    check(ok && k == n, $sformatf("%s: %0d of %0d words intact", what, k, n));
    rxq[node].delete();
  endtask

  initial begin
    rst_n = 0;
    for (int i = 0; i < 2; i++) begin
      tx_t[i] = CT_NULL; tx_s[i] = '0;
    end
    repeat (10) @(posedge rg_clk);
    rst_n <= 1;
    repeat (10) @(posedge rg_clk);

    // CCN -> PC ring
    send(0, 8'h10, 16'h0004, 30, 32'hA000);
    repeat (600) @(posedge rg_clk);
    expect_stream(1, {2'b00, 2'b00, 4'h0, 8'h10, 16'hAAAA}, 30, 32'hA000, "pattern 1");
    send(0, 8'h31, 16'h0004, 12, 32'hB000);
    repeat (400) @(posedge rg_clk);
    expect_stream(1, {2'b00, 2'b00, 4'h0, 8'h31, 16'h000E}, 12, 32'hB000, "range 1..3");
    send(0, 8'h20, 16'h0004, 12, 32'hC000);
    repeat (400) @(posedge rg_clk);
    check(rxq[1].size() == 0, "pattern 2 does not include PC 1");
    check(rxq[0].size() == 0, "CCN node 0 gets nothing back");

    // PC ring -> CCN
    send(1, 8'h01, 16'h0001, 25, 32'hD000);
    repeat (600) @(posedge rg_clk);
    expect_stream(0, {2'b00, 2'b00, 4'h2, 8'h01, 16'h0001}, 25, 32'hD000, "reverse to node 0");
    send(1, 8'h03, 16'h0001, 8, 32'hE000);
    repeat (400) @(posedge rg_clk);
    expect_stream(0, {2'b00, 2'b00, 4'h2, 8'h03, 16'h0003}, 8, 32'hE000, "reverse to nodes 0 and 1");
    check(rxq[1].size() == 0, "PC 1 gets nothing back");

    // one conversion per packet head: 2+1+1 forward packets, 2+1 reverse
    check(n_fconv == 4, $sformatf("forward conversions %0d", n_fconv));
    check(n_rconv == 3, $sformatf("reverse conversions %0d", n_rconv));
    check(br_abort == 0 && !abort[0] && !abort[1], "no ring error");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
