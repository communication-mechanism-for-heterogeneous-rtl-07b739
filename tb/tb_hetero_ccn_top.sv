// tb_hetero_ccn_top: end-to-end test of the whole communication network at
// its full size (3-node CCN ring, bridge hop, 15 high-level PCs).
//
// Host models stand in for the Master Controller (MC), the DLC's DSPs and the
// PCs: each queues client symbols and writes them while TxOK is high, and
// logs everything its Rx port delivers. The test walks through one image
// job of the control protocol:
//  1. every PC and the DLC report their free buffers to the MC with a status
//     message (PC traffic crosses the bridge through the reverse conversion);
//  2. the MC sends an instruction plus image data to the DLC and broadcasts an
//     instruction to all PCs (range code 1..15 through the forward conversion);
//  3. the DLC multicasts its result to the odd PCs (pattern code 1);
//  4. the DLC sends a long burst to one PC that is stalling its Rx port, so the
//     PC's Target FIFO fills and later multicast packets are lost for it;
//     meanwhile a PC on the burst's path sends its own result to the MC.
// Each delivered stream is compared with what was sent. The test also counts
// how often each mechanism occurred (packet launch, forwarding deferred by a
// local launch, forward and reverse conversion, multicast copy lost, TxOK
// low) and fails if one never did.
module tb_hetero_ccn_top;
  import qr_pkg::*;

  localparam int NHP = 15;

  logic rg_clk, ss_clk, clt_clk, rst_n;

  // ring clocks: ss = 7 x rg, rising edges aligned
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
  // client clock, faster than the ring symbol clock so TxOK gets exercised
  initial begin
    clt_clk = 0;
    forever #5 clt_clk = ~clt_clk;
  end

  ctype_t      mc_tx_t, dlc_tx_t, mc_rx_t, dlc_rx_t;
  logic [31:0] mc_tx_s, dlc_tx_s, mc_rx_s, dlc_rx_s;
  logic        mc_tx_ok, dlc_tx_ok, mc_rx_stall, dlc_rx_stall;
  ctype_t      hp_tx_t [NHP];
  logic [31:0] hp_tx_s [NHP];
  logic        hp_tx_ok [NHP];
  logic        hp_rx_stall [NHP];
  ctype_t      hp_rx_t [NHP];
  logic [31:0] hp_rx_s [NHP];
  logic any_abort, ev_mc_drop, ev_fwd_deferred, ev_local_launch, ev_fwd_convert, ev_rev_convert;

  hetero_ccn_top dut (
    .rg_clk, .ss_clk, .clt_clk, .rst_n,
    .mc_tx_t, .mc_tx_s, .mc_tx_ok, .mc_rx_stall, .mc_rx_t, .mc_rx_s,
    .dlc_tx_t, .dlc_tx_s, .dlc_tx_ok, .dlc_rx_stall, .dlc_rx_t, .dlc_rx_s,
    .hp_tx_t, .hp_tx_s, .hp_tx_ok, .hp_rx_stall, .hp_rx_t, .hp_rx_s,
    .any_abort, .ev_mc_drop, .ev_fwd_deferred, .ev_local_launch, .ev_fwd_convert, .ev_rev_convert
  );

  // node index: 0 = MC, 1 = DLC, 2..16 = PC 1..15
  localparam int NN = NHP + 2;
  client_sym_t txq [NN][$];
  client_sym_t rxq [NN][$];
  int checks = 0, failures = 0;
  int n_drop = 0, n_defer = 0, n_launch = 0, n_fconv = 0, n_rconv = 0, n_txok_low = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // host transmit/receive models
  always @(posedge clt_clk) begin
    if (txq[0].size() != 0 && mc_tx_ok) begin
      mc_tx_t <= txq[0][0].t; mc_tx_s <= txq[0][0].s; void'(txq[0].pop_front());
    end else mc_tx_t <= CT_NULL;
    if (txq[1].size() != 0 && dlc_tx_ok) begin
      dlc_tx_t <= txq[1][0].t; dlc_tx_s <= txq[1][0].s; void'(txq[1].pop_front());
    end else dlc_tx_t <= CT_NULL;
    if (rst_n && mc_rx_t != CT_NULL)  rxq[0].push_back('{t: mc_rx_t, s: mc_rx_s});
    if (rst_n && dlc_rx_t != CT_NULL) rxq[1].push_back('{t: dlc_rx_t, s: dlc_rx_s});
    if (rst_n && (!mc_tx_ok || !dlc_tx_ok)) n_txok_low++;
    if (rst_n) begin
      n_drop   += int'(ev_mc_drop);
      n_fconv  += int'(ev_fwd_convert);
      n_rconv  += int'(ev_rev_convert);
    end
  end
  always @(posedge rg_clk) begin
    if (rst_n) begin
      n_defer  += int'(ev_fwd_deferred);
      n_launch += int'(ev_local_launch);
    end
  end
  for (genvar i = 0; i < NHP; i++) begin : g_host
    always @(posedge clt_clk) begin
      if (txq[i+2].size() != 0 && hp_tx_ok[i]) begin
        hp_tx_t[i] <= txq[i+2][0].t; hp_tx_s[i] <= txq[i+2][0].s; void'(txq[i+2].pop_front());
      end else hp_tx_t[i] <= CT_NULL;
      if (rst_n && hp_rx_t[i] != CT_NULL) rxq[i+2].push_back('{t: hp_rx_t[i], s: hp_rx_s[i]});
      if (rst_n && !hp_tx_ok[i]) n_txok_low++;
    end
  end

  function automatic logic [31:0] mc_head(logic [7:0] group, logic [15:0] mask);
    mc_head_t h;
    h = '{acc: 2'd0, conn: 2'd0, src: 4'd0, group: group, mcast: mask};
    return 32'(h);
  endfunction

  // queue a stream: head then payloads, the last one a data tail
  task automatic send(int node, logic [31:0] head, logic [31:0] words[$]);
    txq[node].push_back('{t: CT_MC_HEAD, s: head});
    foreach (words[k])
      txq[node].push_back('{t: (k == words.size() - 1) ? CT_DATA_TAIL : CT_DATA, s: words[k]});
  endtask

  // payload words a node has received, heads removed; also counts heads
  function automatic void take_payloads(int node, ref logic [31:0] w[$], ref int heads);
    w.delete(); heads = 0;
    foreach (rxq[node][k]) begin
      if (is_head(rxq[node][k].t)) heads++;
      else w.push_back(rxq[node][k].s);
    end
    rxq[node].delete();
  endfunction

  task automatic wait_idle(int cycles);
    repeat (cycles) @(posedge rg_clk);
  endtask

  // independent reference for the forward conversion of range codes
  function automatic logic [15:0] range_set(int lo, int hi);
    logic [15:0] m = '0;
    for (int n = 1; n < 16; n++)
      if (lo <= hi ? (n >= lo && n <= hi) : (n >= lo || n <= hi)) m[n] = 1'b1;
    return m;
  endfunction

  logic [31:0] w[$], exp_w[$];
  int heads;

  initial begin : watchdog
    repeat (200000) @(posedge rg_clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    mc_tx_t = CT_NULL; dlc_tx_t = CT_NULL; mc_tx_s = '0; dlc_tx_s = '0;
    mc_rx_stall = 0; dlc_rx_stall = 0;
    for (int i = 0; i < NHP; i++) begin
      hp_tx_t[i] = CT_NULL; hp_tx_s[i] = '0; hp_rx_stall[i] = 0;
    end
    repeat (10) @(posedge rg_clk);
    rst_n <= 1;
    repeat (10) @(posedge rg_clk);

    // ---- 1. status reports (type 5) from DLC and every PC to the MC ----
    begin
      msg_status_t st;
      st = '{mtype: MSG_STATUS, tid: 5'd0, status: 3'd0, pid: 17'd1, nab: 4'd4};
      send(1, mc_head(8'h00, 16'h0001), '{32'(st), 32'hD1C0_0001});
      for (int i = 1; i <= NHP; i++) begin
        st = '{mtype: MSG_STATUS, tid: 5'd0, status: 3'd0, pid: 17'(i + 1), nab: 4'(i % 4)};
        send(i + 1, mc_head(8'h01, 16'h0001), '{32'(st), 32'(i)});
      end
    end
    wait_idle(3000);
    take_payloads(0, w, heads);
    check(heads == NHP + 1, $sformatf("MC got %0d status heads, expected %0d", heads, NHP + 1));
    begin
      bit seen [NN];
      foreach (seen[k]) seen[k] = 0;
      for (int k = 0; k + 1 < w.size(); k += 2) begin
        msg_status_t st;
        st = msg_status_t'(w[k]);
        check(st.mtype == MSG_STATUS, "status message type");
        if (st.pid >= 1 && st.pid <= NN - 1) seen[st.pid] = 1;
        if (st.pid >= 2) check(w[k+1] == 32'(st.pid - 1) && st.nab == 4'((st.pid - 1) % 4),
                               $sformatf("status body from PID %0d", st.pid));
      end
      for (int p = 1; p <= NN - 1; p++) check(seen[p], $sformatf("status from PID %0d reached the MC", p));
    end
    for (int n = 1; n < NN; n++) check(rxq[n].size() == 0, $sformatf("node %0d got no status copy", n));

    // ---- 2. MC: instruction + image data to the DLC, instruction to all PCs ----
    begin
      msg_word0_t w0;
      exp_w.delete();
      w0 = '{mtype: MSG_INSTR_DATA, tid: 5'd3, body: 24'h00_0042};
      exp_w.push_back(32'(w0));
      exp_w.push_back({24'h00_FFFE, 8'h10});         // destination of the result
      for (int k = 0; k < 98; k++) exp_w.push_back(32'hA000_0000 + 32'(k));
      send(0, mc_head(8'h00, 16'h0002), exp_w);
      w0 = '{mtype: MSG_INSTR, tid: 5'd3, body: 24'h00_0099};
      send(0, mc_head(8'hF1, 16'h0004), '{32'(w0), 32'h0000_0010});
    end
    wait_idle(4000);
    take_payloads(1, w, heads);
    check(w == exp_w, $sformatf("DLC image data intact (%0d of %0d words)", w.size(), exp_w.size()));
    check(heads == 5, $sformatf("DLC saw %0d packet heads for 100 words, expected 5", heads));
    for (int i = 1; i <= NHP; i++) begin
      msg_word0_t r0;
      take_payloads(i + 1, w, heads);
      r0 = (w.size() > 0) ? msg_word0_t'(w[0]) : '0;
      check(w.size() == 2 && heads == 1 && r0.mtype == MSG_INSTR && r0.tid == 5'd3,
            $sformatf("PC %0d got the broadcast instruction", i));
    end
    take_payloads(0, w, heads);
    check(w.size() == 0, "MC got none of its own traffic");

    // ---- 3. DLC result to the odd PCs (pattern code 1) ----
    exp_w.delete();
    for (int k = 0; k < 41; k++) exp_w.push_back(32'hB000_0000 + 32'(k));
    send(1, mc_head(8'h10, 16'h0004), exp_w);
    wait_idle(4000);
    for (int i = 1; i <= NHP; i++) begin
      take_payloads(i + 1, w, heads);
      if (i % 2 == 1) check(w == exp_w && heads == 3, $sformatf("odd PC %0d got the result", i));
      else            check(w.size() == 0, $sformatf("even PC %0d got nothing", i));
    end
    check(range_set(1, 15) == 16'hFFFE && range_set(7, 3) == 16'hFF8E, "reference range model");

    // ---- 4. long burst to a stalled PC 5: Target FIFO overflow ----
    hp_rx_stall[4] = 1;
    exp_w.delete();
    for (int k = 0; k < 200; k++) exp_w.push_back(32'hC000_0000 + 32'(k));
    send(1, mc_head(8'h55, 16'h0004), exp_w);
    // meanwhile PC 3, which forwards the burst, sends a result to the MC
    begin
      logic [31:0] r3[$];
      for (int k = 0; k < 160; k++) r3.push_back(32'hE300_0000 + 32'(k));
      repeat (120) @(posedge rg_clk);
      send(4, mc_head(8'h01, 16'h0001), r3);
      wait_idle(6000);
      begin
        logic [31:0] wm[$];
        int hm;
        take_payloads(0, wm, hm);
        check(wm == r3 && hm == 8, $sformatf("PC 3 result reached the MC intact (%0d words)", wm.size()));
      end
    end
    hp_rx_stall[4] = 0;
    wait_idle(2000);
    take_payloads(6, w, heads);
    check(heads >= 3 && heads < 10, $sformatf("stalled PC kept %0d of 10 packets", heads));
    check(w.size() == 20 * heads, "stalled PC got whole packets only");
    for (int k = 0; k < w.size(); k++)
      if (k < 60) check(w[k] == exp_w[k], "first packets arrive intact");
    for (int i = 1; i <= NHP; i++) if (i != 5) check(rxq[i+1].size() == 0, $sformatf("PC %0d not in the burst", i));

    check(!any_abort, "no ring error detected");
    // mechanism coverage
    $display("events: launch=%0d deferred=%0d fwd_conv=%0d rev_conv=%0d mc_drop=%0d txok_low=%0d",
             n_launch, n_defer, n_fconv, n_rconv, n_drop, n_txok_low);
    check(n_launch > 0, "local packet launches happened");
    check(n_defer > 0, "forwarding deferred by a local launch happened");
    check(n_fconv > 0, "forward address conversion happened");
    check(n_rconv > 0, "reverse address conversion happened");
    check(n_drop > 0, "multicast copy lost for lack of Target FIFO space happened");
    check(n_txok_low > 0, "TxOK flow control happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
