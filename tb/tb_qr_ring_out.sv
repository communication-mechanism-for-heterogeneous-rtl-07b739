// tb_qr_ring_out: self-checking test of the Ring/Multicast FIFO and the
// downstream multiplexer.
//
// A model of the Tx Router offers local packets of 21 symbols; the upstream
// side forwards whole 21-symbol packets. The downstream symbol stream is
// checked against these rules:
//  * every forwarded symbol leaves, in order;
//  * packets are never interleaved: between a head and its tail only symbols
//    of the same packet (or nulls inside a forwarded packet) appear;
//  * a local packet starts only at a packet boundary and only when at most 12
//    forwarded symbols are waiting (counted here from what went in and out);
//  * with an empty FIFO a ready local packet starts at once.
// Phases: local packets alone; forwarded traffic alone; continuous forwarded
// traffic with local packets waiting (they must wait until the backlog is at
// most 12 symbols, so some local packet goes while forwarded symbols wait);
// then bursty mixed traffic. A watchdog ends the run.
module tb_qr_ring_out;
  import qr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      fwd_valid = 0, lp_avail, lp_start, lp_valid, lp_last, local_launch, fwd_deferred;
  ring_sym_t fwd_sym = RING_NULL, lp_sym, dn_sym;
  logic [5:0] ring_count;

  qr_ring_out dut (.clk, .rst_n, .fwd_valid, .fwd_sym, .lp_avail, .lp_start, .lp_valid,
                   .lp_sym, .lp_last, .dn_sym, .local_launch, .fwd_deferred, .ring_count);

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // local packet source (behaves like the Tx Router): data[31:28] = 4'hA
  int lp_ready = 0, lp_idx = 0, lp_num = 0;
  bit lp_sending = 0;
  assign lp_avail = (lp_ready > 0) && !lp_sending;
  assign lp_valid = lp_sending;
  assign lp_last  = lp_sending && lp_idx == 20;
  always_comb begin
    lp_sym = '{typ: (lp_idx == 0) ? RT_HEAD : (lp_idx == 20 ? RT_TAIL : RT_PAYLOAD),
               frame: 1'b1, data: {4'hA, 12'(lp_num), 16'(lp_idx)}};
  end

  // forwarded traffic: data[31:28] = 4'h5
  ring_sym_t fq[$];      // symbols still to be forwarded by the upstream side
  ring_sym_t exp_fwd[$]; // forwarded symbols not yet seen downstream
  int fwd_pkts = 0, backlog = 0;
  bit fwd_en = 0;

  task automatic add_fwd_pkt();
    for (int i = 0; i <= 20; i++)
      fq.push_back('{typ: (i == 0) ? RT_HEAD : (i == 20 ? RT_TAIL : RT_PAYLOAD),
                     frame: 1'b0, data: {4'h5, 12'(fwd_pkts), 16'(i)}});
    fwd_pkts++;
  endtask

  int bad_order = 0, bad_interleave = 0, bad_launch = 0, n_local_out = 0, n_defer_seen = 0;
  int n_launch = 0, n_defer = 0;
  int in_pkt = 0;   // 0 none, 1 forwarded, 2 local
  int exp_lp_idx = 0;

  initial forever begin
    bit st, fv;
    @(negedge clk);
    #2;   // after the stimulus process has acted on this falling edge
    // upstream side presents the next forwarded symbol
    fv = fwd_en && fq.size() != 0;
    fwd_valid = fv;
    fwd_sym = fv ? fq[0] : RING_NULL;
    st = lp_start;
    if (st && backlog > 12) bad_launch++;
    @(posedge clk);
    #1;
    if (fv) begin
      exp_fwd.push_back(fq.pop_front());
      backlog++;
    end
    // local source
    if (lp_sending) begin
      if (lp_idx == 20) begin
        lp_sending = 0;
        lp_ready--;
        lp_num++;
        lp_idx = 0;
      end else lp_idx++;
    end
    if (st) begin
      lp_sending = 1;
      lp_idx = 0;
    end
  end

  // downstream monitor
  always @(negedge clk) if (rst_n) begin
    if (local_launch) n_launch++;
    if (fwd_deferred) n_defer++;
    if (!ring_is_null(dn_sym)) begin
      if (dn_sym.data[31:28] == 4'h5) begin
        if (exp_fwd.size() == 0 || dn_sym != exp_fwd[0]) bad_order++;
        if (exp_fwd.size() != 0) begin
          void'(exp_fwd.pop_front());
          backlog--;
        end
        if (in_pkt == 2) bad_interleave++;
        in_pkt = (dn_sym.typ == RT_TAIL) ? 0 : 1;
      end else begin
        if (in_pkt == 1) bad_interleave++;
        if (dn_sym.data[15:0] != 16'(exp_lp_idx)) bad_interleave++;
        exp_lp_idx = (dn_sym.typ == RT_TAIL) ? 0 : exp_lp_idx + 1;
        n_local_out++;
        in_pkt = (dn_sym.typ == RT_TAIL) ? 0 : 2;
      end
    end else if (in_pkt == 2) bad_interleave++;   // no gaps inside a local packet
  end

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    fwd_en = 1;

    // local packet with an empty FIFO: starts at once, 21 symbols back to back
    @(negedge clk);
    lp_ready = 1;
    t0 = 0;
    while (n_local_out == 0 && t0 < 10) begin
      @(negedge clk);
      #3;
      t0++;
    end
    check(t0 == 2, $sformatf("local packet on the ring %0d cycles after it was offered", t0));
    repeat (30) @(negedge clk);
    check(n_local_out == 21 && lp_ready == 0, "local packet sent whole");

    // forwarded traffic alone
    for (int p = 0; p < 4; p++) add_fwd_pkt();
    repeat (120) @(negedge clk);
    check(exp_fwd.size() == 0 && fq.size() == 0, "forwarded packets all sent");

    // continuous forwarded traffic with local packets waiting
    for (int p = 0; p < 12; p++) add_fwd_pkt();
    repeat (5) @(negedge clk);
    lp_ready = 3;
    t1 = 0;
    while (fq.size() != 0) begin
      @(negedge clk);
      t1++;
    end
    repeat (200) @(negedge clk);
    check(lp_ready == 0, "waiting local packets all launched");
    check(n_defer > 0, $sformatf("a local packet went while forwarded symbols waited (%0d)", n_defer));

    // bursty mixed traffic
    for (int r = 0; r < 40; r++) begin
      if ($urandom_range(1)) add_fwd_pkt();
      if ($urandom_range(2) == 0) lp_ready++;
      fwd_en = ($urandom_range(3) != 0);
      repeat ($urandom_range(30, 5)) @(negedge clk);
    end
    fwd_en = 1;
    repeat (800) @(negedge clk);
    check(fq.size() == 0 && exp_fwd.size() == 0, "all forwarded symbols delivered");
    check(lp_ready == 0 && !lp_sending, "all local packets delivered");
    check(bad_order == 0, $sformatf("forwarded order kept (%0d wrong)", bad_order));
    check(bad_interleave == 0, $sformatf("packets not interleaved (%0d wrong)", bad_interleave));
    check(bad_launch == 0, $sformatf("local launch only with at most 12 waiting (%0d wrong)", bad_launch));
    check(n_launch == lp_num, $sformatf("launch pulses %0d for %0d packets", n_launch, lp_num));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
