// tb_qr_mcast_handler: self-checking test of the upstream router / multicast
// handler of node 5.
//
// Whole packets (head, payloads, tail, with nulls in between) are applied and
// the copy and forward outputs are compared, one clock later, with what the
// multicast rules demand:
//  * own bit set, slot free: copy the packet, claim a slot, clear the own bit
//    in the forwarded head, forward only if other bits remain;
//  * own bit set, no slot: no copy, a drop pulse, forwarding as above;
//  * own bit clear: forward unchanged, no copy;
//  * source field equal to this node: never forwarded (the packet has been
//    round the ring); a multicast packet that is not forwarded raises the
//    absorbed pulse;
//  * directed head for this node is copied, any other is forwarded.
// The expected outputs are computed here from these rules. Nulls must produce
// no output. A watchdog ends the run.
module tb_qr_mcast_handler;
  import qr_pkg::*;

  localparam logic [3:0] ME = 4'd5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ring_sym_t up_sym = RING_NULL, copy_sym, fwd_sym;
  logic      slot_avail = 1, slot_take, copy_valid, fwd_valid, mc_drop, mc_absorbed;

  qr_mcast_handler dut (.clk, .rst_n, .node_id(ME), .up_sym, .slot_avail, .slot_take,
                        .copy_valid, .copy_sym, .fwd_valid, .fwd_sym, .mc_drop, .mc_absorbed);

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int bad = 0;

  // send one packet and compare every output cycle with the expectation
  task automatic packet(bit mc, logic [31:0] hd, bit slot, int npl, string what);
    logic exp_copy, exp_fwd, exp_drop, exp_abs;
    logic [31:0] exp_hd;
    int bad0;
    bad0 = bad;
    if (mc) begin
      exp_copy = hd[ME] && slot;
      exp_drop = hd[ME] && !slot;
      exp_hd   = hd;
      exp_hd[ME] = 1'b0;
      exp_fwd  = (exp_hd[15:0] != 0) && (hd[27:24] != ME);
      exp_abs  = !exp_fwd;
    end else begin
      exp_copy = (hd[23:20] == ME) && slot;
      exp_drop = 0;
      exp_hd   = hd;
      exp_fwd  = (hd[23:20] != ME) && (hd[27:24] != ME);
      exp_abs  = 0;
    end
    for (int i = 0; i <= npl + 2; i++) begin
      ring_sym_t s;
      @(negedge clk);
      slot_avail = slot;
      if (i == 0) s = '{typ: RT_HEAD, frame: mc, data: hd};
      else if (i == 2) s = RING_NULL;                         // a null inside the packet
      else if (i <= npl + 1) s = '{typ: (i == npl + 1) ? RT_TAIL : RT_PAYLOAD, frame: 1'b0, data: 32'(i)};
      else s = RING_NULL;
      up_sym = s;
      @(negedge clk);
      // outputs for s
      if (ring_is_null(s)) begin
        if (copy_valid || fwd_valid) bad++;
      end else begin
        if (copy_valid != exp_copy) bad++;
        if (fwd_valid != exp_fwd) bad++;
        if (exp_copy && copy_sym != s) bad++;
        if (exp_fwd && fwd_sym.data != ((i == 0) ? exp_hd : s.data)) bad++;
        if (i == 0) begin
          if (slot_take != exp_copy || mc_drop != exp_drop || mc_absorbed != exp_abs) bad++;
        end else if (slot_take || mc_drop || mc_absorbed) bad++;
      end
      up_sym = RING_NULL;   // a null between any two symbols
    end
    check(bad == bad0, what);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    //          mc  head word                         slot npl
    packet(1, {2'b11, 2'b00, 4'h0, 8'h10, 16'b0000_0000_0110_0000}, 1, 5, "own bit + other bit: copy and forward");
    packet(1, {2'b11, 2'b00, 4'h0, 8'h10, 16'b0000_0000_0010_0000}, 1, 4, "own bit only: copy, absorbed");
    packet(1, {2'b11, 2'b00, 4'h1, 8'h10, 16'b1000_0000_0000_0000}, 1, 3, "other bit: forward unchanged");
    packet(1, {2'b11, 2'b00, 4'h0, 8'h10, 16'b0100_0000_0010_0000}, 0, 3, "own bit, no slot: dropped, forwarded");
    packet(1, {2'b11, 2'b00, 4'h5, 8'h10, 16'b0100_0000_0000_0010}, 1, 3, "own source: not forwarded");
    packet(0, {2'b00, 2'b00, 4'h1, 4'h5, 4'h0, 4'h0, 4'h0, 4'h0, 4'h1}, 1, 6, "directed to me: copied");
    packet(0, {2'b00, 2'b00, 4'h1, 4'h7, 4'h0, 4'h0, 4'h0, 4'h0, 4'h1}, 1, 2, "directed elsewhere: forwarded");
    packet(0, {2'b00, 2'b00, 4'h5, 4'h7, 4'h0, 4'h0, 4'h0, 4'h0, 4'h1}, 1, 2, "directed, back at source: removed");
    for (int n = 0; n < 200; n++) begin
      logic [31:0] h;
      bit mc;
      h  = $urandom;
      mc = $urandom;
      packet(mc, h, $urandom_range(3) != 0, $urandom_range(20, 1), "random packet");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
