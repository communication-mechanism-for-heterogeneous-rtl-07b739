// tb_qr_target_fifo: self-checking test of the Target FIFO's packet-slot
// accounting and ordering.
//
// Packets of 21 symbols (head, payloads, tail) and shorter ones are written
// the way the multicast handler writes them: slot_take with the head, one
// symbol per cycle. The test checks that three slots are free after reset,
// that slot_avail falls after three packets are claimed, that a slot comes
// back exactly when a tail leaves (and not when a head or payload leaves),
// that symbols leave in order and only while out_full is low, and that a
// full 3 x 21-symbol load fits. A watchdog ends the run.
module tb_qr_target_fifo;
  import qr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      in_valid = 0, slot_take = 0, slot_avail, out_wr, out_full = 1;
  ring_sym_t in_sym = RING_NULL, out_sym;
  logic [1:0] slots_free;

  qr_target_fifo dut (.clk, .rst_n, .in_valid, .in_sym, .slot_take, .slot_avail,
                      .out_wr, .out_sym, .out_full, .slots_free);

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

  ring_sym_t exp_q[$];
  int bad_order = 0, n_out = 0, bad_slot = 0, n_tails_out = 0, wr_when_full = 0;
  int exp_free = 3;

  // output monitor with an independent slot count
  always @(posedge clk) if (rst_n) begin
    if (out_wr) begin
      if (out_full) wr_when_full++;
      if (exp_q.size() == 0 || out_sym != exp_q[0]) bad_order++;
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      n_out++;
      if (out_sym.typ == RT_TAIL) begin
        n_tails_out++;
        exp_free++;
      end
    end
    if (slot_take) exp_free--;
  end
  always @(negedge clk) if (rst_n) begin
    if (slots_free != 2'(exp_free) || slot_avail != (exp_free != 0)) bad_slot++;
  end

  task automatic write_pkt(int npl, int tag);
    for (int i = 0; i <= npl; i++) begin
      @(negedge clk);
      in_valid  = 1;
      slot_take = (i == 0);
      in_sym.typ   = (i == 0) ? RT_HEAD : (i == npl ? RT_TAIL : RT_PAYLOAD);
      in_sym.frame = 1'b1;
      in_sym.data  = {8'(tag), 24'(i)};
      exp_q.push_back(in_sym);
    end
    @(negedge clk);
    in_valid = 0;
    slot_take = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check(slots_free == 3 && slot_avail, "three slots free after reset");
    // three full packets with the output blocked
    write_pkt(20, 1);
    write_pkt(20, 2);
    write_pkt(20, 3);
    repeat (2) @(negedge clk);
    check(!slot_avail && slots_free == 0, "no slot free after three packets");
    check(n_out == 0, "nothing leaves while the resynchronizer is full");
    // let out 21 symbols: only then does the first slot come back
    out_full = 0;
    repeat (20) @(negedge clk);
    out_full = 1;
    check(n_out == 20 && slots_free == 0, $sformatf("no slot back before the tail (%0d out)", n_out));
    out_full = 0;
    @(negedge clk);
    out_full = 1;
    @(negedge clk);
    check(n_out == 21 && slots_free == 1, $sformatf("slot back when the tail left (%0d free)", slots_free));
    // random draining and short packets
    fork
      begin
        for (int p = 0; p < 30; p++) begin
          wait (slot_avail);
          write_pkt($urandom_range(20, 1), 10 + p);
        end
      end
      begin
        for (int c = 0; c < 1500; c++) begin
          @(negedge clk);
          out_full = ($urandom_range(2) == 0);
        end
        out_full = 0;
      end
    join
    repeat (80) @(negedge clk);
    check(exp_q.size() == 0, "everything delivered");
    check(bad_order == 0, $sformatf("order kept (%0d wrong)", bad_order));
    check(bad_slot == 0, $sformatf("slot count tracked every cycle (%0d wrong)", bad_slot));
    check(wr_when_full == 0, "no write into a full resynchronizer");
    check(n_tails_out == 33 && slots_free == 3, $sformatf("all slots returned (%0d tails)", n_tails_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
