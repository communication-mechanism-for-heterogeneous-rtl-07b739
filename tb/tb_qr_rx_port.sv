// tb_qr_rx_port: self-checking test of the Rx Port.
//
// A show-ahead FIFO model in the testbench plays the Rx Resynchronizer; it is
// refilled at random and the client stalls at random. Checked every cycle:
//  * RxET shows the type of the symbol at the FIFO output (null when empty);
//  * in the cycle after a stall, RxT is the null code and RxS has not changed;
//  * every symbol written appears exactly once, in order, with its client
//    type, and only after a cycle without stall;
//  * nothing is popped from an empty FIFO or while stalled.
// A watchdog ends the run.
module tb_qr_rx_port;
  import qr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_empty, in_pop, rx_stall;
  ring_sym_t   in_sym;
  ctype_t      rx_t, rx_et;
  logic [31:0] rx_s;

  qr_rx_port dut (.clk, .rst_n, .in_empty, .in_sym, .in_pop, .rx_stall, .rx_t, .rx_s, .rx_et);

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

  ring_sym_t q[$], exp_q[$];
  assign in_empty = (q.size() == 0);
  assign in_sym   = in_empty ? RING_NULL : q[0];

  function automatic ctype_t ref_type(ring_sym_t r);
    if (r.typ == RT_HEAD) return r.frame ? CT_MC_HEAD : CT_DIR_HEAD;
    if (r.typ == RT_PAYLOAD) return r.frame ? CT_FRAME : CT_DATA;
    if (r.typ == RT_TAIL) return r.frame ? CT_FRAME_TAIL : CT_DATA_TAIL;
    return CT_NULL;
  endfunction

  int bad_et = 0, bad_stall = 0, bad_sym = 0, n_got = 0, n_stalls = 0, bad_pop = 0;

  initial begin
    logic        stall_prev, pop_pending;
    logic [31:0] s_prev;
    rx_stall = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    stall_prev = 1;
    s_prev = '0;
    pop_pending = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // the symbol popped at the edge just passed leaves the FIFO model
      if (pop_pending) void'(q.pop_front());
      // outputs of the edge just passed
      if (stall_prev) begin
        if (rx_t != CT_NULL || rx_s != s_prev) bad_stall++;
      end else if (rx_t != CT_NULL) begin
        if (exp_q.size() == 0 || rx_t != ref_type(exp_q[0]) || rx_s != exp_q[0].data) bad_sym++;
        if (exp_q.size() != 0) void'(exp_q.pop_front());
        n_got++;
      end
      s_prev = rx_s;
      // new inputs
      if ($urandom_range(2) == 0 && q.size() < 8) begin
        ring_sym_t r;
        r.typ = rtype_t'($urandom_range(2));
        r.frame = $urandom;
        r.data = $urandom;
        q.push_back(r);
        exp_q.push_back(r);
      end
      rx_stall = ($urandom_range(3) == 0);
      if (rx_stall) n_stalls++;
      #1;
      if (rx_et != (in_empty ? CT_NULL : ref_type(q[0]))) bad_et++;
      if (in_pop != (!rx_stall && !in_empty)) bad_pop++;
      pop_pending = in_pop;
      stall_prev = rx_stall;
    end
    check(bad_et == 0, $sformatf("early type (%0d wrong)", bad_et));
    check(bad_stall == 0, $sformatf("stall shows null and holds RxS (%0d wrong)", bad_stall));
    check(bad_sym == 0, $sformatf("symbols delivered in order with their type (%0d wrong)", bad_sym));
    check(bad_pop == 0, "pops only when not stalled and not empty");
    check(n_got > 500 && n_stalls > 300, $sformatf("enough traffic (%0d symbols, %0d stalls)", n_got, n_stalls));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
