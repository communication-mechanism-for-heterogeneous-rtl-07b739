// tb_qr_head_stripper: self-checking test of the Head Stripper.
//
// Directed heads must leave with their routing fields rotated: the old target
// in bits [27:24], HOP1..HOP4 each moved up one field, the old source in
// bits [7:4], and the hop count in [3:0] decremented; ACC and CONN kept.
// The expected word is built here nibble by nibble. Within a variable
// directed stream (ACC = 0) a head equal to the previous head is redundant
// and must be removed (stripped pulse, no output); a fixed-length directed
// head (ACC = 1) repeated, a multicast head and all payloads must pass
// unchanged. Output follows input by one clock. A watchdog ends the run.
module tb_qr_head_stripper;
  import qr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      in_valid = 0, out_valid, stripped;
  ring_sym_t in_sym = RING_NULL, out_sym;

  qr_head_stripper dut (.clk, .rst_n, .in_valid, .in_sym, .out_valid, .out_sym, .stripped);

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply one symbol, then check what comes out one clock later
  task automatic apply(ring_sym_t s, bit exp_pass, ring_sym_t exp_sym, string what);
    @(negedge clk);
    in_valid = 1;
    in_sym   = s;
    @(negedge clk);
    in_valid = 0;
    if (exp_pass)
      check(out_valid && !stripped && out_sym == exp_sym, $sformatf("%s: got %h", what, out_sym.data));
    else
      check(!out_valid && stripped, $sformatf("%s: removed", what));
  endtask

  function automatic ring_sym_t dhead(logic [31:0] d);
    return '{typ: RT_HEAD, frame: 1'b0, data: d};
  endfunction

  initial begin
    ring_sym_t p, m;
    logic [31:0] w, e;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // rotation: fields src=1 trgt=2 hop1..4=3..6 hcnt=5, ACC=1 CONN=2
    w = {2'b01, 2'b10, 4'h1, 4'h2, 4'h3, 4'h4, 4'h5, 4'h6, 4'h5};
    e = {2'b01, 2'b10, 4'h2, 4'h3, 4'h4, 4'h5, 4'h6, 4'h1, 4'h4};
    apply(dhead(w), 1, dhead(e), "directed head rotated");
    // repeated fixed-length head is kept
    apply(dhead(w), 1, dhead(e), "repeated fixed-length head kept");
    // random directed heads against a nibble-level model
    for (int n = 0; n < 50; n++) begin
      w = $urandom;
      w[31:30] = 2'b01;
      e = {w[31:28], w[23:20], w[19:16], w[15:12], w[11:8], w[7:4], w[27:24], w[3:0] - 4'd1};
      apply(dhead(w), 1, dhead(e), "random directed head");
    end
    // variable directed stream: first head kept, repeats removed, payloads pass
    w = {2'b00, 2'b00, 4'h7, 4'h3, 4'h0, 4'h0, 4'h0, 4'h0, 4'h1};
    e = {2'b00, 2'b00, 4'h3, 4'h0, 4'h0, 4'h0, 4'h0, 4'h7, 4'h0};
    apply(dhead(w), 1, dhead(e), "first head of a variable stream");
    p = '{typ: RT_PAYLOAD, frame: 1'b0, data: 32'h1111_2222};
    apply(p, 1, p, "payload passes");
    p.typ = RT_TAIL;
    apply(p, 1, p, "tail passes");
    apply(dhead(w), 0, dhead(e), "redundant head of the same stream");
    apply(dhead(w), 0, dhead(e), "second redundant head");
    // a different variable head starts a new stream
    w[27:24] = 4'h9;
    e = {w[31:28], w[23:20], w[19:16], w[15:12], w[11:8], w[7:4], w[27:24], w[3:0] - 4'd1};
    apply(dhead(w), 1, dhead(e), "new variable stream kept");
    // multicast heads are not touched, even when repeated
    m = '{typ: RT_HEAD, frame: 1'b1, data: 32'h0312_00F0};
    apply(m, 1, m, "multicast head unchanged");
    apply(m, 1, m, "repeated multicast head unchanged");
    // a variable head after a multicast head is not redundant
    apply(dhead(w), 1, dhead(e), "variable head after multicast kept");
    // symbols without in_valid produce nothing
    @(negedge clk);
    in_sym = dhead(32'h1234_5678);
    @(negedge clk);
    check(!out_valid && !stripped, "no output without in_valid");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
