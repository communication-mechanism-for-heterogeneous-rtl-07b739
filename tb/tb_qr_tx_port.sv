// tb_qr_tx_port: self-checking test of the Tx Port.
//
// A 32-entry FIFO model in the testbench plays the Tx Resynchronizer (write
// side: full flag and fill count). Part 1 applies a hand-made symbol sequence
// and compares what reaches the FIFO with the expected filtered sequence:
// nulls, reserved codes, payloads before the first head and a head repeated
// with nothing in between are removed; everything else passes in order,
// after the 4-stage pipeline. Part 2 stops the reader: TxOK must fall after
// exactly 36 - 20 = 16 symbols have been written (pipeline plus FIFO minus
// the 20-symbol allowance), and the 20 further symbols a client may still
// write after TxOK falls must all be delivered once the reader resumes.
// A watchdog ends the run.
module tb_qr_tx_port;
  import qr_pkg::*;

  localparam int DEPTH = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ctype_t      tx_t = CT_NULL;
  logic [31:0] tx_s = '0;
  logic        tx_ok, fifo_wr, fifo_full;
  client_sym_t fifo_data;
  logic [5:0]  fifo_count;

  qr_tx_port dut (.clk, .rst_n, .tx_t, .tx_s, .tx_ok, .fifo_wr, .fifo_data, .fifo_full, .fifo_count);

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

  // FIFO model: decisions at the falling edge, effect just after the rising edge
  client_sym_t fq[$], got[$];
  bit drain = 1;
  assign fifo_full  = (fq.size() == DEPTH);
  assign fifo_count = 6'(fq.size());
  initial forever begin
    bit w, r;
    client_sym_t d;
    @(negedge clk);
    w = fifo_wr; d = fifo_data;
    r = drain && fq.size() != 0;
    @(posedge clk);
    #1;
    if (r) got.push_back(fq.pop_front());
    if (w) fq.push_back(d);
  end

  task automatic put(ctype_t t, logic [31:0] s);
    @(negedge clk);
    tx_t = t;
    tx_s = s;
  endtask

  client_sym_t exp_q[$];

  initial begin
    int n_before, n_after;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // ---- part 1: filtering ----
    put(CT_NULL, 0);
    put(CT_DATA, 32'hBAD0);                     // before any head: removed
    put(CT_RESERVED, 32'hBAD1);                 // reserved: removed
    put(CT_MC_HEAD, 32'hC011_0006);   exp_q.push_back('{CT_MC_HEAD, 32'hC011_0006});
    put(CT_MC_HEAD, 32'hC011_0006);             // repeated head: removed
    put(CT_NULL, 0);
    for (int i = 0; i < 5; i++) begin
      put(CT_DATA, 32'h100 + i);      exp_q.push_back('{CT_DATA, 32'h100 + i});
    end
    put(CT_NULL, 0);
    put(CT_DATA_TAIL, 32'h1FF);       exp_q.push_back('{CT_DATA_TAIL, 32'h1FF});
    put(CT_MC_HEAD, 32'hC011_0006);   exp_q.push_back('{CT_MC_HEAD, 32'hC011_0006});  // after payloads: kept
    put(CT_DIR_HEAD, 32'h0012_0001);  exp_q.push_back('{CT_DIR_HEAD, 32'h0012_0001});
    put(CT_DIR_HEAD, 32'h0012_0001);            // repeated: removed
    put(CT_DIR_HEAD, 32'h0013_0001);  exp_q.push_back('{CT_DIR_HEAD, 32'h0013_0001});  // different: kept
    put(CT_FRAME, 32'h200);           exp_q.push_back('{CT_FRAME, 32'h200});
    put(CT_FRAME_TAIL, 32'h201);      exp_q.push_back('{CT_FRAME_TAIL, 32'h201});
    put(CT_NULL, 0);
    repeat (20) @(negedge clk);
    check(got.size() == exp_q.size(), $sformatf("%0d of %0d symbols delivered", got.size(), exp_q.size()));
    check(got == exp_q, "filtered sequence and order");

    // latency: a symbol reaches the FIFO after the pipeline stages
    got.delete();
    put(CT_DATA, 32'h300);
    put(CT_NULL, 0);
    begin
      int lat = 0;
      while (got.size() == 0 && lat < 20) begin
        @(negedge clk);
        lat++;
      end
      check(lat == 5, $sformatf("pipeline latency %0d cycles (4 stages + write)", lat));
    end

    // ---- part 2: TxOK with the reader stopped ----
    got.delete();
    drain = 0;
    repeat (5) @(negedge clk);
    n_before = 0;
    // the client looks at TxOK at each falling edge before it writes
    forever begin
      @(negedge clk);
      if (!tx_ok || n_before >= 100) break;
      tx_t = CT_DATA;
      tx_s = 32'h4000 + n_before;
      n_before++;
    end
    tx_t = CT_NULL;
    check(n_before == 16, $sformatf("TxOK fell after %0d symbols", n_before));
    n_after = 0;
    for (int i = 0; i < 20; i++) begin
      if (i != 0) @(negedge clk);
      tx_t = CT_DATA;
      tx_s = 32'h4000 + n_before + i;
      n_after++;
    end
    put(CT_NULL, 0);
    repeat (10) @(negedge clk);
    check(!tx_ok, "TxOK stays low while the buffer is full");
    check(fq.size() == DEPTH, $sformatf("resynchronizer full (%0d)", fq.size()));
    drain = 1;
    repeat (60) @(negedge clk);
    check(got.size() == n_before + n_after, $sformatf("no symbol lost (%0d delivered)", got.size()));
    begin
      bit inorder = 1;
      foreach (got[i]) if (got[i].s != 32'h4000 + i) inorder = 0;
      check(inorder, "burst delivered in order");
    end
    check(tx_ok, "TxOK high again after draining");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
