// tb_async_fifo: self-checking test of the dual-clock resynchronizer FIFO.
//
// The writer runs on a 14-unit clock and the reader on a 22-unit clock, both
// with random enables; every word read must be the next word written
// (scoreboard queue), and no word may be lost or repeated. A second phase
// stops the reader and checks that exactly DEPTH words are accepted before
// full rises, and that wcount counts them. Uses the default 32-deep
// configuration of the transmit resynchronizer. A watchdog ends the run.
module tb_async_fifo;
  localparam int DW = 35, DEPTH = 32;

  logic wclk = 0, rclk = 0, rst_n = 0;
  always #7  wclk = ~wclk;
  always #11 rclk = ~rclk;

  logic          wr_en, rd_en = 0, full, empty;
  logic [DW-1:0] wr_data = '0, rd_data;
  logic [$clog2(DEPTH):0] wcount;

  async_fifo #(.DW(DW), .DEPTH(DEPTH)) dut (
    .wclk, .wrst_n(rst_n), .wr_en, .wr_data, .full, .wcount,
    .rclk, .rrst_n(rst_n), .rd_en, .rd_data, .empty
  );

  int checks = 0, failures = 0;
  logic [DW-1:0] sb[$];
  int n_wr = 0, n_rd = 0, mism = 0;
  bit run_rd = 0, run_wr = 0;
  int wr_goal = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer: wr_en is only raised while full is low, as the client rule requires
  logic want = 0;
  int   issued = 0;
  bit   fill = 0;
  assign wr_en = want && !full;
  always @(posedge wclk) begin
    if (wr_en) begin
      sb.push_back(wr_data);
      n_wr++;
    end
    if (fill) begin
      want    <= (issued + (want && !full ? 1 : 0)) < DEPTH;
      issued  <= issued + (want && !full ? 1 : 0);
    end else begin
      want <= run_wr && (n_wr + (wr_en ? 1 : 0) < wr_goal) && ($urandom_range(3) != 0);
    end
    wr_data <= {$urandom, $urandom};
  end

  // reader
  always @(posedge rclk) begin
    if (rd_en && !empty) begin
      if (sb.size() == 0 || rd_data != sb[0]) mism++;
      if (sb.size() != 0) void'(sb.pop_front());
      n_rd++;
    end
    rd_en <= run_rd && ($urandom_range(2) != 0);
  end

  initial begin
    repeat (3) @(posedge wclk);
    repeat (3) @(posedge rclk);
    rst_n = 1;
    check(empty && !full && wcount == 0, "empty after reset");

    // streaming with random enables
    wr_goal = 2000;
    run_wr = 1; run_rd = 1;
    wait (n_wr >= 2000);
    run_wr = 0;
    wait (n_rd >= 2000);
    repeat (10) @(posedge rclk);
    run_rd = 0;
    check(mism == 0, $sformatf("stream order kept (%0d mismatches)", mism));
    check(n_rd == 2000 && sb.size() == 0, $sformatf("all words delivered (%0d read)", n_rd));
    check(empty, "empty after draining");

    // fill with the reader stopped
    repeat (5) @(posedge rclk);
    fill = 1;
    repeat (DEPTH + 10) @(posedge wclk);
    fill = 0;
    check(full, "full with the reader stopped");
    check(sb.size() == DEPTH, $sformatf("exactly DEPTH words accepted (%0d)", sb.size()));
    check(wcount == DEPTH, $sformatf("wcount = %0d", wcount));

    // drain and compare
    mism = 0;
    run_rd = 1;
    wait (sb.size() == 0);
    repeat (10) @(posedge rclk);
    check(mism == 0, "filled words read back in order");
    check(empty && !full, "empty again");
    repeat (6) @(posedge wclk);
    check(wcount == 0, "wcount back to 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
