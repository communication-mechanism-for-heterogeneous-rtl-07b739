// tb_acd_path: self-checking test of one direction of the Address Conversion
// Decoder as it sits between two controllers' client ports.
//
// Two instances are tested side by side, forward and reverse. Random streams
// of client symbols (multicast heads, directed heads, payloads, nulls) are
// applied; each must reappear one clock later with the same type and word,
// except that a multicast head's low 16 bits are replaced by the conversion
// table's output for its group field (computed here from the table rules),
// with the group field and all other bits kept and the converted flag
// raised. The stall output must be the inverse of TxOK in the same cycle.
// A watchdog ends the run.
module tb_acd_path;
  import qr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ctype_t      rx_t, f_tx_t, r_tx_t;
  logic [31:0] rx_s, f_tx_s, r_tx_s;
  logic        tx_ok, f_stall, r_stall, f_conv, r_conv;

  acd_path #(.FORWARD(1'b1)) u_f (.clk, .rst_n, .rx_t, .rx_s, .rx_stall(f_stall),
                                  .tx_t(f_tx_t), .tx_s(f_tx_s), .tx_ok, .converted(f_conv));
  acd_path #(.FORWARD(1'b0)) u_r (.clk, .rst_n, .rx_t, .rx_s, .rx_stall(r_stall),
                                  .tx_t(r_tx_t), .tx_s(r_tx_s), .tx_ok, .converted(r_conv));

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

  localparam logic [15:0] PAT [16] = '{
    16'h0000, 16'hAAAA, 16'h5554, 16'h9248, 16'h6DB6, 16'h4924, 16'h2492, 16'hDB6C,
    16'hB6DA, 16'h8420, 16'h4210, 16'h2108, 16'h1084, 16'h0842, 16'hE738, 16'hF7BC
  };

  function automatic logic [15:0] fwd_model(logic [7:0] g);
    logic [15:0] m = '0;
    if (g[3:0] == 0) return PAT[g[7:4]];
    for (int n = 1; n < 16; n++)
      if (g[3:0] <= g[7:4] ? (n >= g[3:0] && n <= g[7:4]) : (n >= g[3:0] || n <= g[7:4]))
        m[n] = 1'b1;
    return m;
  endfunction

  int bad_f = 0, bad_r = 0, n_mc = 0, bad_stall = 0;

  initial begin
    ctype_t t_prev;
    logic [31:0] s_prev;
    rx_t = CT_NULL; rx_s = '0; tx_ok = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    t_prev = CT_NULL; s_prev = '0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // check the previous cycle's symbol
      if (n > 0) begin
        logic [31:0] ef, er;
        ef = (t_prev == CT_MC_HEAD) ? {s_prev[31:16], fwd_model(s_prev[23:16])} : s_prev;
        er = (t_prev == CT_MC_HEAD) ? {s_prev[31:16], 8'h00, s_prev[23:19], 1'b0, s_prev[17:16]} : s_prev;
        if (f_tx_t != t_prev || f_tx_s != ef || f_conv != (t_prev == CT_MC_HEAD)) bad_f++;
        if (r_tx_t != t_prev || r_tx_s != er || r_conv != (t_prev == CT_MC_HEAD)) bad_r++;
        if (t_prev == CT_MC_HEAD) n_mc++;
      end
      rx_t  = ctype_t'($urandom_range(7));
      if (rx_t == CT_RESERVED) rx_t = CT_MC_HEAD;
      rx_s  = $urandom;
      tx_ok = ($urandom_range(3) != 0);
      #1;
      if (f_stall != !tx_ok || r_stall != !tx_ok) bad_stall++;
      t_prev = rx_t; s_prev = rx_s;
    end
    check(bad_f == 0, $sformatf("forward path output (%0d wrong)", bad_f));
    check(bad_r == 0, $sformatf("reverse path output (%0d wrong)", bad_r));
    check(n_mc > 100, "enough multicast heads converted");
    check(bad_stall == 0, "stall follows TxOK");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
