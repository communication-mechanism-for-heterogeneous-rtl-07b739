// tb_ring_serdes: self-checking test of the ring serializer and deserializer
// (the Dn and Up ports of a QuickRing ring interface) connected back to back.
//
// The ring symbol clock is 1/7 of the sub-symbol clock, rising edges aligned,
// as on the ring. Random 35-bit symbols are sent, one per ring cycle. The
// test checks:
//  * the channel map: sub-symbol 1 carries the 2 type bits, the frame bit
//    and data[31:29]; sub-symbols 2..5 data[28:5] six bits at a time;
//    sub-symbol 6 data[4:0] and code bit 6; sub-symbol 7 code bits 5..0;
//  * every symbol arrives intact, with a constant latency of one ring cycle
//    after the ring cycle in which it was sent;
//  * a flipped bit on the wire is detected: the symbol arrives as a null and
//    edc_err is raised for that symbol only.
// A watchdog ends the run.
module tb_ring_serdes;
  import qr_pkg::*;

  logic ss_clk, rg_clk, rst_n = 0;
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

  ring_sym_t  sym_in, sym_out;
  logic [5:0] wire_ss, flip = '0;
  logic       edc_err;

  ring_serializer   u_ser (.ss_clk, .rst_n, .sym_in, .dn_ss(wire_ss));
  ring_deserializer u_des (.ss_clk, .rst_n, .up_ss(wire_ss ^ flip), .sym_out, .edc_err);

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

  // expected sub-symbols of a symbol, built from the field positions
  function automatic logic [5:0] exp_ss(ring_sym_t s, int k);
    logic [6:0] e = edc7(s);
    case (k)
      1: return {s.typ, s.frame, s.data[31:29]};
      2: return s.data[28:23];
      3: return s.data[22:17];
      4: return s.data[16:11];
      5: return s.data[10:5];
      6: return {s.data[4:0], e[6]};
      default: return e[5:0];
    endcase
  endfunction

  ring_sym_t sent[$];
  int map_bad = 0, data_bad = 0, n_ok = 0;

  initial begin
    sym_in = RING_NULL;
    repeat (3) @(posedge rg_clk);
    rst_n <= 1;
    @(posedge rg_clk);
    // the first symbol after reset is a null
    for (int n = 0; n < 300; n++) begin
      ring_sym_t s, got;
      s = ring_sym_t'({$urandom, $urandom});
      sym_in <= s;
      sent.push_back(s);
      // sub-symbols on the wire: one per sub-symbol clock; the previous
      // symbol is complete at the deserializer after the first of them
      for (int k = 1; k <= 7; k++) begin
        @(posedge ss_clk);
        @(negedge ss_clk);
        if (wire_ss !== exp_ss(s, k)) map_bad++;
        if (k == 1 && n > 0) begin
          got = sym_out;
          if (got != sent[n-1] || edc_err) data_bad++;
          else n_ok++;
        end
      end
    end
    check(map_bad == 0, $sformatf("channel map of every sub-symbol (%0d wrong)", map_bad));
    check(data_bad == 0 && n_ok == 299,
          $sformatf("symbols arrive intact one ring cycle later (%0d ok, %0d bad)", n_ok, data_bad));

    // single-bit errors on each of the 7 sub-symbols and 6 channels
    for (int k = 1; k <= 7; k++) begin
      for (int ch = 0; ch < 6; ch++) begin
        ring_sym_t s;
        s = ring_sym_t'({$urandom, $urandom});
        @(posedge rg_clk);
        sym_in <= s;
        for (int j = 1; j <= 7; j++) begin
          @(posedge ss_clk);
          @(negedge ss_clk);
          flip = (j == k) ? (6'd1 << ch) : 6'd0;
        end
        @(posedge ss_clk);
        @(negedge ss_clk);
        flip = 0;
        check(edc_err && ring_is_null(sym_out),
              $sformatf("error on sub-symbol %0d channel %0d detected", k, ch));
      end
    end
    // a clean symbol afterwards clears the error
    @(posedge rg_clk);
    sym_in <= ring_sym_t'(35'h1_2345_6789);
    repeat (8) @(posedge ss_clk);
    @(negedge ss_clk);
    check(!edc_err && sym_out == ring_sym_t'(35'h1_2345_6789), "clean symbol after an error");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
