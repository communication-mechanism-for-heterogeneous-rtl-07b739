// tb_qr_pkg: self-checking test of the shared package: the ring error code,
// the client <-> ring type conversion, the null symbol and the head and
// message field layouts.
//
// The 7-bit error code is recomputed here bit by bit from its definition
// (bit i is the XOR of symbol bits i, i+7, i+14, ...) for random symbols, and
// every single-bit error in the 35-bit symbol must change it. Each client type
// code must survive a trip to the ring encoding and back; the null and
// reserved codes must not map onto heads or payloads. The struct layouts are
// checked against hand-placed bit positions. A watchdog ends the run.
module tb_qr_pkg;
  import qr_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [6:0] ref_edc(logic [34:0] v);
    logic [6:0] e;
    for (int i = 0; i < 7; i++)
      e[i] = v[i] ^ v[i+7] ^ v[i+14] ^ v[i+21] ^ v[i+28];
    return e;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ring_sym_t r, r2;
    client_sym_t c;
    mc_head_t m;
    dir_head_t d;
    msg_status_t st;
    logic [34:0] v;
    bit ok;

    // error code against the reference, and single-bit error detection
    for (int n = 0; n < 200; n++) begin
      v = {$urandom, $urandom};
      r = ring_sym_t'(v);
      check(edc7(r) == ref_edc(v), $sformatf("edc7 of %h", v));
      ok = 1;
      for (int b = 0; b < 35; b++) begin
        r2 = ring_sym_t'(v ^ (35'd1 << b));
        if (edc7(r2) == edc7(r)) ok = 0;
      end
      check(ok, "every single-bit error changes the code");
    end

    // client -> ring -> client type round trip
    for (int t = 0; t < 6; t++) begin
      c.t = ctype_t'(t);
      c.s = $urandom;
      r = client_to_ring(c);
      check(ring_to_ctype(r) == c.t, $sformatf("type %0d round trip", t));
      check(r.data == c.s, "data kept");
      check(!ring_is_null(r), "a real symbol is not a null");
    end
    r = client_to_ring('{t: CT_MC_HEAD, s: 32'h0});
    check(r.typ == RT_HEAD && r.frame, "multicast head: head type, frame bit set");
    r = client_to_ring('{t: CT_DIR_HEAD, s: 32'h0});
    check(r.typ == RT_HEAD && !r.frame, "directed head: head type, frame bit clear");
    r = client_to_ring('{t: CT_FRAME_TAIL, s: 32'h0});
    check(r.typ == RT_TAIL && r.frame, "frame tail: tail type, frame bit set");
    check(ring_is_null(RING_NULL), "RING_NULL is a null");
    check(ring_to_ctype(RING_NULL) == CT_NULL, "a null reaches the client as the null code");
    check(is_head(CT_DIR_HEAD) && is_head(CT_MC_HEAD) && !is_head(CT_DATA), "is_head");
    check(is_payload(CT_DATA) && is_payload(CT_FRAME_TAIL) && !is_payload(CT_NULL) &&
          !is_payload(CT_RESERVED), "is_payload");
    check(is_tail(CT_DATA_TAIL) && is_tail(CT_FRAME_TAIL) && !is_tail(CT_FRAME), "is_tail");
    check(CT_NULL == 3'd7 && CT_DIR_HEAD == 3'd0 && CT_MC_HEAD == 3'd1, "client type codes");

    // field layouts
    m = mc_head_t'(32'hD7A5_1234);
    check(m.acc == 2'b11 && m.conn == 2'b01 && m.src == 4'h7 && m.group == 8'hA5 &&
          m.mcast == 16'h1234, "multicast head fields");
    d = dir_head_t'(32'h4123_4567);
    check(d.acc == 2'b01 && d.conn == 2'b00 && d.src == 4'h1 && d.trgt == 4'h2 &&
          d.hop1 == 4'h3 && d.hop2 == 4'h4 && d.hop3 == 4'h5 && d.hop4 == 4'h6 &&
          d.hcnt == 4'h7, "directed head fields");
    st = msg_status_t'({3'd5, 5'd9, 3'd2, 17'h1ABCD, 4'd6});
    check(st.mtype == MSG_STATUS && st.tid == 5'd9 && st.status == 3'd2 &&
          st.pid == 17'h1ABCD && st.nab == 4'd6, "status message fields");
    check($bits(ring_sym_t) + 7 == 42, "ring symbol plus code is 42 bits");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
