// tb_acd_lut: self-checking test of both Address Conversion Decoder tables.
//
// Forward table (CCN -> PC ring): the 21 example rows of the design's
// conversion table are checked literally (16 pattern codes with a zero low
// nibble, 5 range codes). Then every one of the 256 group codes is checked
// against an independent model: a zero low nibble must give one of the 16
// patterns, a non-zero one the set of nodes from the low nibble to the high
// nibble, counting upwards and wrapping from 15 past the bridge's node 0 to 1
// (an end nibble of 0 thus ends the range at node 15). Bit 0 must always be 0.
// Reverse table (PC ring -> CCN): the 4 example rows, then all 256 codes
// against the rule "bit k of the group is CCN node k, except the bridge's own
// node 2; the upper byte is 0". Both tables are combinational; each code is
// applied and the output is read after a small delay. A watchdog ends the run.
module tb_acd_lut;
  logic [7:0]  g;
  logic [15:0] fwd, rev;

  acd_forward_lut u_fwd (.group_in(g), .mcast_out(fwd));
  acd_reverse_lut u_rev (.group_in(g), .mcast_out(rev));

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

  // example rows of the forward table: {group, new multicast field}
  localparam logic [23:0] FWD_ROWS [21] = '{
    {8'b00000000, 16'b0000000000000000}, {8'b00010000, 16'b1010101010101010},
    {8'b00100000, 16'b0101010101010100}, {8'b00110000, 16'b1001001001001000},
    {8'b01000000, 16'b0110110110110110}, {8'b01010000, 16'b0100100100100100},
    {8'b01100000, 16'b0010010010010010}, {8'b01110000, 16'b1101101101101100},
    {8'b10000000, 16'b1011011011011010}, {8'b10010000, 16'b1000010000100000},
    {8'b10100000, 16'b0100001000010000}, {8'b10110000, 16'b0010000100001000},
    {8'b11000000, 16'b0001000010000100}, {8'b11010000, 16'b0000100001000010},
    {8'b11100000, 16'b1110011100111000}, {8'b11110000, 16'b1111011110111100},
    {8'b00010001, 16'b0000000000000010}, {8'b11110001, 16'b1111111111111110},
    {8'b11100010, 16'b0111111111111100}, {8'b00011111, 16'b1000000000000010},
    {8'b00110111, 16'b1111111110001110}
  };
  localparam logic [23:0] REV_ROWS [4] = '{
    {8'b00000000, 16'b0000000000000000}, {8'b00000001, 16'b0000000000000001},
    {8'b00000010, 16'b0000000000000010}, {8'b00000011, 16'b0000000000000011}
  };

  // independent range model: walk from the start node upwards modulo 16 until
  // the end node; node 0 is the bridge and is then removed
  function automatic logic [15:0] range_set(int lo, int hi);
    logic [15:0] m = '0;
    int n = lo;
    for (int step = 0; step < 16; step++) begin
      m[n] = 1'b1;
      if (n == hi) break;
      n = (n + 1) % 16;
    end
    m[0] = 1'b0;
    return m;
  endfunction

  initial begin
    for (int r = 0; r < 21; r++) begin
      g = FWD_ROWS[r][23:16];
      #1;
      check(fwd == FWD_ROWS[r][15:0], $sformatf("forward row %0d: %b -> %b", r + 1, g, fwd));
    end
    for (int r = 0; r < 4; r++) begin
      g = REV_ROWS[r][23:16];
      #1;
      check(rev == REV_ROWS[r][15:0], $sformatf("reverse row %0d: %b -> %b", r + 1, g, rev));
    end
    for (int c = 0; c < 256; c++) begin
      g = 8'(c);
      #1;
      check(fwd[0] == 1'b0, $sformatf("forward %02h: bit 0 is 0", c));
      if (c[3:0] == 0)
        check(fwd == FWD_ROWS[c >> 4][15:0], $sformatf("forward %02h: pattern", c));
      else
        check(fwd == range_set(c & 15, c >> 4), $sformatf("forward %02h: range -> %b", c, fwd));
      check(rev == {8'h00, g[7:3], 1'b0, g[1:0]}, $sformatf("reverse %02h", c));
      check(rev[2] == 1'b0 && rev[15:8] == 8'h00, $sformatf("reverse %02h: bridge and upper byte clear", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
