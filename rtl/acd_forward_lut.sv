// acd_forward_lut: forward-direction table of the Address Conversion Decoder
// (CCN ring -> high-level PC ring). Purely combinational.
//
// The 8-bit group field of a multicast head is split into two nibbles.
//  * Low nibble 0: the high nibble selects one of 16 predefined destination
//    sets (pattern mode). The sets spread the data evenly over the PCs.
//  * Low nibble L != 0: range mode. L is the first PC and the high nibble H the
//    last; bits L..H of the new multicast field are set, wrapping past node 15
//    back to node 1 when H < L (so L=7, H=3 selects nodes 7..15 and 1..3;
//    H=0 ends the range at node 15).
// Bit 0 is always 0: node 0 of the PC ring is the bridge itself.
// The 16 pattern values and the range rule are those of the design's forward
// conversion table; the circuit form (a 16-entry constant table plus
// comparators instead of a 256-entry programmable array) is this design's.
module acd_forward_lut (
  input  logic [7:0]  group_in,
  output logic [15:0] mcast_out
);
  localparam logic [15:0] PATTERN [16] = '{
    16'b0000000000000000, 16'b1010101010101010, 16'b0101010101010100, 16'b1001001001001000,
    16'b0110110110110110, 16'b0100100100100100, 16'b0010010010010010, 16'b1101101101101100,
    16'b1011011011011010, 16'b1000010000100000, 16'b0100001000010000, 16'b0010000100001000,
    16'b0001000010000100, 16'b0000100001000010, 16'b1110011100111000, 16'b1111011110111100
  };

  wire [3:0] lo = group_in[3:0];
  wire [3:0] hi = group_in[7:4];

  always_comb begin
    mcast_out = '0;
    if (lo == 4'd0) begin
      mcast_out = PATTERN[hi];
    end else begin
      for (int i = 1; i < 16; i++) begin
        if (lo <= hi) mcast_out[i] = (4'(i) >= lo) && (4'(i) <= hi);
        else          mcast_out[i] = (4'(i) >= lo) || (4'(i) <= hi);
      end
    end
    mcast_out[0] = 1'b0;
  end
endmodule
