// acd_reverse_lut: reverse-direction table of the Address Conversion Decoder
// (high-level PC ring -> CCN ring). Purely combinational.
//
// Each group-field bit stands for one CCN node: bit 0 the Master Controller,
// bit 1 the DSP Layer Controller. Bit 2 is the bridge itself, which must not
// receive traffic it has just brought from the PC ring, so it is forced to 0;
// bits 3..7 pass straight through for further CCN nodes. The upper 8 bits of
// the new multicast field are 0. Bits 0, 1 and the zero upper byte follow the
// design's reverse table; passing bits 3..7 is this design's choice.
module acd_reverse_lut (
  input  logic [7:0]  group_in,
  output logic [15:0] mcast_out
);
  assign mcast_out = {8'h00, group_in[7:3], 1'b0, group_in[1:0]};
endmodule
