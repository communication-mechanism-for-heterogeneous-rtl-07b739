// ring_serializer: downstream (Dn) port of a QuickRing ring interface.
//
// Every ring-clock period one 42-bit ring symbol leaves the node as seven
// 6-bit sub-symbols on the six ring channels. The symbol is the 35-bit
// {type, frame, data} word followed by its 7-bit EDC; sent most significant
// slice first this gives the QuickRing channel map (channel 1 is bit 5 of a
// sub-symbol, channel 6 is bit 0). ss_clk runs at seven times the ring clock
// and both come from one source; a free-running phase counter, cleared by
// reset, loads a new symbol at phase 0, so the value of sym_in is sampled once
// per ring period. The 7:1 ratio and the channel map follow the QuickRing
// description; the EDC code is this design's own. The LVDS drivers are not
// modelled: dn_ss is a plain 6-bit bus.
module ring_serializer
  import qr_pkg::*;
(
  input  logic       ss_clk,
  input  logic       rst_n,
  input  ring_sym_t  sym_in,
  output logic [5:0] dn_ss
);
  logic [2:0]  phase;
  logic [35:0] rest;   // sub-symbols 2..7 still to send

  always_ff @(posedge ss_clk) begin
    if (!rst_n) begin
      phase <= '0;
      rest  <= '0;
      dn_ss <= '0;
    end else begin
      phase <= (phase == 3'd6) ? 3'd0 : phase + 3'd1;
      if (phase == 3'd0) begin
        {dn_ss, rest} <= {sym_in, edc7(sym_in)};
      end else begin
        dn_ss <= rest[35:30];
        rest  <= {rest[29:0], 6'd0};
      end
    end
  end
endmodule
