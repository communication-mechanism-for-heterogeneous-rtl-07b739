// acd_path: one direction of the Address Conversion Decoder inside a bridge
// hop. It joins the client receive port of one QuickRing controller to the
// client transmit port of the other (both on the bridge's client clock).
//
// Every symbol the first controller delivers is passed on, one register stage
// later. A multicast head gets a new multicast field computed from its group
// field by the conversion table (forward or reverse, chosen by FORWARD); the
// group field and the rest of the head are kept, and the second controller
// fills in its own source ID. Directed heads and payloads pass unchanged.
// Flow control: while the second controller's TxOK is low the path stalls the
// first controller's Rx Port, so at most a couple of symbols are still
// written after TxOK falls, far inside the 20-symbol allowance. The table
// contents follow the design; the single register stage is this design's
// choice.
module acd_path
  import qr_pkg::*;
#(
  parameter bit FORWARD = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  // from the receiving controller's Rx Port
  input  ctype_t      rx_t,
  input  logic [31:0] rx_s,
  output logic        rx_stall,
  // to the sending controller's Tx Port
  output ctype_t      tx_t,
  output logic [31:0] tx_s,
  input  logic        tx_ok,
  output logic        converted      // pulse: a multicast head was rewritten
);
  logic [15:0] new_mcast;

  if (FORWARD) begin : g_fwd
    acd_forward_lut u_lut (.group_in(rx_s[23:16]), .mcast_out(new_mcast));
  end else begin : g_rev
    acd_reverse_lut u_lut (.group_in(rx_s[23:16]), .mcast_out(new_mcast));
  end

  assign rx_stall = !tx_ok;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_t      <= CT_NULL;
      tx_s      <= '0;
      converted <= 1'b0;
    end else begin
      tx_t      <= rx_t;
      tx_s      <= (rx_t == CT_MC_HEAD) ? {rx_s[31:16], new_mcast} : rx_s;
      converted <= (rx_t == CT_MC_HEAD);
    end
  end
endmodule
