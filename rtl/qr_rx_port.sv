// qr_rx_port: Rx Port, the last stage of the QuickRing receive pipeline
// (client clock, RxCLK).
//
// Pops symbols from the Rx Resynchronizer and presents them to the client on
// RxT (3-bit type) and RxS (32-bit word), non-pipelined timing: type and word
// belong to the same cycle, one symbol per cycle. Each symbol is shown with
// its type for exactly one cycle. While the client holds RxSTALL high, RxT
// shows the null code and RxS keeps its last value; nothing is popped.
// RxET is the early type: the type of the symbol about to enter the port. The
// RxSTALL and RxET behaviour follow the QuickRing pin descriptions; pipelined
// timing (PIPE) and the tri-state RxS output enable are not modelled.
module qr_rx_port
  import qr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // from the Rx Resynchronizer (show-ahead)
  input  logic        in_empty,
  input  ring_sym_t   in_sym,
  output logic        in_pop,
  // client side
  input  logic        rx_stall,
  output ctype_t      rx_t,
  output logic [31:0] rx_s,
  output ctype_t      rx_et
);
  assign in_pop = !rx_stall && !in_empty;
  assign rx_et  = in_empty ? CT_NULL : ring_to_ctype(in_sym);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_t <= CT_NULL;
      rx_s <= '0;
    end else if (in_pop) begin
      rx_t <= ring_to_ctype(in_sym);
      rx_s <= in_sym.data;
    end else begin
      rx_t <= CT_NULL;
    end
  end
endmodule
