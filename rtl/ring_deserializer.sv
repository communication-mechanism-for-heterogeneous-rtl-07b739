// ring_deserializer: upstream (Up) port of a QuickRing ring interface.
//
// Collects the seven 6-bit sub-symbols sent by the upstream node's
// ring_serializer and rebuilds the 42-bit ring symbol. Its phase counter is
// cleared by the same reset as the serializers', so a sub-symbol launched at
// serializer phase k is sampled here at phase k+1; the symbol is complete at
// phase 0 and is then held in sym_out for a whole ring period, where the ring
// clock domain samples it. A mismatch between the received and recomputed EDC
// sets edc_err for that symbol and turns sym_out into a null. The first
// phase-0 edge after reset has no complete symbol yet and yields a null. Timing: a symbol
// presented to the serializer appears on sym_out about one ring period later.
module ring_deserializer
  import qr_pkg::*;
(
  input  logic       ss_clk,
  input  logic       rst_n,
  input  logic [5:0] up_ss,
  output ring_sym_t  sym_out,
  output logic       edc_err
);
  logic [2:0]  phase;
  logic [35:0] got;    // sub-symbols 1..6
  logic        primed; // a whole symbol has been collected since reset

  wire [41:0] word = {got, up_ss};

  always_ff @(posedge ss_clk) begin
    if (!rst_n) begin
      phase   <= '0;
      got     <= '0;
      primed  <= 1'b0;
      sym_out <= RING_NULL;
      edc_err <= 1'b0;
    end else begin
      phase <= (phase == 3'd6) ? 3'd0 : phase + 3'd1;
      if (phase == 3'd6) primed <= 1'b1;
      if (phase == 3'd0) begin
        if (!primed) begin
          sym_out <= RING_NULL;
          edc_err <= 1'b0;
        end else if (edc7(ring_sym_t'(word[41:7])) == word[6:0]) begin
          sym_out <= ring_sym_t'(word[41:7]);
          edc_err <= 1'b0;
        end else begin
          sym_out <= RING_NULL;
          edc_err <= 1'b1;
        end
      end else begin
        got <= {got[29:0], up_ss};
      end
    end
  end
endmodule
