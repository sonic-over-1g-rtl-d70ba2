// pma_rx: receive half of the 1000BASE-X transceiver (PMA sublayer).
//
// Deserializes the line bit stream from the PMD into 10-bit code groups
// for the RX ring. The bits arrive one per clock, already sampled on the
// clock recovered from the line (clock recovery itself is the analog part
// of the transceiver and is not modelled). A shift register and the newest bit
// form a ten-bit window, the oldest bit in bit 9, which is bit a of a code
// group.
//
// Word boundary: whenever the seven oldest bits of the window form a comma
// (0011111 or 1100000, found only in K28.1, K28.5 and K28.7), the window
// is a whole code group starting at bit a: it is delivered and the
// boundary is set there. Until the first comma nothing is delivered; after
// it, a code group is delivered every ten clocks. A comma on another
// boundary moves the boundary at once and raises realign for one clock.
//
// Deserializing into the RX ring is the design's; aligning on commas
// follows IEEE 802.3 Clause 36, and believing a single comma at once is
// this implementation's simplification.
//
// Interface: rx_serial in; out_valid/out_cg (one-clock strobe, written
// into the RX ring, which cannot stall the line), aligned, realign.
// Timing: a code group is delivered in the clock after its bit j arrived.
module pma_rx
  import sonic_pkg::*;
(
  input  logic clk,          // recovered bit clock
  input  logic rst_n,
  input  logic rx_serial,    // line bit from the PMD
  output logic out_valid,
  output cg_t  out_cg,
  output logic aligned,      // a comma has set the word boundary
  output logic realign       // the word boundary was (re)set this clock
);

  logic [8:0] shreg;         // the nine bits before the newest
  cg_t        window;
  logic [3:0] bitcnt;        // bits since the last delivered code group - 1
  logic       comma;

  assign window = {shreg, rx_serial};
  assign comma  = (window[9:3] == COMMA_P) || (window[9:3] == COMMA_N);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      bitcnt    <= '0;
      aligned   <= 1'b0;
      realign   <= 1'b0;
      out_valid <= 1'b0;
      out_cg    <= '0;
    end else begin
      shreg     <= window[8:0];
      out_valid <= 1'b0;
      realign   <= 1'b0;
      if (comma) begin
        out_valid <= 1'b1;
        out_cg    <= window;
        realign   <= !aligned || (bitcnt != 4'd9);
        aligned   <= 1'b1;
        bitcnt    <= '0;
      end else if (bitcnt == 4'd9) begin
        out_valid <= aligned;
        out_cg    <= window;
        bitcnt    <= '0;
      end else begin
        bitcnt <= bitcnt + 1'b1;
      end
    end
  end

endmodule
