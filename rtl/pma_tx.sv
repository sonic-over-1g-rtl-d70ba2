// pma_tx: transmit half of the 1000BASE-X transceiver (PMA sublayer).
//
// Takes 10-bit code groups from the TX ring and serializes them onto the
// line towards the PMD (SFP+ module), bit a (cg[9]) first, one bit per
// clock, so clk is the 1.25 GBd bit clock and one code group leaves every
// ten clocks. The PMA does not look at the code groups; they were encoded
// by the PCS above.
//
// A code group must be ready at every tenth clock. If the ring is empty
// then, or transmission is not enabled, the transmitter sends the comma
// character K28.5 instead, alternating its two polarities so that the
// filler is itself DC balanced and gives the far receiver commas to align
// on. Each filler sent while enabled raises the underflow pulse for one
// clock, so the host side can see that it did not keep up.
//
// Serializing the code groups that the TX ring holds is the design's; the
// bit-per-clock soft serializer (in place of an FPGA's hard transceiver),
// the enable input and the K28.5 filler are this implementation's choices.
//
// Interface: in_valid/in_cg with in_ready (a one-clock pop strobe, given
// in the clock where the code group is taken, ring-style, not a
// handshake that in_valid waits on); tx_serial is the line bit.
module pma_tx
  import sonic_pkg::*;
(
  input  logic clk,          // serial bit clock
  input  logic rst_n,
  input  logic enable,       // 0: send only K28.5 filler
  input  logic in_valid,     // TX ring not empty
  input  cg_t  in_cg,        // code group at the head of the TX ring
  output logic in_ready,     // pop the TX ring
  output logic tx_serial,    // line bit towards the PMD
  output logic underflow     // filler sent while enabled
);

  cg_t        shreg;
  logic [3:0] bitcnt;        // bit of the current code group on the line
  logic       fill_rdp;      // polarity of the next filler (1 = RD+ form)
  logic       load, take;

  assign load      = (bitcnt == 4'd9);
  assign take      = load && enable && in_valid;
  assign in_ready  = take;
  assign tx_serial = shreg[9];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= K28_5_RDN;
      bitcnt    <= '0;
      fill_rdp  <= 1'b1;
      underflow <= 1'b0;
    end else begin
      underflow <= load && enable && !in_valid;
      if (load) begin
        bitcnt <= '0;
        if (take) begin
          shreg <= in_cg;
        end else begin
          shreg    <= fill_rdp ? ~K28_5_RDN : K28_5_RDN;
          fill_rdp <= !fill_rdp;
        end
      end else begin
        bitcnt <= bitcnt + 1'b1;
        shreg  <= {shreg[8:0], 1'b0};
      end
    end
  end

endmodule
