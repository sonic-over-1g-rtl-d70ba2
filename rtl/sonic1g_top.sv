// sonic1g_top: 1GbE SoNIC datapath, a NIC whose physical layer is open to
// software.
//
// The 1000BASE-X physical layer is split at the PCS. The PMA, which only
// moves bits, is hardware; the PCS, which gives the bits their meaning, is
// reached by software through two rings of raw 10-bit code groups, so
// software sees and controls every code group on the wire, idles included.
//
//   transmit: PCS encoder -> [DMA] -> TX ring -> PMA transmitter -> tx_serial
//   receive : rx_serial -> PMA receiver -> RX ring -> [DMA] -> PCS decoder
//
// The DMA/PCI engine that moves code groups between the rings and host
// memory is not part of this RTL: its four connections are ports of this
// module (enc_out_* from the encoder, txr_wr_* into the TX ring, rxr_rd_*
// out of the RX ring, dec_in_* into the decoder), so a host model or a real
// DMA engine can be attached. tx_serial/rx_serial connect to the PMD (the
// SFP+ module); rx_serial is assumed already sampled on the recovered
// clock. The 8B/10B encoder and decoder are the PCS codec, given here as
// hardware with the same tables and behaviour as the software codec.
//
// Clocking: one clock, the line bit clock, for everything. The PMA moves
// one bit per clock (a code group per ten clocks); the codec and the ring
// host ports can take one code group per clock, i.e. ten times line rate.
module sonic1g_top
  import sonic_pkg::*;
#(
  parameter int unsigned TX_RING_DEPTH = 1024,
  parameter int unsigned RX_RING_DEPTH = 1024,
  parameter bit          ENC_INIT_RD   = 1'b0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // PCS encoder (software side of the transmit path)
  input  logic                          enc_in_valid,
  input  pcs_char_t                     enc_in_char,
  output logic                          enc_out_valid,
  output cg_t                           enc_out_cg,
  output logic                          enc_out_kerr,
  // TX ring, DMA write side
  input  logic                          txr_wr_valid,
  input  cg_t                           txr_wr_data,
  output logic                          txr_wr_ready,
  output logic [$clog2(TX_RING_DEPTH):0] txr_count,
  // PMA transmitter control and status
  input  logic                          tx_enable,
  output logic                          tx_underflow,
  // line (PMD side)
  output logic                          tx_serial,
  input  logic                          rx_serial,
  // PMA receiver status
  output logic                          rx_aligned,
  output logic                          rx_realign,
  // RX ring, DMA read side
  output logic                          rxr_rd_valid,
  output cg_t                           rxr_rd_data,
  input  logic                          rxr_rd_ready,
  output logic [$clog2(RX_RING_DEPTH):0] rxr_count,
  output logic                          rxr_overflow,
  // PCS decoder (software side of the receive path)
  input  logic                          dec_in_valid,
  input  cg_t                           dec_in_cg,
  output logic                          dec_out_valid,
  output pcs_char_t                     dec_out_char,
  output logic                          dec_out_err
);

  // transmit path
  logic tx_pop, tx_head_valid;
  cg_t  tx_head;
  logic txr_overflow_unused;
  logic enc_rd_unused;

  pcs_encoder #(.INIT_RD(ENC_INIT_RD)) u_encoder (
    .clk, .rst_n,
    .in_valid (enc_in_valid),
    .in_char  (enc_in_char),
    .out_valid(enc_out_valid),
    .out_cg   (enc_out_cg),
    .out_kerr (enc_out_kerr),
    .rd       (enc_rd_unused)
  );

  ring_buffer #(.WIDTH(10), .DEPTH(TX_RING_DEPTH)) u_tx_ring (
    .clk, .rst_n,
    .wr_valid(txr_wr_valid),
    .wr_data (txr_wr_data),
    .wr_ready(txr_wr_ready),
    .overflow(txr_overflow_unused),
    .rd_valid(tx_head_valid),
    .rd_data (tx_head),
    .rd_ready(tx_pop),
    .count   (txr_count)
  );

  pma_tx u_pma_tx (
    .clk, .rst_n,
    .enable   (tx_enable),
    .in_valid (tx_head_valid),
    .in_cg    (tx_head),
    .in_ready (tx_pop),
    .tx_serial(tx_serial),
    .underflow(tx_underflow)
  );

  // receive path
  logic rx_cg_valid;
  cg_t  rx_cg;
  logic rxr_wr_ready_unused;

  pma_rx u_pma_rx (
    .clk, .rst_n,
    .rx_serial(rx_serial),
    .out_valid(rx_cg_valid),
    .out_cg   (rx_cg),
    .aligned  (rx_aligned),
    .realign  (rx_realign)
  );

  ring_buffer #(.WIDTH(10), .DEPTH(RX_RING_DEPTH)) u_rx_ring (
    .clk, .rst_n,
    .wr_valid(rx_cg_valid),
    .wr_data (rx_cg),
    .wr_ready(rxr_wr_ready_unused),
    .overflow(rxr_overflow),
    .rd_valid(rxr_rd_valid),
    .rd_data (rxr_rd_data),
    .rd_ready(rxr_rd_ready),
    .count   (rxr_count)
  );

  pcs_decoder u_decoder (
    .clk, .rst_n,
    .in_valid (dec_in_valid),
    .in_cg    (dec_in_cg),
    .out_valid(dec_out_valid),
    .out_char (dec_out_char),
    .out_err  (dec_out_err)
  );

endmodule
