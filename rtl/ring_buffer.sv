// ring_buffer: circular buffer of code groups between the PMA and the DMA
// engine. The design uses two: the TX ring (DMA writes, PMA transmitter
// reads) and the RX ring (PMA receiver writes, DMA reads).
//
// DEPTH entries of WIDTH bits are held in an array addressed by a write
// pointer (head) and a read pointer (tail) that wrap around; an occupancy
// counter tells full from empty. The read side is first-word-fall-through:
// rd_data shows the oldest entry whenever rd_valid is high, and rd_ready
// pops it. A write while the ring is full is refused (wr_ready low) and
// reported on the overflow pulse, so a producer that cannot wait, like the
// PMA receiver, loses that entry and the loss is visible. A pop while empty
// is ignored. Reading and writing in the same cycle are both allowed, also
// when full (the pop makes room) or empty (the write is not yet visible).
//
// The design calls only for rings that the PMA fills and drains and the
// DMA engine serves; the depth, the one-code-group entry, first-word
// fall-through reads and the refuse-and-report policy when full are this
// implementation's choices.
//
// Timing: one write and one read per clock; a written entry is visible on
// the read side the clock after it is written. Single clock domain.
module ring_buffer #(
  parameter int unsigned WIDTH = 10,    // one code group per entry
  parameter int unsigned DEPTH = 1024   // entries; a power of two
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // write side (producer)
  input  logic                     wr_valid,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     wr_ready,
  output logic                     overflow,
  // read side (consumer)
  output logic                     rd_valid,
  output logic [WIDTH-1:0]         rd_data,
  input  logic                     rd_ready,
  // status
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    head, tail;
  logic             do_wr, do_rd;

  assign wr_ready = (count != DEPTH[AW:0]) || (rd_ready && rd_valid);
  assign rd_valid = (count != '0);
  assign rd_data  = mem[tail];
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_ready && rd_valid;

  always_ff @(posedge clk) begin
    if (do_wr) mem[head] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head     <= '0;
      tail     <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_valid && !wr_ready;
      if (do_wr) head <= head + 1'b1;
      if (do_rd) tail <= tail + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // The ring must never report more entries than it has.
  assert property (@(posedge clk) disable iff (!rst_n) count <= DEPTH[AW:0]);

endmodule
