// tb_pma_rx: self-checking testbench of the PMA receiver.
//
// A legal 8B/10B stream is first produced with pcs_encoder: K28.5 commas,
// the D16.2 idle partner, and random data. It is then sent bit by bit
// (bit a first) after a prefix of zeros that puts the first code group
// off any ten-bit boundary. Halfway, four extra bits are slipped into the
// line, and a few code groups later another K28.5 follows.
//
// The testbench records the clock in which the last bit of every code
// group arrives. Every code group from the first comma on must come out of
// the receiver exactly one clock after its last bit, with the same value,
// except those between the slip and the next comma, where output is
// ignored. Output at any other time is an error. aligned must rise with the
// first comma, and realign must pulse for the first alignment and for the
// new boundary after the slip, and at no other time.
module tb_pma_rx;
  import sonic_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic rx_serial = 1'b0;
  logic out_valid, aligned, realign;
  cg_t  out_cg;

  logic      e_valid = 1'b0;
  pcs_char_t e_char = '0;
  logic      e_out_valid, e_kerr, e_rd;
  cg_t       e_cg;

  int checks = 0, failures = 0;
  int n_match = 0, n_realign = 0, n_must = 0;

  pma_rx dut (.*);

  pcs_encoder u_enc (
    .clk, .rst_n,
    .in_valid(e_valid), .in_char(e_char),
    .out_valid(e_out_valid), .out_cg(e_cg), .out_kerr(e_kerr), .rd(e_rd)
  );

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  localparam int NCG  = 400;
  localparam int SLIP = 200;     // slip before this code group
  localparam int RESYNC = 205;   // K28.5 here re-aligns the receiver

  cg_t stream [NCG];
  int  cyc = 0;
  int  exp_at [int];             // clock of last bit -> index in stream
  int  ignore_from = -1, ignore_to = -1;
  int  realign_at [$];           // clocks where realign must pulse

  always @(posedge clk) cyc <= cyc + 1;

  // monitor, just after each clock edge
  always @(negedge clk) begin
    if (rst_n) begin
      automatic int m = cyc - 1;  // clock edge that produced these outputs
      if (realign) begin
        n_realign++;
        check(realign_at.size() > 0 && realign_at[0] == m, $sformatf("realign at %0d", m));
        if (realign_at.size() > 0) void'(realign_at.pop_front());
      end
      if (out_valid) begin
        if (exp_at.exists(m)) begin
          check(out_cg == stream[exp_at[m]],
                $sformatf("cg %0d: %b want %b", exp_at[m], out_cg, stream[exp_at[m]]));
          n_match++;
        end else begin
          check(m >= ignore_from && m <= ignore_to, $sformatf("unexpected output at %0d", m));
        end
      end else if (exp_at.exists(m)) begin
        check(1'b0, $sformatf("code group %0d missing", exp_at[m]));
      end
      check(aligned == (n_realign > 0), "aligned");
    end
  end

  task automatic send_bit(input logic b);
    @(negedge clk);
    rx_serial = b;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // produce the stream with the encoder
    for (int i = 0; i < NCG + 1; i++) begin
      automatic logic [31:0] r = $urandom;
      @(negedge clk);
      e_valid = (i < NCG);
      if (i == 0 || i == RESYNC || i % 50 == 25) begin
        e_char = '{k: 1'b1, d: 8'hBC};                       // K28.5
      end else if (i == 1 || i == RESYNC + 1 || i % 50 == 26) begin
        e_char = '{k: 1'b0, d: 8'h50};                       // D16.2
      end else begin
        e_char = '{k: 1'b0, d: r[7:0]};
      end
      if (i > 0) stream[i - 1] = e_cg;
    end
    @(negedge clk);
    e_valid = 1'b0;
    // misaligning prefix
    repeat (13) send_bit(1'b0);
    for (int g = 0; g < NCG; g++) begin
      if (g == SLIP) begin
        ignore_from = cyc;
        ignore_to   = 32'h7fff_ffff;   // closed at the resync comma
        send_bit(1'b0); send_bit(1'b1); send_bit(1'b0); send_bit(1'b1);
      end
      for (int b = 9; b >= 0; b--) send_bit(stream[g][b]);
      // rx_serial set at this negedge is sampled at edge number cyc
      if (g < SLIP || g >= RESYNC) begin
        exp_at[cyc] = g;
        n_must++;
      end
      if (g == 0 || g == RESYNC) realign_at.push_back(cyc);
      if (g == RESYNC - 1) ignore_to = cyc + 10;
    end
    repeat (5) @(negedge clk);
    check(n_match == n_must, $sformatf("matched %0d of %0d", n_match, n_must));
    check(n_realign == 2, "two alignments");
    $display("matched=%0d realign=%0d ignore %0d..%0d", n_match, n_realign, ignore_from, ignore_to);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
