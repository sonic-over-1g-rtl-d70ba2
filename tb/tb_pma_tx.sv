// tb_pma_tx: self-checking testbench of the PMA transmitter.
//
// A queue in the testbench plays the TX ring. The testbench keeps its own
// ten-clock code-group phase from reset, collects the ten line bits of
// every code group (bit a first) and compares them with what must be on
// the line: the ring's code groups in order while enabled and the ring has
// data, otherwise K28.5 of alternating polarity, starting with the
// negative-disparity form. It checks that the ring is popped only at a
// code-group boundary, once per code group (one code group per ten
// clocks), and that underflow pulses exactly for the fillers sent while
// enabled. Phases: disabled, enabled with a full ring, enabled with a
// ring that the producer cannot keep filled (underflow), disabled again.
module tb_pma_tx;
  import sonic_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enable = 1'b0;
  logic in_valid;
  cg_t  in_cg;
  logic in_ready, tx_serial, underflow;

  int checks = 0, failures = 0;
  int n_data = 0, n_fill = 0, n_underflow = 0;

  pma_tx dut (.*);

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

  cg_t  ring[$];
  assign in_valid = (ring.size() != 0);
  assign in_cg    = (ring.size() != 0) ? ring[0] : '0;

  int   phase;          // bit of the current code group on the line
  cg_t  cur, got;       // expected and received code group
  logic fill_pos;       // polarity of the next filler
  logic exp_under;
  logic pop = 1'b0;

  initial begin
    phase    = 0;
    cur      = 10'b001111_1010;
    fill_pos = 1'b1;
    exp_under = 1'b0;
    got      = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 12000; cyc++) begin
      // stimulus for this clock
      if (cyc == 500)  begin enable = 1'b1; for (int i = 0; i < 200; i++) ring.push_back(10'($urandom)); end
      if (cyc > 3000 && cyc < 9000 && $urandom_range(24) == 0) ring.push_back(10'($urandom));
      if (cyc == 10000) enable = 1'b0;
      #1;
      // the line bit of this clock
      got = {got[8:0], tx_serial};
      check(underflow == exp_under, $sformatf("underflow pulse at %0d", cyc));
      if (underflow) n_underflow++;
      exp_under = 1'b0;
      if (phase == 9) begin
        check(got == cur, $sformatf("code group %b want %b at %0d", got, cur, cyc));
        check(in_ready == (enable && ring.size() != 0), "pop at boundary");
        if (enable && ring.size() != 0) begin
          cur = ring[0];
          pop = 1'b1;
          n_data++;
        end else begin
          cur = fill_pos ? 10'b110000_0101 : 10'b001111_1010;
          fill_pos = !fill_pos;
          n_fill++;
          exp_under = enable;
        end
        phase = 0;
      end else begin
        check(!in_ready, "no pop inside a code group");
        phase++;
      end
      // the transmitter takes the head of the ring at the clock edge; the
      // ring advances just after it
      @(posedge clk);
      #1;
      if (pop) void'(ring.pop_front());
      pop = 1'b0;
      @(negedge clk);
    end
    check(n_data >= 400, "data code groups sent");
    check(n_underflow > 20, "underflow occurred");
    check(n_fill > 100, "fillers sent");
    $display("data=%0d fill=%0d underflow=%0d", n_data, n_fill, n_underflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
