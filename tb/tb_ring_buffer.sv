// tb_ring_buffer: self-checking testbench of the ring buffer used as the TX
// and RX rings, at its default size (1024 code groups of 10 bits).
//
// A queue in the testbench models the ring. Each clock the testbench
// randomly writes and/or pops and compares rd_valid, rd_data, wr_ready,
// count and the overflow pulse with the model. The write probability is
// varied in phases so that the ring runs empty, fills completely, is
// written while full (the entry must be refused and overflow must pulse
// one clock later) and is popped and written in the same clock while full.
// A written entry must be visible on the read side in the next clock.
module tb_ring_buffer;

  localparam int unsigned WIDTH = 10;
  localparam int unsigned DEPTH = 1024;

  logic                   clk = 1'b0;
  logic                   rst_n = 1'b0;
  logic                   wr_valid = 1'b0;
  logic [WIDTH-1:0]       wr_data = '0;
  logic                   wr_ready, overflow, rd_valid;
  logic [WIDTH-1:0]       rd_data;
  logic                   rd_ready = 1'b0;
  logic [$clog2(DEPTH):0] count;

  int checks = 0, failures = 0;
  int n_full = 0, n_overflow = 0, n_empty_pop = 0, n_full_rw = 0;

  ring_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
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

  logic [WIDTH-1:0] model[$];
  logic             exp_ovf = 1'b0;
  int               wr_pct = 50, rd_pct = 50;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int cyc = 0; cyc < 40000; cyc++) begin
      // phases: balanced, fill, drain, full with simultaneous traffic
      case (cyc / 5000)
        0: begin wr_pct = 50; rd_pct = 50; end
        1: begin wr_pct = 90; rd_pct = 10; end
        2: begin wr_pct = 10; rd_pct = 90; end
        3: begin wr_pct = 95; rd_pct = 30; end
        4: begin wr_pct = 100; rd_pct = 100; end
        5: begin wr_pct = 0; rd_pct = 100; end
        default: begin wr_pct = 60; rd_pct = 50; end
      endcase
      wr_valid <= ($urandom_range(99) < wr_pct);
      wr_data  <= WIDTH'($urandom);
      rd_ready <= ($urandom_range(99) < rd_pct);
      @(negedge clk);
      // compare with the model before the clock edge
      check(rd_valid == (model.size() != 0), "rd_valid");
      if (model.size() != 0) check(rd_data == model[0], "rd_data");
      check(count == model.size(), $sformatf("count %0d want %0d", count, model.size()));
      check(overflow == exp_ovf, "overflow pulse");
      check(wr_ready == (model.size() < DEPTH || rd_ready), "wr_ready");
      if (model.size() == DEPTH) n_full++;
      if (rd_ready && model.size() == 0) n_empty_pop++;
      if (model.size() == DEPTH && rd_ready && wr_valid) n_full_rw++;
      // update the model as the clock edge will
      begin
        automatic logic can_wr = (model.size() < DEPTH) || rd_ready;
        automatic logic [WIDTH-1:0] wd = wr_data;
        exp_ovf = wr_valid && !can_wr;
        if (exp_ovf) n_overflow++;
        if (rd_ready && model.size() != 0) void'(model.pop_front());
        if (wr_valid && can_wr) model.push_back(wd);
      end
      @(posedge clk);
    end
    check(n_full > 0, "ring became full");
    check(n_overflow > 0, "write while full was refused");
    check(n_empty_pop > 0, "pop while empty was ignored");
    check(n_full_rw > 0, "read and write in one clock while full");
    $display("full=%0d overflow=%0d empty_pop=%0d full_rw=%0d",
             n_full, n_overflow, n_empty_pop, n_full_rw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
