// tb_pcs_decoder: self-checking testbench of the 8B/10B decoder.
//
// Three parts, one code group per clock, each result checked one clock
// after its input:
//   1. code groups written out from the Clause 36 code table, in both
//      running-disparity columns, must give their character;
//   2. a random character stream is encoded by pcs_encoder and decoded
//      again: decode(encode(x)) must equal x, as in the round-trip test of
//      the software codec;
//   3. all 1024 ten-bit patterns: a pattern whose 6-bit half has fewer than
//      two or more than four ones, or is 111100 / 000011 (never used), or
//      whose 4-bit half has no or four ones, must be flagged as an error.
module tb_pcs_decoder;
  import sonic_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      in_valid = 1'b0;
  cg_t       in_cg = '0;
  logic      out_valid, out_err;
  pcs_char_t out_char;

  // encoder used to produce the round-trip stream
  logic      e_valid = 1'b0;
  pcs_char_t e_char = '0;
  logic      e_out_valid, e_kerr, e_rd;
  cg_t       e_cg;

  int checks = 0, failures = 0;

  pcs_decoder dut (.*);

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

  // expected result queue: {check_char, expected char, check_err, expected err}
  typedef struct {
    logic      chk_char;
    pcs_char_t ch;
    logic      chk_err;
    logic      err;
  } exp_t;
  exp_t exp_q[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      check(exp_q.size() > 0, "unexpected output");
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front();
        if (e.chk_char)
          check(out_char == e.ch && !out_err,
                $sformatf("got k=%0b d=%02h err=%0b want k=%0b d=%02h",
                          out_char.k, out_char.d, out_err, e.ch.k, e.ch.d));
        if (e.chk_err)
          check(out_err == e.err, $sformatf("err=%0b want %0b", out_err, e.err));
      end
    end
  end

  logic in_valid_q;
  always_ff @(posedge clk) begin
    in_valid_q <= in_valid;
    if (rst_n && in_valid_q !== out_valid) begin
      checks++; failures++;
      $display("FAIL latency");
    end
  end

  task automatic put(input cg_t cg, input exp_t e);
    in_valid <= 1'b1;
    in_cg    <= cg;
    exp_q.push_back(e);
    @(posedge clk);
  endtask

  task automatic put_known(input cg_t cg, input logic k, input logic [7:0] d);
    exp_t e;
    e.chk_char = 1'b1; e.ch.k = k; e.ch.d = d; e.chk_err = 1'b0; e.err = 1'b0;
    put(cg, e);
  endtask

  localparam logic [7:0] KCODES [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC,
                                         8'hDC, 8'hFC, 8'hF7, 8'hFB, 8'hFD, 8'hFE};

  pcs_char_t rt_q[$];

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // 1. reference code groups, both columns
    put_known(10'b100111_0100, 1'b0, 8'h00); put_known(10'b011000_1011, 1'b0, 8'h00);
    put_known(10'b110001_1011, 1'b0, 8'h03); put_known(10'b110001_0100, 1'b0, 8'h03);
    put_known(10'b101010_1010, 1'b0, 8'hB5);
    put_known(10'b011011_0101, 1'b0, 8'h50); put_known(10'b100100_0101, 1'b0, 8'h50);
    put_known(10'b111000_1110, 1'b0, 8'hE7); put_known(10'b000111_0001, 1'b0, 8'hE7);
    put_known(10'b100011_0111, 1'b0, 8'hF1); put_known(10'b100011_0001, 1'b0, 8'hF1);
    put_known(10'b110100_1000, 1'b0, 8'hEB); put_known(10'b110100_1110, 1'b0, 8'hEB);
    put_known(10'b001111_0100, 1'b1, 8'h1C); put_known(10'b110000_1011, 1'b1, 8'h1C);
    put_known(10'b001111_1001, 1'b1, 8'h3C); put_known(10'b110000_0110, 1'b1, 8'h3C);
    put_known(10'b001111_1010, 1'b1, 8'hBC); put_known(10'b110000_0101, 1'b1, 8'hBC);
    put_known(10'b001111_1000, 1'b1, 8'hFC); put_known(10'b110000_0111, 1'b1, 8'hFC);
    put_known(10'b111010_1000, 1'b1, 8'hF7); put_known(10'b000101_0111, 1'b1, 8'hF7);
    put_known(10'b110110_1000, 1'b1, 8'hFB); put_known(10'b001001_0111, 1'b1, 8'hFB);
    put_known(10'b101110_1000, 1'b1, 8'hFD); put_known(10'b010001_0111, 1'b1, 8'hFD);
    put_known(10'b011110_1000, 1'b1, 8'hFE); put_known(10'b100001_0111, 1'b1, 8'hFE);
    put_known(10'b101001_0110, 1'b0, 8'hC5);
    put_known(10'b111010_0001, 1'b0, 8'hF7); // D23.7 (RD-), not K23.7
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);

    // 2. round trip through the encoder
    fork
      begin
        for (int i = 0; i < 3000; i++) begin
          automatic logic [31:0] r = $urandom;
          e_valid <= 1'b1;
          if (r[10:8] == 3'd0) begin
            e_char.k <= 1'b1; e_char.d <= KCODES[r[7:0] % 12];
            rt_q.push_back({1'b1, KCODES[r[7:0] % 12]});
          end else begin
            e_char.k <= 1'b0; e_char.d <= r[7:0];
            rt_q.push_back({1'b0, r[7:0]});
          end
          @(posedge clk);
        end
        e_valid <= 1'b0;
      end
      begin
        int got = 0;
        while (got < 3000) begin
          @(negedge clk);
          in_valid <= e_out_valid;
          in_cg    <= e_cg;
          if (e_out_valid) begin
            exp_t e;
            e.chk_char = 1'b1; e.ch = rt_q.pop_front(); e.chk_err = 1'b0; e.err = 1'b0;
            exp_q.push_back(e);
            got++;
          end
        end
        @(negedge clk);
        in_valid <= 1'b0;
      end
    join
    repeat (3) @(posedge clk);

    // 3. every ten-bit pattern: error detection
    for (int p = 0; p < 1024; p++) begin
      automatic cg_t cg = 10'(p);
      automatic int o6 = $countones(cg[9:4]);
      automatic int o4 = $countones(cg[3:0]);
      automatic logic bad = (o6 < 2) || (o6 > 4) || (cg[9:4] == 6'b111100) ||
                            (cg[9:4] == 6'b000011) || (o4 == 0) || (o4 == 4);
      exp_t e;
      e.chk_char = 1'b0; e.ch = '0; e.chk_err = bad; e.err = 1'b1;
      put(cg, e);
    end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    check(exp_q.size() == 0, "every code group was decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
