// tb_pcs_encoder: self-checking testbench of the 8B/10B encoder.
//
// Drives all 256 data octets, all twelve control characters, two invalid
// control characters and a long random stream, one character per clock.
// Each output code group is checked, without using the encoder's tables,
// against:
//   - a hand-written list of code groups from the Clause 36 code table, for
//     the running disparity the testbench itself tracks;
//   - the disparity rules: each 6-bit sub-block has 3 or 4 ones at RD- and
//     2 or 3 at RD+, each 4-bit sub-block 2 or 3 ones at RD- and 1 or 2 at
//     RD+, and the running disparity computed from the ones must match the
//     encoder's rd output;
//   - the run-length limit: never more than five equal bits in a row on
//     the line;
//   - no two different characters giving the same code group at the same
//     running disparity;
//   - one clock of latency and one character per clock;
//   - with INIT_RD = 1, a second instance starts at positive disparity.
module tb_pcs_encoder;
  import sonic_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      in_valid = 1'b0;
  pcs_char_t in_char = '0;
  logic      out_valid, out_kerr, rd;
  cg_t       out_cg;

  int checks = 0, failures = 0;

  pcs_encoder dut (.*);

  // a second encoder that starts at positive running disparity
  logic p_valid, p_kerr, p_rd;
  cg_t  p_cg;
  pcs_encoder #(.INIT_RD(1'b1)) dut_pos (
    .clk, .rst_n, .in_valid, .in_char,
    .out_valid(p_valid), .out_cg(p_cg), .out_kerr(p_kerr), .rd(p_rd)
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

  // Reference code groups (abcdei fghj) written out from the standard's
  // table. Returns 0 if the character is not in this list.
  function automatic logic known(input pcs_char_t c, input logic rdp, output cg_t cg);
    known = 1'b1;
    case ({c.k, c.d})
      {1'b0, 8'h00}: cg = rdp ? 10'b011000_1011 : 10'b100111_0100; // D0.0
      {1'b0, 8'h03}: cg = rdp ? 10'b110001_0100 : 10'b110001_1011; // D3.0
      {1'b0, 8'hB5}: cg = 10'b101010_1010;                         // D21.5
      {1'b0, 8'h4A}: cg = 10'b010101_0101;                         // D10.2
      {1'b0, 8'h50}: cg = rdp ? 10'b100100_0101 : 10'b011011_0101; // D16.2
      {1'b0, 8'hC5}: cg = 10'b101001_0110;                         // D5.6
      {1'b0, 8'hE7}: cg = rdp ? 10'b000111_0001 : 10'b111000_1110; // D7.7
      {1'b0, 8'hF1}: cg = rdp ? 10'b100011_0001 : 10'b100011_0111; // D17.7
      {1'b0, 8'hEB}: cg = rdp ? 10'b110100_1000 : 10'b110100_1110; // D11.7
      {1'b0, 8'hFF}: cg = rdp ? 10'b010100_1110 : 10'b101011_0001; // D31.7
      {1'b1, 8'h1C}: cg = rdp ? 10'b110000_1011 : 10'b001111_0100; // K28.0
      {1'b1, 8'h3C}: cg = rdp ? 10'b110000_0110 : 10'b001111_1001; // K28.1
      {1'b1, 8'hBC}: cg = rdp ? 10'b110000_0101 : 10'b001111_1010; // K28.5
      {1'b1, 8'hFC}: cg = rdp ? 10'b110000_0111 : 10'b001111_1000; // K28.7
      {1'b1, 8'hF7}: cg = rdp ? 10'b000101_0111 : 10'b111010_1000; // K23.7
      {1'b1, 8'hFB}: cg = rdp ? 10'b001001_0111 : 10'b110110_1000; // K27.7
      {1'b1, 8'hFD}: cg = rdp ? 10'b010001_0111 : 10'b101110_1000; // K29.7
      {1'b1, 8'hFE}: cg = rdp ? 10'b100001_0111 : 10'b011110_1000; // K30.7
      default: begin cg = '0; known = 1'b0; end
    endcase
  endfunction

  // stimulus and bookkeeping
  pcs_char_t sent_q[$];
  logic      exp_rd;          // running disparity tracked by the testbench
  int        run_len;
  logic      last_bit;
  int        n_known;
  // code group seen for each (rd, k, octet), to check uniqueness
  cg_t       seen_cg [2][512];
  logic      seen_v  [2][512];

  always_ff @(posedge clk) begin
    if (in_valid) sent_q.push_back(in_char);
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      pcs_char_t c;
      cg_t       ref_cg;
      int        o6, o4;
      logic      rd_mid, rd_end;
      c  = sent_q.pop_front();
      o6 = $countones(out_cg[9:4]);
      o4 = $countones(out_cg[3:0]);
      // sub-block disparity rules
      check(exp_rd ? (o6 == 2 || o6 == 3) : (o6 == 3 || o6 == 4),
            $sformatf("6b disparity k=%0b d=%02h cg=%b rd=%0b", c.k, c.d, out_cg, exp_rd));
      rd_mid = (o6 == 3) ? (out_cg[9:4] == 6'b000111 ? 1'b1 :
                            out_cg[9:4] == 6'b111000 ? 1'b0 : exp_rd) : (o6 > 3);
      check(rd_mid ? (o4 == 1 || o4 == 2) : (o4 == 2 || o4 == 3),
            $sformatf("4b disparity k=%0b d=%02h cg=%b", c.k, c.d, out_cg));
      rd_end = (o4 == 2) ? (out_cg[3:0] == 4'b0011 ? 1'b1 :
                            out_cg[3:0] == 4'b1100 ? 1'b0 : rd_mid) : (o4 > 2);
      // uniqueness at this running disparity
      if (seen_v[exp_rd][{c.k, c.d}])
        check(seen_cg[exp_rd][{c.k, c.d}] == out_cg, "same char, same rd, different code");
      for (int i = 0; i < 512; i++)
        if (seen_v[exp_rd][i] && i != int'({c.k, c.d}) && !out_kerr)
          if (seen_cg[exp_rd][i] == out_cg) check(1'b0, $sformatf("code %b shared", out_cg));
      if (!out_kerr) begin
        seen_v[exp_rd][{c.k, c.d}]  = 1'b1;
        seen_cg[exp_rd][{c.k, c.d}] = out_cg;
      end
      // reference table
      if (known(c, exp_rd, ref_cg)) begin
        n_known++;
        check(out_cg == ref_cg, $sformatf("k=%0b d=%02h rd=%0b got %b want %b",
                                          c.k, c.d, exp_rd, out_cg, ref_cg));
      end
      // invalid control characters
      check(out_kerr == (c.k && !(c.d[4:0] == 5'd28 ||
             (c.d[7:5] == 3'd7 && (c.d[4:0] == 23 || c.d[4:0] == 27 ||
                                   c.d[4:0] == 29 || c.d[4:0] == 30)))),
            $sformatf("kerr k=%0b d=%02h", c.k, c.d));
      // running disparity output
      if (!out_kerr) begin
        exp_rd = rd_end;
        check(rd == exp_rd, "rd output");
        // run length on the line, bit a first
        for (int b = 9; b >= 0; b--) begin
          if (out_cg[b] == last_bit) run_len++;
          else run_len = 1;
          last_bit = out_cg[b];
          check(run_len <= 5, $sformatf("run of %0d at k=%0b d=%02h", run_len, c.k, c.d));
        end
      end else begin
        exp_rd = rd;   // after an invalid K the stream is not checked
        run_len = 0;
      end
    end
  end

  // latency: out_valid follows in_valid by exactly one clock
  logic in_valid_q;
  always_ff @(posedge clk) begin
    in_valid_q <= in_valid;
    if (rst_n && in_valid_q !== out_valid) begin
      checks++; failures++;
      $display("FAIL latency");
    end
  end

  task automatic send(input logic k, input logic [7:0] d);
    in_valid  <= 1'b1;
    in_char.k <= k;
    in_char.d <= d;
    @(posedge clk);
  endtask

  localparam logic [7:0] KCODES [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC,
                                         8'hDC, 8'hFC, 8'hF7, 8'hFB, 8'hFD, 8'hFE};

  initial begin
    exp_rd   = 1'b0;
    run_len  = 0;
    last_bit = 1'b0;
    n_known  = 0;
    foreach (seen_v[r, i]) seen_v[r][i] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(rd == 1'b0, "running disparity starts negative");
    check(p_rd == 1'b1, "INIT_RD=1 starts positive");
    // first character D0.0: RD- form from dut, RD+ form from dut_pos
    send(1'b0, 8'h00);
    in_valid <= 1'b0;
    @(negedge clk);
    check(out_cg == 10'b100111_0100 && p_cg == 10'b011000_1011,
          $sformatf("first D0.0: %b / %b", out_cg, p_cg));
    check(p_rd == 1'b1, "D0.0 keeps RD+");
    @(posedge clk);
    // every octet and control character, twice, so both disparities occur
    for (int pass = 0; pass < 4; pass++) begin
      for (int i = 0; i < 256; i++) send(1'b0, 8'(i));
      for (int i = 0; i < 12; i++) send(1'b1, KCODES[i]);
      // D3.0 flips the running disparity, so the next pass starts from
      // the other disparity
      if (pass % 2 == 0) send(1'b0, 8'h03);
    end
    // random stream mixing data and control characters
    for (int i = 0; i < 4000; i++) begin
      automatic logic [31:0] r = $urandom;
      if (r[10:8] == 3'd0) send(1'b1, KCODES[r[7:0] % 12]);
      else send(1'b0, r[7:0]);
    end
    // invalid control characters
    send(1'b1, 8'h00);
    send(1'b1, 8'hF5);
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    check(sent_q.size() == 0, "every character produced a code group");
    for (int i = 0; i < 512; i++) begin
      if (!seen_v[0][i] || !seen_v[1][i]) begin
        if (i < 256 || (i - 256) inside {8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC,
                                         8'hDC, 8'hFC, 8'hF7, 8'hFB, 8'hFD, 8'hFE})
          check(1'b0, $sformatf("char %0d not seen at both disparities", i));
      end
    end
    check(n_known > 50, "reference entries were exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
