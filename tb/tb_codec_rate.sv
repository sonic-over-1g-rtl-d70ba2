// tb_codec_rate: line-rate and round-trip workload for the 8B/10B codec.
//
// Streams 2^27 random characters (about one in eight a control character)
// through pcs_encoder and straight into pcs_decoder, one per clock with no
// gaps, and checks that every character comes back unchanged
// (decode(encode(x)) == x) and that the stream takes exactly N + 2 clocks:
// one character per clock through each block plus one clock of latency
// each. One character per clock means the codec meets the 1 Gb/s line
// rate (125 M octets/s) at any clock of 125 MHz or more. 2^27 octets is
// 1 Gb, the size of one encoder line-rate test; it is also more than the
// 107,374,183 code groups of one decoder line-rate test. The characters in
// flight are kept in a short history instead of a queue, since the codec
// latency is fixed at two clocks.
module tb_codec_rate;
  import sonic_pkg::*;

  localparam int N = 1 << 27;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      e_valid = 1'b0;
  pcs_char_t e_char = '0;
  logic      e_out_valid, e_kerr, e_rd;
  cg_t       e_cg;
  logic      d_valid, d_err;
  pcs_char_t d_char;

  int checks = 0, failures = 0;

  pcs_encoder u_enc (
    .clk, .rst_n, .in_valid(e_valid), .in_char(e_char),
    .out_valid(e_out_valid), .out_cg(e_cg), .out_kerr(e_kerr), .rd(e_rd)
  );

  pcs_decoder u_dec (
    .clk, .rst_n, .in_valid(e_out_valid), .in_cg(e_cg),
    .out_valid(d_valid), .out_char(d_char), .out_err(d_err)
  );

  always #5 clk = ~clk;

  initial begin
    #1_500_000_000;
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

  localparam logic [7:0] KCODES [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC,
                                         8'hDC, 8'hFC, 8'hF7, 8'hFB, 8'hFD, 8'hFE};

  pcs_char_t hist [2];           // characters sampled at the last two edges
  int        n_out = 0, n_flip = 0;
  longint    t_first = -1, t_last = 0, cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // characters as the encoder samples them
  always @(posedge clk) begin
    hist[1] <= hist[0];
    hist[0] <= e_char;
  end

  always @(negedge clk) begin
    if (e_out_valid && ($countones(e_cg) != 5)) n_flip++;
    if (d_valid) begin
      automatic pcs_char_t w = hist[1];
      checks++;
      if (d_err || d_char != w || e_kerr) begin
        failures++;
        if (failures < 20)
          $display("FAIL char %0d: k=%0b d=%02h want k=%0b d=%02h",
                   n_out, d_char.k, d_char.d, w.k, w.d);
      end
      n_out++;
      t_last = cyc;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    t_first = cyc;                 // the first character is sampled at edge cyc
    for (int i = 0; i < N; i++) begin
      automatic logic [31:0] r = $urandom;
      e_valid = 1'b1;
      if (r[10:8] == 3'd0) e_char = '{k: 1'b1, d: KCODES[r[7:0] % 12]};
      else                 e_char = '{k: 1'b0, d: r[7:0]};
      @(negedge clk);
    end
    e_valid = 1'b0;
    repeat (4) @(negedge clk);
    check(n_out == N, $sformatf("%0d of %0d characters came back", n_out, N));
    // first character in at edge t_first, last one out at edge
    // t_first + (N - 1) + 2
    check(t_last - t_first == longint'(N) + 1,
          $sformatf("stream took %0d clocks, want %0d", t_last - t_first + 1, N + 2));
    check(n_flip > N / 4, "running disparity alternated");
    $display("characters=%0d clocks=%0d disparity flips=%0d", n_out, t_last - t_first + 1, n_flip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
