// tb_sonic1g_top: end-to-end testbench of the 1GbE SoNIC datapath at its
// default sizes (1024-entry TX and RX rings).
//
// The testbench plays the parts outside the RTL: the host software that
// feeds characters to the PCS encoder and reads the PCS decoder, the DMA
// engine that moves code groups from the encoder into the TX ring and from
// the RX ring into the decoder, and a fibre loopback from tx_serial to
// rx_serial with a few clocks of delay into which one extra bit can be
// slipped. Phases:
//   A. transmitter disabled: K28.5 filler only; the receiver aligns.
//   B. a burst of Ethernet-like frames (/S/ data /T/ /R/ and /I/ idles)
//      longer than the TX ring, so the ring fills and the DMA must wait;
//      an invalid control character is also given to the encoder, which
//      must flag it (the DMA model drops it). After the burst the ring runs
//      empty and the transmitter sends filler (underflow).
//   C. the host stops reading the RX ring long enough for it to overflow.
//   D. one bit is slipped on the line; the receiver must realign on the
//      next comma (the decoder meanwhile flags the broken code groups),
//      then a second burst must again arrive intact.
// Each burst must leave the RX ring exactly as written into the TX ring,
// with only K28.5 filler around it, one code group every ten clocks, and
// must decode back to the characters sent. The testbench counts each
// mechanism (filler, underflow, TX ring full, RX ring overflow, alignment,
// realignment, decoder error, invalid K, running-disparity flips, the
// alternate D.x.A7 code, control characters) and fails any that never
// happened.
module tb_sonic1g_top;
  import sonic_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      enc_in_valid = 1'b0;
  pcs_char_t enc_in_char = '0;
  logic      enc_out_valid, enc_out_kerr;
  cg_t       enc_out_cg;
  logic      txr_wr_valid = 1'b0;
  cg_t       txr_wr_data = '0;
  logic      txr_wr_ready;
  logic [10:0] txr_count;
  logic      tx_enable = 1'b0;
  logic      tx_underflow, tx_serial;
  logic      rx_serial = 1'b0;
  logic      rx_aligned, rx_realign;
  logic      rxr_rd_valid;
  cg_t       rxr_rd_data;
  logic      rxr_rd_ready = 1'b0;
  logic [10:0] rxr_count;
  logic      rxr_overflow;
  logic      dec_in_valid = 1'b0;
  cg_t       dec_in_cg = '0;
  logic      dec_out_valid, dec_out_err;
  pcs_char_t dec_out_char;

  sonic1g_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

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

  // mechanism counters
  int n_fill = 0, n_underflow = 0, n_txfull = 0, n_overflow = 0, n_align = 0;
  int n_realign = 0, n_decerr = 0, n_kerr = 0, n_rdflip = 0, n_a7 = 0, n_kchar = 0;

  function automatic logic is_filler(input cg_t c);
    return c == 10'b001111_1010 || c == 10'b110000_0101;
  endfunction

  // host and DMA state
  pcs_char_t host_q[$];          // characters still to give to the encoder
  pcs_char_t sent_chars[$];      // valid characters of the current burst
  cg_t       dma_tx_q[$];        // encoder output waiting for the TX ring
  cg_t       sent_cgs[$];        // code groups of the current burst
  logic      bit_q[$];           // the loopback fibre
  logic      slip_now = 1'b0;
  logic      host_reads = 1'b1;
  logic      checking = 1'b1;     // 0: burst is not compared

  // receive-side matching of the current burst
  typedef enum logic [1:0] {WAIT_START, MATCH, TAIL} mstate_e;
  mstate_e   mstate = WAIT_START;
  int        midx = 0;
  int        last_match_cyc = 0;
  int        cyc = 0;
  pcs_char_t dec_exp_q[$];       // characters the decoder must give next
  logic      dec_exp_v[$];       // 0: decoder output not checked
  int        n_matched = 0;

  // one burst: frames of random length, each followed by idles
  task automatic make_burst(input int frames);
    for (int f = 0; f < frames; f++) begin
      automatic int len = 64 + $urandom_range(100);
      host_q.push_back('{k: 1'b1, d: 8'hFB});   // /S/ K27.7
      for (int i = 0; i < 7; i++) host_q.push_back('{k: 1'b0, d: 8'h55});
      host_q.push_back('{k: 1'b0, d: 8'hD5});
      for (int i = 0; i < len; i++) host_q.push_back('{k: 1'b0, d: 8'($urandom)});
      host_q.push_back('{k: 1'b1, d: 8'hFD});   // /T/ K29.7
      host_q.push_back('{k: 1'b1, d: 8'hF7});   // /R/ K23.7
      for (int i = 0; i < 6; i++) begin
        host_q.push_back('{k: 1'b1, d: 8'hBC});
        host_q.push_back('{k: 1'b0, d: 8'h50});
      end
    end
  endtask

  // rx matching of one code group read from the RX ring
  task automatic rx_group(input cg_t c);
    logic chk = 1'b0;
    pcs_char_t want = '0;
    case (mstate)
      WAIT_START: begin
        if (checking && sent_cgs.size() > 0 && c == sent_cgs[0]) begin
          mstate = MATCH; midx = 1; chk = 1'b1; want = sent_chars[0];
          last_match_cyc = cyc; n_matched++;
        end
      end
      MATCH: if (!checking) begin
        mstate = TAIL;
      end else begin
        check(c == sent_cgs[midx], $sformatf("rx cg %0d: %b want %b", midx, c, sent_cgs[midx]));
        check(cyc - last_match_cyc == 10, $sformatf("rx cg %0d spacing %0d", midx, cyc - last_match_cyc));
        last_match_cyc = cyc;
        chk = 1'b1; want = sent_chars[midx];
        midx++; n_matched++;
        if (midx == sent_cgs.size()) mstate = TAIL;
      end
      TAIL: if (checking) check(is_filler(c), $sformatf("after burst: %b", c));
      default: ;
    endcase
    if (is_filler(c)) n_fill++;
    dec_exp_q.push_back(want);
    dec_exp_v.push_back(chk);
  endtask

  // the whole testbench runs on the falling edge: read outputs, drive inputs
  initial begin
    int phase_end;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int step = 0; step < 6; step++) begin
      case (step)
        0: phase_end = cyc + 400;                       // A: filler only
        1: begin                                         // B: burst 1
             tx_enable = 1'b1;
             make_burst(12);
             host_q.push_back('{k: 1'b1, d: 8'h21});    // invalid K
             phase_end = cyc + 30000;
           end
        2: begin host_reads = 1'b0; phase_end = cyc + 12000; end  // C
        3: begin                                         // D: slip
             host_reads = 1'b1; slip_now = 1'b1; checking = 1'b0;
             make_burst(2); phase_end = cyc + 6000;
           end
        4: begin slip_now = 1'b0; phase_end = cyc + 1000; end
        5: begin checking = 1'b1; make_burst(3); phase_end = cyc + 15000; end
        default: ;
      endcase
      if (step == 5 || step == 1) begin
        sent_chars = {};
        sent_cgs   = {};
        mstate     = WAIT_START;
        midx       = 0;
      end
      while (cyc < phase_end) begin
        // ---- outputs of the last clock edge
        if (enc_out_valid) begin
          if (enc_out_kerr) n_kerr++;
          else begin
            automatic int o6 = $countones(enc_out_cg[9:4]);
            automatic int o4 = $countones(enc_out_cg[3:0]);
            dma_tx_q.push_back(enc_out_cg);
            sent_cgs.push_back(enc_out_cg);
            if (o6 + o4 != 5) n_rdflip++;
          end
        end
        if (tx_underflow) n_underflow++;
        if (rxr_overflow) n_overflow++;
        if (rx_realign) begin
          if (n_align == 0) n_align++;
          else n_realign++;
        end
        if (dec_out_valid) begin
          automatic pcs_char_t w = dec_exp_q.pop_front();
          automatic logic v = dec_exp_v.pop_front();
          if (dec_out_err) n_decerr++;
          if (v) check(!dec_out_err && dec_out_char == w,
                       $sformatf("decoded k=%0b d=%02h want k=%0b d=%02h",
                                 dec_out_char.k, dec_out_char.d, w.k, w.d));
        end
        // ---- the fibre: one bit per clock, plus one slipped bit
        bit_q.push_back(tx_serial);
        if (slip_now && cyc == phase_end - 5000) bit_q.push_back(tx_serial);
        rx_serial = (bit_q.size() > 4) ? bit_q.pop_front() : 1'b0;
        // ---- host to encoder
        if (host_q.size() > 0) begin
          automatic pcs_char_t c = host_q.pop_front();
          enc_in_valid = 1'b1;
          enc_in_char  = c;
          if (c.k && c.d != 8'h21) n_kchar++;
          if (!(c.k && c.d == 8'h21)) sent_chars.push_back(c);
          if (!c.k && (((c.d[4:0] inside {5'd17, 5'd18, 5'd20, 5'd11, 5'd13, 5'd14})) &&
                       c.d[7:5] == 3'd7)) n_a7++;
        end else begin
          enc_in_valid = 1'b0;
        end
        // ---- DMA into the TX ring
        txr_wr_valid = (dma_tx_q.size() > 0);
        txr_wr_data  = (dma_tx_q.size() > 0) ? dma_tx_q[0] : '0;
        // ---- DMA out of the RX ring, straight into the decoder
        rxr_rd_ready = host_reads;
        #1;
        if (txr_wr_valid) begin
          if (txr_wr_ready) void'(dma_tx_q.pop_front());
          else n_txfull++;
        end
        dec_in_valid = rxr_rd_valid && host_reads;
        dec_in_cg    = rxr_rd_data;
        if (dec_in_valid) rx_group(rxr_rd_data);
        if (!host_reads) check(rxr_count <= 1024, "rx ring count");
        @(negedge clk);
        cyc++;
      end
      if (step == 1 || step == 5) begin
        check(mstate == TAIL, $sformatf("burst %0d arrived: %0d of %0d code groups",
                                        step, midx, sent_cgs.size()));
      end
    end
    // every mechanism must have happened
    check(n_fill > 0,      "filler sent");
    check(n_underflow > 0, "TX ring underflow");
    check(n_txfull > 0,    "TX ring full, DMA waited");
    check(n_overflow > 0,  "RX ring overflow");
    check(n_align > 0,     "receiver aligned");
    check(n_realign > 0,   "receiver realigned after slip");
    check(n_decerr > 0,    "decoder flagged a broken code group");
    check(n_kerr == 1,     "invalid control character flagged");
    check(n_rdflip > 0,    "running disparity flipped");
    check(n_a7 > 0,        "alternate D.x.A7 used");
    check(n_kchar > 0,     "control characters sent");
    $display("fill=%0d underflow=%0d txfull=%0d overflow=%0d align=%0d realign=%0d",
             n_fill, n_underflow, n_txfull, n_overflow, n_align, n_realign);
    $display("decerr=%0d kerr=%0d rdflip=%0d a7=%0d kchar=%0d matched=%0d",
             n_decerr, n_kerr, n_rdflip, n_a7, n_kchar, n_matched);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
