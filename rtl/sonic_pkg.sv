// sonic_pkg: types, constants and the 8B/10B coding functions shared by the
// 1GbE SoNIC datapath.
//
// Code-group bit order. A 10-bit code group is held as
//   cg[9:0] = {a, b, c, d, e, i, f, g, h, j}
// so the 6-bit sub-block "abcdei" sits in cg[9:4], the 4-bit sub-block
// "fghj" in cg[3:0], and bit a (cg[9]) is the first bit on the line. An
// octet is held as d[7:0] = {H, G, F, E, D, C, B, A}: EDCBA (d[4:0]) feeds
// the 5B/6B sub-block and HGF (d[7:5]) the 3B/4B sub-block.
//
// The tables below hold only the code for negative running disparity, as
// printed in IEEE 802.3 Clause 36. The code for positive running disparity
// is the bitwise complement wherever the sub-block is unbalanced (or is one
// of the two balanced-but-alternated codes 111000 and 1100); otherwise the
// same code serves both. The encoder therefore needs one table per
// sub-block plus a complement, and the decoder searches the same tables in
// reverse, accepting either polarity. Ones are counted with $countones, the
// hardware counterpart of a population count.
package sonic_pkg;

  typedef logic [9:0] cg_t;          // one 10-bit code group

  typedef struct packed {
    logic       k;                   // 1: control (K) character
    logic [7:0] d;                   // octet HGFEDCBA
  } pcs_char_t;

  typedef struct packed {
    cg_t  cg;                        // encoded code group
    logic rd;                        // running disparity after it (1 = RD+)
    logic kerr;                      // K requested for a non-existent K code
  } enc_result_t;

  typedef struct packed {
    pcs_char_t ch;                   // decoded character
    logic      err;                  // code group is not in the tables
  } dec_result_t;

  // 5B/6B, negative running disparity column, index EDCBA, value abcdei.
  localparam logic [5:0] CODE6_RDN [32] = '{
    6'b100111, 6'b011101, 6'b101101, 6'b110001,   // D.00 - D.03
    6'b110101, 6'b101001, 6'b011001, 6'b111000,   // D.04 - D.07
    6'b111001, 6'b100101, 6'b010101, 6'b110100,   // D.08 - D.11
    6'b001101, 6'b101100, 6'b011100, 6'b010111,   // D.12 - D.15
    6'b011011, 6'b100011, 6'b010011, 6'b110010,   // D.16 - D.19
    6'b001011, 6'b101010, 6'b011010, 6'b111010,   // D.20 - D.23
    6'b110011, 6'b100110, 6'b010110, 6'b110110,   // D.24 - D.27
    6'b001110, 6'b101110, 6'b011110, 6'b101011    // D.28 - D.31
  };
  localparam logic [5:0] CODE6_K28_RDN = 6'b001111;

  // 3B/4B, negative running disparity column, index HGF, value fghj.
  // Entry 7 is the primary D.x.P7; the alternate D.x.A7 is CODE4_A7_RDN.
  localparam logic [3:0] CODE4_RDN [8] = '{
    4'b1011, 4'b1001, 4'b0101, 4'b1100,
    4'b1101, 4'b1010, 4'b0110, 4'b1110
  };
  localparam logic [3:0] CODE4_A7_RDN = 4'b0111;

  // K28.5 with negative running disparity: the comma character that the
  // transmitter sends when it has nothing else to send.
  localparam cg_t K28_5_RDN = 10'b001111_1010;

  // The 7-bit comma patterns (bits a..f) used for code-group alignment.
  localparam logic [6:0] COMMA_P = 7'b0011111;
  localparam logic [6:0] COMMA_N = 7'b1100000;

  // A sub-block code has an alternate (complemented) form when it is
  // unbalanced or is one of the two alternated balanced codes.
  function automatic logic alt6(input logic [5:0] c);
    return ($countones(c) != 3) || (c == 6'b111000);
  endfunction

  function automatic logic alt4(input logic [3:0] c);
    return ($countones(c) != 2) || (c == 4'b1100);
  endfunction

  // Running disparity after a sub-block: unchanged for a balanced code,
  // otherwise the sign of its disparity.
  function automatic logic rd_after6(input logic rd, input logic [5:0] c);
    return ($countones(c) == 3) ? rd : ($countones(c) > 3);
  endfunction

  function automatic logic rd_after4(input logic rd, input logic [3:0] c);
    return ($countones(c) == 2) ? rd : ($countones(c) > 2);
  endfunction

  // The twelve valid control characters are K28.0-K28.7, K23.7, K27.7,
  // K29.7 and K30.7.
  function automatic logic k_valid(input logic [7:0] d);
    logic [4:0] x;
    x = d[4:0];
    return (x == 5'd28) ||
           ((d[7:5] == 3'd7) && (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30));
  endfunction

  function automatic enc_result_t encode(input pcs_char_t ch, input logic rd);
    enc_result_t r;
    logic [4:0] x;
    logic [2:0] y;
    logic [5:0] six_n, six;
    logic [3:0] four_n, four;
    logic       rd_mid, use_a7;
    x = ch.d[4:0];
    y = ch.d[7:5];
    // 5B/6B sub-block
    six_n  = (ch.k && x == 5'd28) ? CODE6_K28_RDN : CODE6_RDN[x];
    six    = (rd && alt6(six_n)) ? ~six_n : six_n;
    rd_mid = rd_after6(rd, six);
    // 3B/4B sub-block
    use_a7 = ch.k ||
             (!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
             ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14));
    if (y == 3'd7) four_n = use_a7 ? CODE4_A7_RDN : CODE4_RDN[7];
    else           four_n = CODE4_RDN[y];
    four = (rd_mid && alt4(four_n)) ? ~four_n : four_n;
    // K28.y: the balanced fghj codes take the opposite polarity to data so
    // that the comma of K28.1/K28.5/K28.7 is not followed by a second run.
    if (ch.k && x == 5'd28 && !rd_mid && !alt4(four_n)) four = ~four_n;
    r.cg   = {six, four};
    r.rd   = rd_after4(rd_mid, four);
    r.kerr = ch.k && !k_valid(ch.d);
    return r;
  endfunction

  function automatic dec_result_t decode(input cg_t cg);
    dec_result_t r;
    logic [5:0] six;
    logic [3:0] four;
    logic [4:0] x;
    logic [2:0] y;
    logic       hit6, hit4, k28, kx7;
    six  = cg[9:4];
    four = cg[3:0];
    x    = '0;
    y    = '0;
    hit6 = 1'b0;
    hit4 = 1'b0;
    // reverse lookup of the 6-bit sub-block
    for (int i = 0; i < 32; i++) begin
      if (six == CODE6_RDN[i] || (alt6(CODE6_RDN[i]) && six == ~CODE6_RDN[i])) begin
        x    = 5'(i);
        hit6 = 1'b1;
      end
    end
    k28 = (six == CODE6_K28_RDN) || (six == ~CODE6_K28_RDN);
    if (k28) begin
      x    = 5'd28;
      hit6 = 1'b1;
      // after 110000 the balanced fghj codes of K28 are complemented
      if (six == ~CODE6_K28_RDN) four = ~four;
    end
    // reverse lookup of the 4-bit sub-block
    for (int i = 0; i < 8; i++) begin
      if (four == CODE4_RDN[i] || (alt4(CODE4_RDN[i]) && four == ~CODE4_RDN[i])) begin
        y    = 3'(i);
        hit4 = 1'b1;
      end
    end
    if (four == CODE4_A7_RDN || four == ~CODE4_A7_RDN) begin
      y    = 3'd7;
      hit4 = 1'b1;
    end
    // K23.7, K27.7, K29.7 and K30.7 are the only users of A7 after these x
    kx7 = (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30) &&
          (cg[3:0] == CODE4_A7_RDN || cg[3:0] == ~CODE4_A7_RDN) && hit6;
    r.ch.d = {y, x};
    r.ch.k = (k28 || kx7);
    r.err  = !(hit6 && hit4);
    return r;
  endfunction

endpackage
