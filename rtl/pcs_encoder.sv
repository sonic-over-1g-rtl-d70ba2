// pcs_encoder: 8B/10B encoder of the Physical Coding Sublayer (IEEE 802.3
// Clause 36 transmission code).
//
// Every valid input character (octet plus control flag) becomes one 10-bit
// code group. As in the encoder's block diagram, the low five bits EDCBA go
// through a 5B/6B lookup and the high three bits HGF through a 3B/4B
// lookup; a running-disparity register then picks, for each sub-block,
// either the negative-disparity code or its complement so that the line
// stays DC balanced. The lookup and disparity rules are the functions in
// sonic_pkg. The same tables are used by the design's software PCS; here
// they are a single-cycle combinational path followed by one register.
//
// The two sub-block lookups steered by running disparity are the design's;
// storing one table column and complementing it, the kerr flag and the
// output register are this implementation's.
//
// Interface: in_valid/in_char in, out_valid/out_cg/out_kerr out. out_kerr
// flags a control character that Clause 36 does not define; the code group
// is still produced from the tables. rd is the running disparity after the
// last code group (1 = RD+).
//
// Timing: one character per clock, latency one clock, no back-pressure.
// The running disparity starts at INIT_RD after reset (Clause 36 starts
// negative); it is a parameter so both starting values can be exercised.
module pcs_encoder
  import sonic_pkg::*;
#(
  parameter bit INIT_RD = 1'b0        // running disparity after reset
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  pcs_char_t in_char,
  output logic      out_valid,
  output cg_t       out_cg,
  output logic      out_kerr,
  output logic      rd
);

  enc_result_t enc;

  always_comb enc = encode(in_char, rd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd        <= INIT_RD;
      out_valid <= 1'b0;
      out_cg    <= '0;
      out_kerr  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        rd       <= enc.rd;
        out_cg   <= enc.cg;
        out_kerr <= enc.kerr;
      end
    end
  end

endmodule
