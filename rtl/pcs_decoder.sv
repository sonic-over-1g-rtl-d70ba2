// pcs_decoder: 8B/10B decoder of the Physical Coding Sublayer.
//
// Each valid 10-bit code group is turned back into an octet and a control
// flag by reverse lookup in the 5B/6B and 3B/4B tables of sonic_pkg, for
// either polarity of each sub-block. Like the design's software decoder it
// keeps no running disparity: a code group of the wrong polarity for the
// current disparity is still decoded. out_err is raised for a code group
// whose 6-bit or 4-bit half is in neither table column.
//
// The reverse lookup without disparity tracking is the design's; the error
// flag and the register at the output are this implementation's.
//
// Interface: in_valid/in_cg in, out_valid/out_char/out_err out.
// Timing: one code group per clock, latency one clock, no back-pressure.
module pcs_decoder
  import sonic_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  cg_t       in_cg,
  output logic      out_valid,
  output pcs_char_t out_char,
  output logic      out_err
);

  dec_result_t dec;

  always_comb dec = decode(in_cg);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_char  <= '0;
      out_err   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_char <= dec.ch;
        out_err  <= dec.err;
      end
    end
  end

endmodule
