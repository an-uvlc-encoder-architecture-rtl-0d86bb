// uvlc_code_splitter: code number to UVLC bit pattern, wiring only.
//
// The MSB of the modified code number is dropped (it carries no information),
// a 0 is put in front of each remaining bit and a 1 is appended as the LSB:
//   split = {0,c[CODE_W-2], 0,c[CODE_W-3], ..., 0,c[0], 1}.
// For a code number whose leading 1 is at position p, split[2p:0] is the
// finished codeword of length 2p+1, and split[2p+1] is that leading 1 itself.
// The extra 1 is removed later by the OR plane of the output buffer, where it
// lands on the end bit (always 1) of the codeword before it.  A header (MSB
// set) gives a 31-bit pattern with no extra 1 above it.
//
// Interface: code_num (CODE_W bits) in, split (2*CODE_W-1 bits) out.
// Timing: combinational, contains no gates.
// The mapping is the one of the published architecture; nothing here is
// this design's own choice.  Bit 15 of the input is unused by construction.
module uvlc_code_splitter
#(
  parameter int unsigned CODE_W = uvlc_pkg::UVLC_CODE_W,
  localparam int unsigned SPLIT_W = uvlc_pkg::max_len(CODE_W)
) (
  input  logic [CODE_W-1:0]  code_num,
  output logic [SPLIT_W-1:0] split
);

  assign split[0] = 1'b1;

  for (genvar i = 0; i < CODE_W - 1; i++) begin : g_bit
    assign split[2*i+1] = code_num[i];
    assign split[2*i+2] = 1'b0;
  end

endmodule
