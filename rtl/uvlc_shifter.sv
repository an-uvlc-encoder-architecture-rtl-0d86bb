// uvlc_shifter: barrel shifter that aligns a codeword with the output buffer.
//
// The code splitter output (codeword in its low bits, the redundant leading 1
// just above) is zero-extended to the buffer width and shifted left so that
// the codeword's last bit lands at buffer bit BUF_W-end_pos, i.e. the
// codeword occupies buffer positions fill .. end_pos-1 counted from the MSB.
// end_pos is the length accumulator's adder sum (fill + length).  The leading
// 1 then sits on the last bit already in the buffer, or falls off the top when
// the buffer is empty.  The shift is built as log2(BUF_W) stages of 2^k-bit
// shifts.  The width, 48 bits, is that of the architecture (31 would be the
// minimum for a header; 48 leaves room for codewords queued behind a word).
//
// Interface: split (SPLIT_W bits) and end_pos (buffer position, 1..BUF_W) in,
// aligned (BUF_W bits) out.  Timing: combinational.
// That it is a barrel shifter of the buffer width follows the published
// architecture; the shift direction, the control encoding (end position) and
// the log-stage structure are this design's choices.
module uvlc_shifter
#(
  parameter int unsigned CODE_W = uvlc_pkg::UVLC_CODE_W,
  parameter int unsigned BUF_W  = uvlc_pkg::UVLC_BUF_W,
  localparam int unsigned SPLIT_W = uvlc_pkg::max_len(CODE_W),
  localparam int unsigned CNT_W   = uvlc_pkg::cnt_bits(BUF_W)
) (
  input  logic [SPLIT_W-1:0] split,
  input  logic [CNT_W-1:0]   end_pos,
  output logic [BUF_W-1:0]   aligned
);

  logic [CNT_W-1:0] amount;
  logic [BUF_W-1:0] stage [CNT_W+1];

  assign amount   = CNT_W'(BUF_W) - end_pos;
  assign stage[0] = BUF_W'(split);

  for (genvar k = 0; k < CNT_W; k++) begin : g_stage
    assign stage[k+1] = amount[k] ? (stage[k] << (2**k)) : stage[k];
  end

  assign aligned = stage[CNT_W];

endmodule
