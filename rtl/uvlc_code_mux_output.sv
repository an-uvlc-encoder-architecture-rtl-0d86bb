// uvlc_code_mux_output: output buffer of the UVLC encoder.
//
// Three planes around one BUF_W-bit buffer register:
//   OE mux - when oe is high the top OUT_W bits of the buffer are the current
//            output word, so the feedback path shifts the buffer left by
//            OUT_W bits (zeros come in at the bottom);
//   OR     - ORs the aligned codeword from the shifter into that feedback;
//   DE mux - loads the OR result when de (data enable) is high, else just
//            the feedback, so output words keep flowing without input.
// Codewords fill the buffer from the MSB down.  The redundant leading 1 of
// the code splitter output lands on the end bit of the previous codeword,
// which is 1 already, so the OR absorbs it with no extra logic.  Bits below
// the valid part of the buffer are always zero, which is what lets a plain OR
// do the merge.
//
// Interface: aligned (BUF_W) from the shifter, de, oe from the length
// accumulator; out_word (OUT_W) is the top of the buffer register and is a
// valid output word in every cycle in which oe is high.
// Timing: one register; reset (asynchronous, active low, this design's
// choice) clears the buffer.
// The three planes, the 48-bit buffer and the 16-bit shift-out follow the
// published architecture.
module uvlc_code_mux_output
#(
  parameter int unsigned BUF_W = uvlc_pkg::UVLC_BUF_W,
  parameter int unsigned OUT_W = uvlc_pkg::UVLC_OUT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [BUF_W-1:0] aligned,
  input  logic             de,
  input  logic             oe,
  output logic [OUT_W-1:0] out_word
);

  logic [BUF_W-1:0] buf_q;
  logic [BUF_W-1:0] feedback;  // OE mux
  logic [BUF_W-1:0] merged;    // OR plane
  logic [BUF_W-1:0] buf_d;     // DE mux

  assign feedback = oe ? (buf_q << OUT_W) : buf_q;
  assign merged   = feedback | aligned;
  assign buf_d    = de ? merged : feedback;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) buf_q <= '0;
    else        buf_q <= buf_d;
  end

  assign out_word = buf_q[BUF_W-1 -: OUT_W];

endmodule
