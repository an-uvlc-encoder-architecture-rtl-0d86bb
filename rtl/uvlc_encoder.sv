// uvlc_encoder: UVLC entropy encoder for the H.26L test model (TML8).
//
// Every UVLC codeword has the form 0 x(n-1) 0 x(n-2) ... 0 x0 1.  Feeding the
// encoder "modified" code numbers (table code number + 1) makes the encoding
// trivial: the leading 1 of the number gives the length (2*pos+1) and the bits
// below it are x(n-1)..x0.  A first-1 detector finds the length, a wiring-only
// code splitter interleaves zeros, a length accumulator tracks the buffer fill
// and drives a 48-bit barrel shifter, and an OR/mux output buffer merges the
// codeword and hands out 16-bit words.  Setting the MSB of the input marks a
// picture header: the length is then 31 and the other 15 bits are the header
// information, placed straight into the codeword.
//
// Interface:
//   in_valid, code_num[15:0]  one symbol per clock (MSB = header)
//   byte_align                pad the stream with zeros to a multiple of 8
//                             bits; no symbol is taken in that cycle
//   oe, out_word[15:0]        a 16-bit word of the stream, first bit at the
//                             MSB, valid while oe is high
// Timing: a codeword given in cycle t is in the buffer from cycle t+1; a word
// is flagged in the cycle after its last bit arrived, at most one word per
// cycle (16 bits/clock peak throughput).  Reset: asynchronous, active low.
// The source cannot be stalled: it must not push the buffer beyond 48 bits
// (fill + length <= 48; fill is brought out for that purpose).
//
// After a byte alignment that added padding, the leading 1 of the next
// codeword lands on the last padding bit (if that bit has not already left
// the buffer) and sets it; the padding then reads 0..01.  This follows from
// the OR-plane scheme of the architecture, which assumes the previous bit is
// a codeword end bit.
//
// The block structure, the modified code numbers, the header handling and all
// sizes follow the published architecture.  The in_valid strobe, the fill
// output, the reset style and byte_align taking priority over a symbol are
// this design's choices.
module uvlc_encoder
#(
  parameter int unsigned CODE_W = uvlc_pkg::UVLC_CODE_W,
  parameter int unsigned BUF_W  = uvlc_pkg::UVLC_BUF_W,
  parameter int unsigned OUT_W  = uvlc_pkg::UVLC_OUT_W,
  parameter int unsigned ALIGN  = uvlc_pkg::UVLC_ALIGN,
  localparam int unsigned CNT_W = uvlc_pkg::cnt_bits(BUF_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [CODE_W-1:0] code_num,
  input  logic              byte_align,
  output logic              oe,
  output logic [OUT_W-1:0]  out_word,
  output logic [CNT_W-1:0]  fill
);

  localparam int unsigned LEN_W   = uvlc_pkg::len_bits(CODE_W);
  localparam int unsigned SPLIT_W = uvlc_pkg::max_len(CODE_W);

  logic [LEN_W-1:0]   length;
  logic [SPLIT_W-1:0] split;
  logic [CNT_W-1:0]   shift_ctrl;
  logic [BUF_W-1:0]   aligned;
  logic               de;

  assign de = in_valid && !byte_align;

  uvlc_first1_detector #(.CODE_W(CODE_W)) u_first1 (
    .code_num (code_num),
    .length   (length)
  );

  uvlc_code_splitter #(.CODE_W(CODE_W)) u_splitter (
    .code_num (code_num),
    .split    (split)
  );

  uvlc_length_accumulator #(
    .CODE_W (CODE_W),
    .BUF_W  (BUF_W),
    .OUT_W  (OUT_W),
    .ALIGN  (ALIGN)
  ) u_len_acc (
    .clk        (clk),
    .rst_n      (rst_n),
    .length     (length),
    .de         (de),
    .byte_align (byte_align),
    .shift_ctrl (shift_ctrl),
    .fill       (fill),
    .oe         (oe)
  );

  uvlc_shifter #(.CODE_W(CODE_W), .BUF_W(BUF_W)) u_shifter (
    .split   (split),
    .end_pos (shift_ctrl),
    .aligned (aligned)
  );

  uvlc_code_mux_output #(.BUF_W(BUF_W), .OUT_W(OUT_W)) u_out (
    .clk      (clk),
    .rst_n    (rst_n),
    .aligned  (aligned),
    .de       (de),
    .oe       (oe),
    .out_word (out_word)
  );

  // A legal code number has a leading 1.
  a_legal_code: assert property (@(posedge clk) disable iff (!rst_n)
                                  de |-> code_num != '0)
    else $error("uvlc_encoder: code number 0 has no UVLC codeword");

endmodule
