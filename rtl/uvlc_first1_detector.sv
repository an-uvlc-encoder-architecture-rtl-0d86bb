// uvlc_first1_detector: codeword length from a modified code number.
//
// The codeword of a modified code number n has length 2*p+1, where p is the
// bit position of the leading 1 of n (as in the published truth table: input
// 0...01 -> 1, 0...1x -> 3, ..., 1x...x -> 31).  The block is a priority
// encoder followed by a shift-and-set-LSB, purely combinational.
//
// Interface: code_num (CODE_W bits) in, length (len_bits(CODE_W) bits) out.
// Timing: combinational, no clock.
//
// A code number of zero has no leading 1 and is not a legal input; this design
// returns length 1 for it (its own choice, the architecture does not define it).
module uvlc_first1_detector
#(
  parameter int unsigned CODE_W = uvlc_pkg::UVLC_CODE_W,
  localparam int unsigned LEN_W = uvlc_pkg::len_bits(CODE_W)
) (
  input  logic [CODE_W-1:0] code_num,
  output logic [LEN_W-1:0]  length
);

  localparam int unsigned POS_W = $clog2(CODE_W);

  logic [POS_W-1:0] pos;

  // Priority encoder: the highest set bit wins.
  always_comb begin
    pos = '0;
    for (int unsigned i = 0; i < CODE_W; i++) begin
      if (code_num[i]) pos = POS_W'(i);
    end
  end

  // length = 2*pos + 1 ("always odd": the LSB is a constant 1).
  assign length = {LEN_W'(pos) << 1} | LEN_W'(1);

endmodule
