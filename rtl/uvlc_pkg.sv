// uvlc_pkg: sizes shared by the blocks of the UVLC (universal variable length
// code) encoder.
//
// The encoder takes a 16-bit "modified" code number (the code number of the
// H.26L UVLC table plus one), whose leading 1 gives the codeword length and
// whose bits below that 1 are the codeword's information bits.  The longest
// codeword is the 31-bit picture header.  Codewords are packed into a 48-bit
// output buffer and leave it 16 bits per clock.  All of these numbers are the
// ones of the published architecture; the derived widths follow from them.
package uvlc_pkg;

  // Width of the modified code number input (MSB reserved for the header).
  localparam int unsigned UVLC_CODE_W = 16;
  // Width of the output buffer and of the barrel shifter.
  localparam int unsigned UVLC_BUF_W  = 48;
  // Width of one output word.
  localparam int unsigned UVLC_OUT_W  = 16;
  // Byte alignment granule, in bits.
  localparam int unsigned UVLC_ALIGN  = 8;

  // Longest codeword: 2*(CODE_W-1)+1 = 31 bits.
  function automatic int unsigned max_len(int unsigned code_w);
    return 2 * (code_w - 1) + 1;
  endfunction

  // Bits needed to hold a codeword length 1..max_len.
  function automatic int unsigned len_bits(int unsigned code_w);
    return $clog2(max_len(code_w) + 1);
  endfunction

  // Bits needed to hold a buffer fill count 0..buf_w.
  function automatic int unsigned cnt_bits(int unsigned buf_w);
    return $clog2(buf_w + 1);
  endfunction

endpackage
