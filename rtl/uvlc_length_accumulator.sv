// uvlc_length_accumulator: fill counter of the output buffer, with byte
// alignment.
//
// An adder adds the new codeword length to the length register; its sum is
// the buffer position at which the new codeword ends and is handed to the
// barrel shifter as its control.  A byte-align stage between adder and
// register picks the value to store: the adder sum when a codeword arrives,
// the register value rounded up to a multiple of 8 when byte_align is high,
// else the register value unchanged.  When the value reaches OUT_W (16) bits
// the stage raises OE for the next cycle and stores the value minus 16, the
// word that the output buffer then shifts out.  So the length register counts
// the valid buffer bits that follow the word flagged by OE, which is exactly
// where the next codeword must start.  This generalises the classic
// "adder carry-out is the output enable" of a 16-bit VLC packer to codewords
// longer than one output word.
//
// Interface: length/de (data enable) and byte_align in; shift_ctrl (adder
// sum), fill (length register) and oe (registered output enable) out.
// Timing: one register stage; oe and fill change on the rising clock edge.
// Reset (asynchronous, active low, this design's choice) clears both.
// A byte_align cycle takes no codeword: de is ignored while byte_align is
// high (this design's choice; the architecture does not say what happens when
// both are high).  The buffer cannot stall its source: the caller must keep
// fill + length <= BUF_W, which an assertion checks.
module uvlc_length_accumulator
#(
  parameter int unsigned CODE_W = uvlc_pkg::UVLC_CODE_W,
  parameter int unsigned BUF_W  = uvlc_pkg::UVLC_BUF_W,
  parameter int unsigned OUT_W  = uvlc_pkg::UVLC_OUT_W,
  parameter int unsigned ALIGN  = uvlc_pkg::UVLC_ALIGN,
  localparam int unsigned LEN_W = uvlc_pkg::len_bits(CODE_W),
  localparam int unsigned CNT_W = uvlc_pkg::cnt_bits(BUF_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LEN_W-1:0] length,
  input  logic             de,
  input  logic             byte_align,
  output logic [CNT_W-1:0] shift_ctrl,
  output logic [CNT_W-1:0] fill,
  output logic             oe
);

  localparam int unsigned SUM_W = CNT_W + 1;

  logic [SUM_W-1:0] sum;      // adder output
  logic [SUM_W-1:0] aligned;  // register value rounded up to ALIGN
  logic [SUM_W-1:0] total;    // buffer fill after this cycle
  logic             oe_d;
  logic [CNT_W-1:0] fill_d;

  assign sum        = SUM_W'(fill) + SUM_W'(length);
  assign shift_ctrl = CNT_W'(sum);
  assign aligned    = (SUM_W'(fill) + SUM_W'(ALIGN - 1)) & ~SUM_W'(ALIGN - 1);

  // Byte-align block: selects what goes back into the length register and
  // produces OE.
  always_comb begin
    if (byte_align)  total = aligned;
    else if (de)     total = sum;
    else             total = SUM_W'(fill);
    oe_d   = (total >= SUM_W'(OUT_W));
    fill_d = oe_d ? CNT_W'(total - SUM_W'(OUT_W)) : CNT_W'(total);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill <= '0;
      oe   <= 1'b0;
    end else begin
      fill <= fill_d;
      oe   <= oe_d;
    end
  end

  // The buffer holds the flagged word plus the counted bits: never more than
  // BUF_W bits in total.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   total <= SUM_W'(BUF_W))
    else $error("uvlc_length_accumulator: output buffer overflow (%0d bits)", total);

endmodule
