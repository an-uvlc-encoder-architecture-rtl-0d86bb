// tb_uvlc_length_accumulator: cycle-by-cycle check of the fill counter.
// The reference keeps two integers: the total number of stream bits written
// and the number of 16-bit words flagged so far.  A word is flagged (oe) in a
// cycle when a complete word is waiting that has not been flagged yet; fill
// is written-bits minus 16 times flagged-words; byte alignment rounds the
// written-bit count up to a multiple of 8; shift_ctrl is fill plus the
// incoming length.  Stimulus is random (odd lengths 1..31, idle cycles, byte
// alignment) but never pushes the buffer beyond 48 bits.  The directed start
// reproduces the header / 19-bit / idle example (three consecutive words, 2
// bits left).
module tb_uvlc_length_accumulator;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [4:0] length;
  logic       de, byte_align;
  logic [5:0] shift_ctrl, fill;
  logic       oe;
  int checks = 0, failures = 0;
  int written = 0, flagged = 0;
  int n_align_pad = 0, n_oe_idle = 0, n_oe_backlog = 0;

  uvlc_length_accumulator dut (
    .clk(clk), .rst_n(rst_n), .length(length), .de(de), .byte_align(byte_align),
    .shift_ctrl(shift_ctrl), .fill(fill), .oe(oe)
  );

  always #5 clk = ~clk;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: %0d expected %0d", what, $time, got, exp);
      // Once the design has left the reference, stop before the stimulus,
      // which is throttled by the reference, can overflow the buffer.
      if (failures >= 20) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  endtask

  // Check the registered outputs, then apply one cycle of stimulus.
  task automatic step(bit v, int len, bit ba);
    int occ;
    @(negedge clk);
    if (written / 16 > flagged) begin
      chk("oe", int'(oe), 1);
      flagged++;
    end else begin
      chk("oe", int'(oe), 0);
    end
    occ = written - 16 * flagged;
    chk("fill", int'(fill), occ);
    if (oe && !v && !ba) n_oe_idle++;
    if (oe && occ >= 16) n_oe_backlog++;
    de = v; byte_align = ba; length = 5'(len);
    #1;
    if (v && !ba) chk("shift_ctrl", int'(shift_ctrl), occ + len);
    if (ba) begin
      if (written % 8 != 0) n_align_pad++;
      written = (written + 7) / 8 * 8;
    end else if (v) begin
      written += len;
    end
  endtask

  // Watchdog.
  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    de = 0; byte_align = 0; length = 5'd1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Header, 19-bit codeword, idle.
    step(1, 31, 0);
    step(1, 19, 0);
    step(0, 0, 0);
    step(0, 0, 0);
    chk("example: three words flagged", flagged, 3);
    chk("example: two bits left", int'(fill), 2);
    repeat (20000) begin
      int r, len, occ;
      r   = int'($urandom_range(0, 99));
      len = 2 * int'($urandom_range(0, 15)) + 1;
      occ = written - 16 * flagged;
      if (written / 16 > flagged) occ -= 16;  // word flagged this coming cycle
      if (r < 8)                      step(0, 0, 1);
      else if (r < 20 || occ + len > 48) step(0, 0, 0);
      else                            step(1, len, 0);
    end
    step(0, 0, 0);
    chk("byte alignment with padding seen", int'(n_align_pad > 0), 1);
    chk("word flagged on an idle cycle seen", int'(n_oe_idle > 0), 1);
    chk("backlog beyond one word seen", int'(n_oe_backlog > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
