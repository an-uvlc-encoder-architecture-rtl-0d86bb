// tb_uvlc_encoder: end-to-end test of the UVLC encoder at its default sizes.
//
// The reference builds the expected bitstream bit by bit.  A modified code
// number whose leading 1 is at position p becomes p pairs "0,c[p-1]" ...
// "0,c[0]" followed by the end bit 1; a header (MSB set) is the same with
// p = 15.  Byte alignment appends zeros up to a multiple of 8 bits.  Where a
// codeword follows a byte alignment, its redundant leading 1 is ORed into the
// previous stream bit if that bit is still in the buffer (buffer not empty).
// Each cycle the reference also predicts oe: a word is flagged once it is
// complete, at most one per cycle.  Every flagged word is compared with the
// next 16 reference bits, and fill with the predicted buffer occupancy.
//
// Directed parts: the original code numbers 0..8 of the UVLC code table
// (modified numbers 1..9) must give the concatenated table codewords; the
// OR-plane example ("001","1","01011","011"); the header / 19-bit / idle
// example with its word timing; 256 symbols on 256 consecutive clocks.  Then
// random traffic with headers, idle
// cycles and byte alignment, throttled so the 48-bit buffer never overflows.
// Each mechanism of the design is counted and must occur.
module tb_uvlc_encoder;

  localparam int MAXBITS = 1 << 20;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, byte_align = 1'b0;
  logic [15:0] code_num = 16'd1;
  logic        oe;
  logic [15:0] out_word;
  logic [5:0]  fill;

  int checks = 0, failures = 0;
  bit ref_bits [MAXBITS];
  int written = 0;   // bits in the reference stream
  int flagged = 0;   // words flagged by oe so far
  int cycle = 0;

  // Mechanism counters.
  int n_header = 0, n_code = 0, n_absorb = 0, n_drop = 0, n_align_pad = 0,
      n_align_nopad = 0, n_pad_set = 0, n_oe_idle = 0, n_oe_run = 0,
      n_backlog = 0, n_idle = 0;
  bit prev_oe = 1'b0;

  uvlc_encoder dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .code_num(code_num),
    .byte_align(byte_align), .oe(oe), .out_word(out_word), .fill(fill)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d): %0d expected %0d", what, cycle, got, exp);
      // Once the design has left the reference, stop before the stimulus,
      // which is throttled by the reference, can overflow the buffer.
      if (failures >= 20) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  endtask

  function automatic logic [15:0] ref_word(int k);
    logic [15:0] w;
    for (int i = 0; i < 16; i++) w[15-i] = ref_bits[16*k+i];
    return w;
  endfunction

  // Occupancy of the buffer after the word now flagged (if any) leaves.
  function automatic int occupancy();
    return written - 16 * flagged;
  endfunction

  // Check this cycle's outputs.  Called between the clock edges.
  task automatic check_outputs();
    bit exp_oe;
    exp_oe = (written / 16 > flagged);
    chk("oe", int'(oe), int'(exp_oe));
    if (oe && exp_oe) begin
      checks++;
      if (out_word !== ref_word(flagged)) begin
        failures++;
        if (failures < 20) $display("FAIL word %0d (cycle %0d): %b expected %b",
                                    flagged, cycle, out_word, ref_word(flagged));
      end
      if (prev_oe) n_oe_run++;
      flagged++;
    end
    prev_oe = oe;
    chk("fill", int'(fill), occupancy());
    if (occupancy() >= 16) n_backlog++;
  endtask

  function automatic int code_len(logic [15:0] c);
    for (int i = 15; i >= 0; i--) if (c[i]) return 2 * i + 1;
    return 1;
  endfunction

  // Append the codeword of c to the reference stream.
  task automatic ref_append(logic [15:0] c);
    int p;
    p = (code_len(c) - 1) / 2;
    if (!c[15]) begin
      if (occupancy() > 0) begin
        n_absorb++;
        if (!ref_bits[written-1]) n_pad_set++;
        ref_bits[written-1] = 1'b1;
      end else begin
        n_drop++;
      end
      n_code++;
    end else begin
      n_header++;
    end
    for (int j = p - 1; j >= 0; j--) begin
      ref_bits[written++] = 1'b0;
      ref_bits[written++] = c[j];
    end
    ref_bits[written++] = 1'b1;
  endtask

  // One clock cycle: check outputs, then drive this cycle's input.
  typedef enum logic [1:0] {IDLE, SYMBOL, ALIGN} op_e;
  task automatic step(op_e op, logic [15:0] c = 16'd1);
    @(negedge clk);
    check_outputs();
    in_valid = (op == SYMBOL);
    byte_align = (op == ALIGN);
    code_num = c;
    if (oe && op != SYMBOL) n_oe_idle++;
    case (op)
      SYMBOL: ref_append(c);
      ALIGN: begin
        if (written % 8 != 0) n_align_pad++; else n_align_nopad++;
        written = (written + 7) / 8 * 8;
      end
      default: n_idle++;
    endcase
  endtask

  // Watchdog.
  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string table_bits;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // UVLC code table: original code numbers 0..8.
    for (int k = 0; k <= 8; k++) step(SYMBOL, 16'(k + 1));
    step(IDLE); step(IDLE);
    table_bits = {"1", "001", "011", "00001", "00011", "01001", "01011", "0000001", "0000011"};
    for (int i = 0; i < 32; i++) chk($sformatf("table bit %0d", i), int'(ref_bits[i]),
                                     int'(table_bits[i] == "1"));
    step(ALIGN); step(ALIGN);

    // OR-plane example: "001" "1" "01011" then "011".
    begin
      int base;
      string or_bits;
      or_bits = "001101011011";
      base = written;
      step(SYMBOL, 16'd2); step(SYMBOL, 16'd1); step(SYMBOL, 16'd7); step(SYMBOL, 16'd3);
      for (int i = 0; i < 12; i++)
        chk($sformatf("OR example bit %0d", i), int'(ref_bits[base+i]),
            int'(or_bits[i] == "1"));
    end
    step(ALIGN);
    repeat (4) step(IDLE);

    // Header, 19-bit codeword (leading 1 at bit 9), idle: three words in a row.
    while (occupancy() != 0 || oe) step(IDLE);
    begin
      int f0;
      f0 = flagged;
      step(SYMBOL, 16'h8000 | 16'h5A5A);
      step(SYMBOL, 16'h0200 | 16'h0123);
      step(IDLE);
      step(IDLE);
      chk("header example: words", flagged - f0, 3);
      chk("header example: bits left", int'(fill), 2);
    end

    // Sustained rate: one 15-bit codeword on each of 256 consecutive clocks.
    // Every output word is checked as usual; in addition all but the last
    // partial word must have left by the end, so words leave at one per
    // clock whenever a complete word is waiting, and no backlog builds up.
    repeat (4) step(IDLE);
    begin
      int f0, w_exp;
      f0 = flagged;
      for (int k = 0; k < 256; k++) step(SYMBOL, 16'h0080 | 16'(k & 8'h7F));
      step(IDLE);
      w_exp = (256 * 15) / 16;
      chk("rate: words out after 256 symbols", flagged - f0 >= w_exp - 1 ? 1 : 0, 1);
      chk("rate: no backlog after the run", int'(fill) <= 16 ? 1 : 0, 1);
    end

    // Random traffic.
    repeat (100_000) begin
      int r;
      logic [15:0] c;
      r = int'($urandom_range(0, 99));
      if (r < 3)       c = 16'h8000 | 16'($urandom);                // header
      else if (r < 60) c = 16'(1 << $urandom_range(0, 4)) | 16'($urandom_range(0, 15)); // short
      else             c = 16'($urandom) >> $urandom_range(0, 15);  // any length
      if (c == 0) c = 16'd1;
      // Keep the buffer within 48 bits: occupancy after this cycle's word.
      begin
        int occ_next;
        occ_next = occupancy() - ((written / 16 > flagged) ? 16 : 0);
        if (r >= 95)                                step(ALIGN);
        else if (r >= 88 || occ_next + code_len(c) > 48) step(IDLE);
        else                                        step(SYMBOL, c);
      end
    end
    repeat (8) step(IDLE);

    chk("mechanism: header", int'(n_header > 0), 1);
    chk("mechanism: leading 1 absorbed by OR plane", int'(n_absorb > 0), 1);
    chk("mechanism: leading 1 dropped off empty buffer", int'(n_drop > 0), 1);
    chk("mechanism: byte alignment with padding", int'(n_align_pad > 0), 1);
    chk("mechanism: byte alignment already aligned", int'(n_align_nopad > 0), 1);
    chk("mechanism: padding bit set by next codeword", int'(n_pad_set > 0), 1);
    chk("mechanism: word output without input", int'(n_oe_idle > 0), 1);
    chk("mechanism: words on consecutive cycles", int'(n_oe_run > 0), 1);
    chk("mechanism: backlog of a full word", int'(n_backlog > 0), 1);
    $display("symbols %0d headers %0d words %0d absorbed %0d dropped %0d align %0d/%0d pad-set %0d oe-idle %0d oe-run %0d backlog %0d",
             n_code, n_header, flagged, n_absorb, n_drop, n_align_pad, n_align_nopad,
             n_pad_set, n_oe_idle, n_oe_run, n_backlog);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
