// tb_uvlc_first1_detector: exhaustive check of the first-1 detector.
// Every non-zero 16-bit code number is applied; the expected length is found
// by scanning the number from the MSB down for its first 1 (length = 2*pos+1).
// The rows of the truth table (one per leading-1 position, don't-care bits set
// to random values) and the code lengths of the modified code table are also
// checked directly.
module tb_uvlc_first1_detector;

  logic [15:0] code_num;
  logic [4:0]  length;
  int checks = 0, failures = 0;

  uvlc_first1_detector dut (.code_num(code_num), .length(length));

  function automatic int ref_len(logic [15:0] c);
    for (int i = 15; i >= 0; i--) if (c[i]) return 2 * i + 1;
    return 1;
  endfunction

  task automatic check(logic [15:0] c, int exp);
    code_num = c;
    #1;
    checks++;
    if (int'(length) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL code %h: length %0d, expected %0d", c, length, exp);
    end
  endtask

  // Watchdog.
  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Truth table rows: leading 1 at position r, random bits below.
    for (int r = 0; r < 16; r++) begin
      logic [15:0] c;
      c = 16'(1 << r) | (16'($urandom) & 16'((1 << r) - 1));
      check(c, 2 * r + 1);
    end
    // Modified code numbers 1..9 -> lengths 1,3,3,5,5,5,5,7,7.
    check(16'd1, 1); check(16'd2, 3); check(16'd3, 3);
    check(16'd4, 5); check(16'd7, 5); check(16'd8, 7); check(16'd9, 7);
    // Header: MSB set always gives 31.
    check(16'h8000, 31); check(16'hFFFF, 31);
    // Exhaustive.
    for (int v = 1; v < 65536; v++) check(16'(v), ref_len(16'(v)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
