// tb_uvlc_shifter: checks the alignment shifter against a wide-vector
// reference: the codeword placed above 48 zero bits and shifted right by
// end_pos must equal the shifter output, for every end position 1..48 and
// random splitter patterns.
module tb_uvlc_shifter;

  logic [30:0] split;
  logic [5:0]  end_pos;
  logic [47:0] aligned;
  int checks = 0, failures = 0;

  uvlc_shifter dut (.split(split), .end_pos(end_pos), .aligned(aligned));

  // Watchdog.
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 1; e <= 48; e++) begin
      repeat (40) begin
        logic [78:0] wide;
        logic [47:0] exp;
        split   = 31'($urandom);
        end_pos = 6'(e);
        #1;
        wide = {split, 48'b0} >> e;
        exp  = wide[47:0];
        checks++;
        if (aligned !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL end %0d split %h: %h expected %h", e, split, aligned, exp);
        end
      end
    end
    // A 1-bit codeword ending at the last buffer bit lands at bit 0.
    split = 31'b1; end_pos = 6'd48; #1;
    checks++;
    if (aligned !== 48'h1) begin failures++; $display("FAIL bottom: %h", aligned); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
