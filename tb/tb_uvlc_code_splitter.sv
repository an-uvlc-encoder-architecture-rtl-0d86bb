// tb_uvlc_code_splitter: checks the zero-interleaving wiring.
// Directed: the worked example (code number 0x10AF gives
// 0000010000000001000100010101011) and the codewords of the modified code
// table (code numbers 1..9).  Random: the pattern is decoded back (bit 0 must
// be 1, every even bit above it 0, odd bits give back the code number) and
// compared with the input.
module tb_uvlc_code_splitter;

  logic [15:0] code_num;
  logic [30:0] split;
  int checks = 0, failures = 0;

  uvlc_code_splitter dut (.code_num(code_num), .split(split));

  task automatic expect_eq(string what, logic [30:0] got, logic [30:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // Watchdog.
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Modified code table: code number -> (length, codeword).
  int unsigned tab_len [1:9] = '{1, 3, 3, 5, 5, 5, 5, 7, 7};
  logic [6:0]  tab_cw  [1:9] = '{7'b1, 7'b001, 7'b011, 7'b00001, 7'b00011,
                                 7'b01001, 7'b01011, 7'b0000001, 7'b0000011};

  initial begin
    code_num = 16'h10AF; #1;
    expect_eq("worked example", split, 31'b0000010000000001000100010101011);

    for (int n = 1; n <= 9; n++) begin
      logic [30:0] mask;
      code_num = 16'(n); #1;
      mask = 31'((1 << tab_len[n]) - 1);
      expect_eq($sformatf("codeword of %0d", n), split & mask, 31'(tab_cw[n]) & mask);
      // The redundant leading 1 sits just above the codeword.
      expect_eq($sformatf("leading 1 of %0d", n), 31'(split[tab_len[n]]), 31'(1));
    end

    repeat (2000) begin
      logic [15:0] back;
      logic        ok;
      code_num = 16'($urandom); #1;
      ok = split[0];
      back = '0;
      for (int i = 0; i < 15; i++) begin
        back[i] = split[2*i+1];
        if (split[2*i+2]) ok = 1'b0;
      end
      checks++;
      if (!ok || back[14:0] != code_num[14:0]) begin
        failures++;
        $display("FAIL random %h -> %b", code_num, split);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
