// tb_uvlc_code_mux_output: checks the OR / DE-mux / OE-mux buffer.
// The reference holds the buffer as an array of 48 bits, index 0 being the
// first (most significant) bit.  Each cycle: when oe is high the first 16
// bits are the expected output word and are removed (zeros come in at the
// end); when de is high the aligned codeword bits are ORed in.  Directed part:
// the OR-plane example - "001", "1", "01011" in the buffer, then "011" with its
// redundant leading 1 on the last buffer bit, giving 001101011011.
module tb_uvlc_code_mux_output;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [47:0] aligned;
  logic        de, oe;
  logic [15:0] out_word;
  int checks = 0, failures = 0;
  bit model [48];

  uvlc_code_mux_output dut (
    .clk(clk), .rst_n(rst_n), .aligned(aligned), .de(de), .oe(oe), .out_word(out_word)
  );

  always #5 clk = ~clk;

  function automatic logic [15:0] model_word();
    logic [15:0] w;
    for (int i = 0; i < 16; i++) w[15-i] = model[i];
    return w;
  endfunction

  task automatic step(bit v, bit o, logic [47:0] a);
    @(negedge clk);
    checks++;
    if (out_word !== model_word()) begin
      failures++;
      if (failures < 20) $display("FAIL word at %0t: %h expected %h", $time, out_word, model_word());
    end
    de = v; oe = o; aligned = a;
    if (o) begin
      for (int i = 0; i < 48; i++) model[i] = (i + 16 < 48) ? model[i+16] : 1'b0;
    end
    if (v) begin
      for (int i = 0; i < 48; i++) model[i] = model[i] | a[47-i];
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
    de = 0; oe = 0; aligned = '0;
    foreach (model[i]) model[i] = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // "001" at bits 0..2 (its leading 1 falls off the top), "1" at bit 3
    // (leading 1 on bit 2), "01011" at bits 4..8, then "1011" over bits 8..11.
    step(1, 0, 48'b001    << 45);
    step(1, 0, 48'b11     << 44);
    step(1, 0, 48'b101011 << 39);
    step(1, 0, 48'b1011   << 36);
    step(0, 0, '0);
    checks++;
    if (out_word[15:4] !== 12'b001101011011) begin
      failures++;
      $display("FAIL OR-plane example: %b", out_word);
    end
    // Random traffic.
    repeat (20000) step(bit'($urandom_range(0, 1)), bit'($urandom_range(0, 1)), {$urandom, $urandom});
    step(0, 0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
