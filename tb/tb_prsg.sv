// tb_prsg: self-checking test of the 16-bit pseudorandom stream generator.
//
// Sixteen reference LFSRs (taps 16,14,13,11, shift toward the output stage)
// are started from the generator's seed list and bit i of the stream is
// compared with reference i every clock. The test also checks that the seeds
// are distinct and nonzero, that the 16 streams are not copies of one
// another, and that over 8192 clocks the word never repeats (the bits are
// linearly independent, so the word has the full 2^16-1 period) and has a
// mean near the middle of its range.
module tb_prsg;
  logic        clk = 1'b0;
  logic        rst_n;
  logic [15:0] prn;
  int          checks = 0, failures = 0;

  prsg dut (.clk(clk), .rst_n(rst_n), .prn_o(prn));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  logic [15:0] ref_s [16];   // bit 15 = leftmost stage, bit 0 = output
  logic [15:0] expect_w;
  bit          seen [int];
  longint      sum;

  initial begin
    ref_s = '{16'h68F3, 16'h52E7, 16'hF2A8, 16'h269F, 16'h6514, 16'hA6A4, 16'h0C5D, 16'h128C,
              16'hD240, 16'h8930, 16'h1819, 16'h5D9E, 16'h9532, 16'h0EDA, 16'hE8E3, 16'h81E8};
    for (int i = 0; i < 16; i++) begin
      check(ref_s[i] != 0, "seed nonzero");
      for (int j = 0; j < i; j++) check(ref_s[i] != ref_s[j], "seeds distinct");
    end
    rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    sum = 0;
    for (int n = 0; n < 8192; n++) begin
      for (int i = 0; i < 16; i++) expect_w[i] = ref_s[i][0];
      check(prn == expect_w, $sformatf("word at clock %0d: %h vs %h", n, prn, expect_w));
      seen[int'(prn)] = 1'b1;
      sum += longint'(prn);
      @(posedge clk); #1;
      for (int i = 0; i < 16; i++)
        ref_s[i] = {ref_s[i][0] ^ ref_s[i][2] ^ ref_s[i][3] ^ ref_s[i][5], ref_s[i][15:1]};
    end
    check(seen.num() == 8192, $sformatf("only %0d distinct words in 8192", seen.num()));
    check(sum / 8192 > 30000 && sum / 8192 < 35500, $sformatf("mean %0d", sum / 8192));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
