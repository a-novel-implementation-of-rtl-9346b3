// tb_adc_driver: self-checking test of the ADC strobe sequence.
//
// The driver runs against the behavioural ADC model with a 15 ns clock.
// For each of 40 start pulses the test compares cs_n, wr_n, rd_n, rn and
// busy clock by clock with the expected sequence (WR low for T_WR clocks,
// T_CONV clocks released, RD low for T_RD clocks, RN in the second-to-last
// RD clock), checks the total length of T_WR+T_CONV+T_RD clocks, and
// checks that the word on the bus at the clock edge after RN is the code
// of the voltage applied at the start. A start given while busy must raise
// overrun and must not restart the sequence.
module tb_adc_driver;
  localparam int unsigned T_WR = 12, T_CONV = 12, T_RD = 6;
  localparam int unsigned TOTAL = T_WR + T_CONV + T_RD;

  logic        clk = 1'b0;
  logic        rst_n, start;
  logic        cs_n, wr_n, rd_n, rn, busy, overrun;
  logic [7:0]  data, last_code;
  int unsigned vin_mv;
  int unsigned conversions, early_reads;
  int          checks = 0, failures = 0;

  adc_driver #(.T_WR(T_WR), .T_CONV(T_CONV), .T_RD(T_RD)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .cs_n(cs_n), .wr_n(wr_n),
    .rd_n(rd_n), .rn(rn), .busy(busy), .overrun(overrun));

  adc_model adc (
    .cs_n(cs_n), .wr_n(wr_n), .rd_n(rd_n), .vin_mv(vin_mv), .data(data),
    .conversions(conversions), .early_reads(early_reads), .last_code(last_code));

  always #7.5ns clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  function automatic logic [7:0] code_of(input int unsigned mv);
    int unsigned c;
    c = (mv * 255 + 2500) / 5000;
    return (c > 255) ? 8'hFF : 8'(c);
  endfunction

  logic [7:0] expect_code, taken;
  int         rn_count, rn_at;
  bit         rn_seen;

  initial begin
    rst_n = 1'b0; start = 1'b0; vin_mv = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    check(cs_n && wr_n && rd_n && !rn && !busy, "idle after reset");
    for (int t = 0; t < 40; t++) begin
      vin_mv = $urandom_range(0, 5200);
      expect_code = code_of(vin_mv);
      repeat ($urandom_range(0, 5)) @(posedge clk);
      #1 start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      rn_count = 0; rn_at = -1; rn_seen = 1'b0;
      for (int k = 0; k <= int'(TOTAL) + 1; k++) begin
        // k = clocks since the edge that saw start
        bit e_wr, e_rd, e_cs, e_rn, e_busy;
        e_wr   = (k < int'(T_WR));
        e_rd   = (k >= int'(T_WR + T_CONV)) && (k < int'(TOTAL));
        e_cs   = e_wr || e_rd;
        e_rn   = (k == int'(TOTAL) - 2);
        e_busy = (k < int'(TOTAL));
        check(wr_n == !e_wr && rd_n == !e_rd && cs_n == !e_cs && rn == e_rn && busy == e_busy,
              $sformatf("trial %0d clock %0d: cs_n=%b wr_n=%b rd_n=%b rn=%b busy=%b",
                        t, k, cs_n, wr_n, rd_n, rn, busy));
        // a start in the middle of the sequence is refused
        if (t == 5 && k == 3) start = 1'b1;
        if (rn) begin rn_count++; rn_at = k; rn_seen = 1'b1; end
        @(posedge clk);
        if (rn_seen && rn_count == 1 && rn_at == k) taken = data;  // value at the edge after RN
        #1;
        if (t == 5 && k == 3) begin
          start = 1'b0;
          check(overrun, "overrun flagged for a start while busy");
        end
      end
      check(rn_count == 1, $sformatf("trial %0d: %0d RN pulses", t, rn_count));
      check(taken == expect_code, $sformatf("trial %0d: read %0d, expected %0d", t, taken, expect_code));
    end
    check(conversions == 40, $sformatf("%0d conversions", conversions));
    check(early_reads == 0, "read before the conversion ended");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
