// tb_dpwm: self-checking test of the randomised-frequency DPWM at its
// default 66 MHz clock.
//
// The test drives random pseudorandom words and duty ratios that change at
// random clocks, and watches each switching cycle from one reset1 pulse to
// the next. A reference computed here from the inputs seen at each cycle
// start gives: SN of the next cycle = floor(66e6 / (fL + K*PRN)) limited to
// [40, 65535], DN = floor(SN * d / 4096). Each cycle's measured length
// must equal SN, the number of clocks with Vgs1 high must equal DN, Vgs2
// must be the complement of Vgs1, and the sn/dn/d_cur/prn_used outputs must
// match. Settings: K = 2 Hz with fL = 234465 Hz (21.8 % randomisation
// around 300 kHz), K = 0 (fixed frequency), K = 6 Hz with fL = 104 kHz,
// and two settings that hit the lower and upper SN limits.
module tb_dpwm;
  localparam int unsigned F_CLK = 66_000_000;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [11:0] d_next;
  logic [15:0] prn;
  logic [19:0] f_low_hz;
  logic [7:0]  k_hz;
  logic        vgs1, vgs2, reset1;
  logic [15:0] sn, dn, prn_used;
  logic [11:0] d_cur;
  int          checks = 0, failures = 0;

  dpwm dut (.clk(clk), .rst_n(rst_n), .d_next(d_next), .prn(prn), .f_low_hz(f_low_hz),
            .k_hz(k_hz), .vgs1(vgs1), .vgs2(vgs2), .reset1(reset1), .sn(sn), .dn(dn),
            .d_cur(d_cur), .prn_used(prn_used));

  always #7.5ns clk = ~clk;

  initial begin
    repeat (700000) @(posedge clk);
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

  function automatic int expect_sn(input int unsigned fl, input int unsigned k, input int unsigned p);
    longint unsigned f, q;
    f = longint'(fl) + longint'(k) * longint'(p);
    q = (f == 0) ? 64'hFFFF_FFFF : longint'(F_CLK) / f;
    if (q < 40) q = 40;
    if (q > 65535) q = 65535;
    return int'(q);
  endfunction

  // inputs as they will be seen at the next clock edge
  logic [11:0] d_in_prev;
  logic [15:0] prn_in_prev;
  logic [19:0] fl_prev;
  logic [7:0]  k_prev;
  int  pending_sn = 220, cur_sn = 0, cur_dn = 0;
  int  len = 0, high = 0, cycles = 0;
  bit  started = 1'b0;
  bit  sn_seen [int];

  always @(negedge clk) if (rst_n) begin
    if (reset1) begin
      if (started) begin
        check(len == cur_sn, $sformatf("cycle %0d length %0d, expected %0d", cycles, len, cur_sn));
        check(high == cur_dn, $sformatf("cycle %0d on-time %0d, expected %0d", cycles, high, cur_dn));
        cycles++;
      end
      started = 1'b1;
      cur_sn = pending_sn;
      cur_dn = (cur_sn * int'(d_in_prev)) / 4096;
      check(int'(sn) == cur_sn && int'(dn) == cur_dn && d_cur == d_in_prev && prn_used == prn_in_prev,
            $sformatf("cycle start: sn=%0d dn=%0d d=%0d prn=%h, expected %0d %0d %0d %h",
                      sn, dn, d_cur, prn_used, cur_sn, cur_dn, d_in_prev, prn_in_prev));
      pending_sn = expect_sn(fl_prev, k_prev, prn_in_prev);
      sn_seen[cur_sn] = 1'b1;
      len = 0; high = 0;
    end
    if (started) begin
      len++;
      if (vgs1) high++;
      check(vgs2 == !vgs1, "vgs2 is the complement of vgs1");
    end
    d_in_prev = d_next; prn_in_prev = prn; fl_prev = f_low_hz; k_prev = k_hz;
  end

  // random stimulus, changed just after each rising edge
  bit hold_d = 1'b0;
  always @(posedge clk) begin
    #1;
    prn <= 16'($urandom);
    if (!hold_d && $urandom_range(0, 99) == 0) d_next <= 12'($urandom_range(0, 4095));
  end

  task automatic run_cycles(input int n);
    int target;
    target = cycles + n;
    while (cycles < target) @(posedge clk);
  endtask

  int distinct_a;

  initial begin
    rst_n = 1'b0; d_next = 12'd1229; prn = 16'h0; f_low_hz = 20'd234465; k_hz = 8'd2;
    repeat (3) @(posedge clk); #2;
    rst_n = 1'b1;
    run_cycles(300);
    distinct_a = sn_seen.num();
    check(distinct_a > 60, $sformatf("only %0d different cycle lengths with K=2", distinct_a));
    // fixed frequency: every cycle 66e6/300e3 = 220 clocks
    k_hz = 8'd0; f_low_hz = 20'd300000;
    run_cycles(3);
    sn_seen.delete();
    run_cycles(20);
    check(sn_seen.num() == 1 && sn_seen.exists(220), "fixed frequency gives 220 clocks per cycle");
    // wide randomisation (about 65 %)
    k_hz = 8'd6; f_low_hz = 20'd104000;
    run_cycles(100);
    // lower limit on SN (fsw above 1.65 MHz for most PRN values)
    k_hz = 8'd255; f_low_hz = 20'd1000000;
    run_cycles(2);
    sn_seen.delete();
    run_cycles(20);
    check(sn_seen.exists(40), "lower SN limit of 40 clocks reached");
    // upper limit on SN (1 kHz would need 66000 clocks)
    k_hz = 8'd0; f_low_hz = 20'd1000;
    run_cycles(3);
    check(sn == 16'hFFFF, $sformatf("upper SN limit: sn=%0d", sn));
    $display("cycles checked: %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
