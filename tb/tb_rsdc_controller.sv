// tb_rsdc_controller: end-to-end test of the controller, all parameters at
// their defaults (66 MHz clock), in closed loop with behavioural models of
// the ADC and of the 12 V to 3.3 V synchronous buck stage.
//
// Phases:
//   1. feedback on, K = 2 Hz, fL = 234465 Hz (about 21.8 % randomisation
//      around 300 kHz), 5 A load: the output must settle to 3.3 V;
//   2. load step to 2 A: still regulated;
//   3. fixed duty ratio (feedback off): the duty ratio must stay at the
//      setting and the output must droop when the load goes back to 5 A;
//   4. feedback on, K = 0: fixed 300 kHz, every cycle 220 clocks.
// In every switching cycle the test checks: its length equals
// floor(66e6 / (fL + K*PRN)) for the PRN reported at the previous cycle start,
// the Vgs1 on-time equals floor(SN*d/4096), the duty ratio is the one
// selected at the cycle start, exactly one ADC conversion and one RN pulse
// happen, and no conversion overruns a cycle. It counts each mechanism
// (duty up, duty down, duty frozen in the deadzone, randomised and fixed
// frequency, fixed-duty cycles, load step) and fails if one never occurs.
module tb_rsdc_controller;
  import rsdc_pkg::*;
  localparam int unsigned F_CLK = 66_000_000;
  localparam int unsigned VREF  = 168;     // 3.3 V on a 5 V, 8-bit scale

  logic       clk = 1'b0;
  logic       rst_n;
  adc_word_t  adc_data, vref, dz;
  logic       adc_cs_n, adc_wr_n, adc_rd_n, vgs1, vgs2;
  duty_t      delta_d, d_fixed, d_cur, d_comp;
  logic       fb_en;
  freq_t      f_low_hz;
  logic [7:0] k_hz;
  logic       reset1, rn, adc_overrun;
  count_t     sn, dn;
  logic [1:0] comp_dir;
  prn_t       prn_used;

  int unsigned vo_mv, r_load_mohm, conversions, early_reads;
  int          il_ma;
  logic [7:0]  last_code;
  int          checks = 0, failures = 0;

  rsdc_controller dut (
    .clk(clk), .rst_n(rst_n), .adc_data(adc_data), .adc_cs_n(adc_cs_n),
    .adc_wr_n(adc_wr_n), .adc_rd_n(adc_rd_n), .vgs1(vgs1), .vgs2(vgs2),
    .vref(vref), .dz(dz), .delta_d(delta_d), .fb_en(fb_en), .d_fixed(d_fixed),
    .f_low_hz(f_low_hz), .k_hz(k_hz), .reset1(reset1), .rn(rn),
    .adc_overrun(adc_overrun), .sn(sn), .dn(dn), .d_cur(d_cur), .d_comp(d_comp),
    .comp_dir(comp_dir), .prn_used(prn_used));

  adc_model adc (
    .cs_n(adc_cs_n), .wr_n(adc_wr_n), .rd_n(adc_rd_n), .vin_mv(vo_mv), .data(adc_data),
    .conversions(conversions), .early_reads(early_reads), .last_code(last_code));

  buck_model #(.V0(3.3), .I0(5.0), .DT_PS(15152)) plant (
    .clk(clk), .vgs1(vgs1), .vgs2(vgs2), .r_load_mohm(r_load_mohm),
    .vo_mv(vo_mv), .il_ma(il_ma));

  always #7576ps clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
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
    longint unsigned q;
    q = longint'(F_CLK) / (longint'(fl) + longint'(k) * longint'(p));
    if (q < 40) q = 40;
    if (q > 65535) q = 65535;
    return int'(q);
  endfunction

  // -------- per-cycle monitor (at the falling edge, after the outputs settle)
  duty_t      d_sel_prev;
  freq_t      fl_prev;
  logic [7:0] k_prev;
  int  pending_sn = 220, cur_sn = 0, cur_dn = 0;
  int  len = 0, high = 0, rn_in_cycle = 0, cycles = 0;
  bit  started = 1'b0, rn_last = 1'b0;
  int  n_up = 0, n_down = 0, n_hold = 0, n_fixed_d = 0, n_fixed_f = 0, n_random_f = 0;
  bit  sn_seen [int];
  longint vo_sum = 0;
  int     vo_n = 0, vo_min = 99999, vo_max = 0;

  always @(negedge clk) if (rst_n) begin
    if (rn_last) begin
      unique case (comp_dir)
        2'b01:   n_up++;
        2'b10:   n_down++;
        default: n_hold++;
      endcase
    end
    rn_last = rn;
    if (reset1) begin
      if (started) begin
        check(len == cur_sn, $sformatf("cycle %0d length %0d, expected %0d", cycles, len, cur_sn));
        check(high == cur_dn, $sformatf("cycle %0d on-time %0d, expected %0d", cycles, high, cur_dn));
        check(rn_in_cycle == 1, $sformatf("cycle %0d had %0d RN pulses", cycles, rn_in_cycle));
        cycles++;
      end
      started = 1'b1;
      cur_sn = pending_sn;
      cur_dn = (cur_sn * int'(d_sel_prev)) / 4096;
      check(int'(sn) == cur_sn && d_cur == d_sel_prev,
            $sformatf("cycle start: sn=%0d d=%0d, expected %0d %0d", sn, d_cur, cur_sn, d_sel_prev));
      pending_sn = expect_sn(fl_prev, k_prev, prn_used);
      sn_seen[cur_sn] = 1'b1;
      if (!fb_en) n_fixed_d++;
      if (k_prev == 0) n_fixed_f++; else n_random_f++;
      vo_sum += vo_mv; vo_n++;
      if (int'(vo_mv) < vo_min) vo_min = vo_mv;
      if (int'(vo_mv) > vo_max) vo_max = vo_mv;
      len = 0; high = 0; rn_in_cycle = 0;
    end
    if (started) begin
      len++;
      if (vgs1) high++;
      if (rn) rn_in_cycle++;
      check(vgs2 == !vgs1, "vgs2 is the complement of vgs1");
    end
    check(!adc_overrun, "ADC conversion overran the switching cycle");
    d_sel_prev = fb_en ? d_comp : d_fixed;
    fl_prev = f_low_hz; k_prev = k_hz;
  end

  task automatic run_cycles(input int n);
    int target;
    target = cycles + n;
    while (cycles < target) @(posedge clk);
  endtask

  // mean output voltage (mV) over the next n cycles
  task automatic mean_vo(input int n, output int mv);
    vo_sum = 0; vo_n = 0; vo_min = 99999; vo_max = 0;
    run_cycles(n);
    mv = int'(vo_sum / vo_n);
    $display("  window of %0d cycles: Vo %0d..%0d mV", n, vo_min, vo_max);
  endtask

  duty_t dc_hold;
  int mv_a, mv_b, mv_c, mv_d, mv_e, conv_start, cyc_start, distinct_rand;

  initial begin
    rst_n = 1'b0; vref = 8'(VREF); dz = 8'd1; delta_d = 12'd1; fb_en = 1'b1;
    d_fixed = 12'd1128; f_low_hz = 20'd234465; k_hz = 8'd2; r_load_mohm = 660;
    repeat (4) @(posedge clk); #1;
    rst_n = 1'b1;
    conv_start = 0;

    // 1. closed loop, randomised frequency, 5 A
    run_cycles(1200);
    mean_vo(300, mv_a);
    $display("phase 1: mean Vo %0d mV, d=%0d, %0d distinct cycle lengths", mv_a, d_comp, sn_seen.num());
    check(mv_a > 3240 && mv_a < 3360, $sformatf("5 A: mean Vo %0d mV", mv_a));
    distinct_rand = sn_seen.num();
    check(distinct_rand > 100, $sformatf("only %0d distinct cycle lengths", distinct_rand));

    // 2. load step to 2 A
    r_load_mohm = 1650;
    run_cycles(1000);
    mean_vo(300, mv_b);
    $display("phase 2: mean Vo %0d mV, d=%0d", mv_b, d_comp);
    check(mv_b > 3240 && mv_b < 3360, $sformatf("2 A: mean Vo %0d mV", mv_b));

    // 3. fixed duty ratio, then back to 5 A: the output droops
    fb_en = 1'b0;
    dc_hold = d_comp;
    run_cycles(600);
    mean_vo(200, mv_c);
    check(d_cur == d_fixed, "fixed duty ratio used");
    r_load_mohm = 660;
    run_cycles(600);
    mean_vo(200, mv_d);
    $display("phase 3: fixed d, mean Vo %0d mV at 2 A, %0d mV at 5 A", mv_c, mv_d);
    check(d_cur == d_fixed, "fixed duty ratio used");
    check(mv_c - mv_d > 50, "fixed duty ratio: output droops with load");
    check(d_comp == dc_hold, "compensator holds its duty ratio while feedback is off");

    // 4. closed loop at a fixed 300 kHz
    fb_en = 1'b1; k_hz = 8'd0; f_low_hz = 20'd300000;
    run_cycles(2);
    sn_seen.delete();
    run_cycles(600);
    mean_vo(200, mv_e);
    $display("phase 4: K=0, mean Vo %0d mV", mv_e);
    check(sn_seen.num() == 1 && sn_seen.exists(220), "fixed 300 kHz: 220 clocks per cycle");
    check(mv_e > 3240 && mv_e < 3360, $sformatf("K=0: mean Vo %0d mV", mv_e));

    check(conversions >= cycles, $sformatf("%0d conversions in %0d cycles", conversions, cycles));
    check(early_reads == 0, "ADC read before its conversion ended");
    $display("cycles %0d: duty up %0d, down %0d, frozen %0d, fixed-d %0d, fixed-f %0d, random-f %0d",
             cycles, n_up, n_down, n_hold, n_fixed_d, n_fixed_f, n_random_f);
    check(n_up > 0, "duty ratio stepped up");
    check(n_down > 0, "duty ratio stepped down");
    check(n_hold > 0, "duty ratio frozen in the deadzone");
    check(n_fixed_d > 0 && n_fixed_f > 0 && n_random_f > 0, "all modes ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
