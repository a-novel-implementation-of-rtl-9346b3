// tb_rrp_sweep: the controller at the three clock rates it was evaluated
// with (20, 40 and 66 MHz), swept over randomisation ratios.
//
// Three controllers run side by side in open loop with a fixed duty ratio
// (the ADC bus is tied to the reference). For K = 0..6 Hz per PRN step,
// fL is set so that the band fL .. fL + K*65535 is centred on 300 kHz, and
// the randomisation ratio RRP = K*65535 / (2*300 kHz) * 100 runs from 0 to
// about 65.5 %. For each clock rate the test checks that every cycle length
// SN lies in [floor(fclk/(fL+K*65535)), floor(fclk/fL)] and that the
// frequency band actually covered, fclk/SN_min - fclk/SN_max, gives an RRP
// within 3 points of the formula. It then sets a 270-330 kHz band and
// counts the distinct cycle lengths that fall in it: 14 at 20 MHz
// (61..74 clocks) and 45 at 66 MHz (200..244 clocks), so a faster clock
// gives a finer set of switching frequencies.
module tb_rrp_sweep;
  import rsdc_pkg::*;
  localparam int NI = 3;
  localparam int unsigned FCLK [NI] = '{20_000_000, 40_000_000, 66_000_000};

  logic       clk = 1'b0;
  logic       rst_n;
  freq_t      f_low_hz;
  logic [7:0] k_hz;
  int         checks = 0, failures = 0;

  logic       cs_n [NI], wr_n [NI], rd_n [NI], vgs1 [NI], vgs2 [NI], reset1 [NI], rn [NI], ovr [NI];
  count_t     sn [NI], dn [NI];
  duty_t      d_cur [NI], d_comp [NI];
  logic [1:0] dir [NI];
  prn_t       prn_used [NI];

  for (genvar i = 0; i < NI; i++) begin : g_ctl
    rsdc_controller #(.F_CLK_HZ(FCLK[i])) u_ctl (
      .clk(clk), .rst_n(rst_n), .adc_data(8'd168), .adc_cs_n(cs_n[i]), .adc_wr_n(wr_n[i]),
      .adc_rd_n(rd_n[i]), .vgs1(vgs1[i]), .vgs2(vgs2[i]), .vref(8'd168), .dz(8'd1),
      .delta_d(12'd1), .fb_en(1'b0), .d_fixed(12'd1229), .f_low_hz(f_low_hz), .k_hz(k_hz),
      .reset1(reset1[i]), .rn(rn[i]), .adc_overrun(ovr[i]), .sn(sn[i]), .dn(dn[i]),
      .d_cur(d_cur[i]), .d_comp(d_comp[i]), .comp_dir(dir[i]), .prn_used(prn_used[i]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
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

  bit     measuring = 1'b0;
  int     sn_min [NI], sn_max [NI], cyc [NI];
  bit     seen [NI][int];

  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < NI; i++) begin
      if (reset1[i] && measuring) begin
        cyc[i]++;
        if (int'(sn[i]) < sn_min[i]) sn_min[i] = sn[i];
        if (int'(sn[i]) > sn_max[i]) sn_max[i] = sn[i];
        seen[i][int'(sn[i])] = 1'b1;
      end
      check(!ovr[i], "ADC sequence overran a switching cycle");
    end
  end

  task automatic measure(input int n66);
    for (int i = 0; i < NI; i++) begin
      sn_min[i] = 1 << 30; sn_max[i] = 0; cyc[i] = 0; seen[i].delete();
    end
    // let the cycle under way and the one computed from the old settings pass
    repeat (3) @(posedge reset1[2]);
    measuring = 1'b1;
    while (cyc[2] < n66) @(posedge clk);
    measuring = 1'b0;
  endtask

  real rrp_formula, rrp_meas, f_hi, f_lo;
  int  lo_bound, hi_bound, n_in_band;

  initial begin
    rst_n = 1'b0; f_low_hz = 20'd300000; k_hz = 8'd0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    for (int k = 0; k <= 6; k++) begin
      k_hz = 8'(k);
      f_low_hz = 20'(300000 - (k * 65535) / 2);
      measure(400);
      rrp_formula = real'(k) * 65535.0 / 600000.0 * 100.0;
      for (int i = 0; i < NI; i++) begin
        lo_bound = int'(FCLK[i] / (int'(f_low_hz) + k * 65535));
        hi_bound = int'(FCLK[i] / f_low_hz);
        check(sn_min[i] >= lo_bound && sn_max[i] <= hi_bound,
              $sformatf("fclk %0d K %0d: SN %0d..%0d outside %0d..%0d",
                        FCLK[i], k, sn_min[i], sn_max[i], lo_bound, hi_bound));
        f_hi = real'(FCLK[i]) / real'(sn_min[i]);
        f_lo = real'(FCLK[i]) / real'(sn_max[i]);
        rrp_meas = (f_hi - f_lo) / 600000.0 * 100.0;
        $display("fclk %0d MHz  K %0d  fL %0d Hz  SN %0d..%0d  %0d lengths  RRP formula %4.1f %%  covered %4.1f %%",
                 FCLK[i] / 1000000, k, f_low_hz, sn_min[i], sn_max[i], seen[i].num(), rrp_formula, rrp_meas);
        check(rrp_meas > rrp_formula - 3.0 && rrp_meas < rrp_formula + 3.0,
              $sformatf("fclk %0d K %0d: RRP covered %f, formula %f", FCLK[i], k, rrp_meas, rrp_formula));
      end
    end
    // 270..335.5 kHz band; count the lengths that land within 270..330 kHz
    k_hz = 8'd1; f_low_hz = 20'd270000;
    measure(800);
    for (int i = 0; i < NI; i++) begin
      n_in_band = 0;
      foreach (seen[i][s]) begin
        real f;
        f = real'(FCLK[i]) / real'(s);
        if (f >= 270000.0 && f <= 330000.0) n_in_band++;
      end
      $display("fclk %0d MHz: %0d distinct cycle lengths in 270-330 kHz", FCLK[i] / 1000000, n_in_band);
      if (i == 0) check(n_in_band == 14, $sformatf("20 MHz: %0d lengths, expected 14", n_in_band));
      if (i == 2) check(n_in_band == 45, $sformatf("66 MHz: %0d lengths, expected 45", n_in_band));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
