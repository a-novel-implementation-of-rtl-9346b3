// tb_load_regulation: output voltage against load current, with feedback
// and with a fixed duty ratio of 0.3, for loads of 1 to 6 A at 12 V input
// and 21.8 % frequency randomisation (K = 2 Hz).
//
// The controller (default parameters) runs in closed loop with the ADC and
// averaged buck models. For each load the output is left to settle and its
// mean over 400 switching cycles is taken. With feedback the mean must stay
// within 3.3 V +/- 50 mV at every load. With the fixed duty ratio the mean
// must fall as the load rises, by more than 100 mV from 1 A to 6 A, which
// shows what the feedback loop removes.
module tb_load_regulation;
  import rsdc_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  adc_word_t  adc_data;
  logic       adc_cs_n, adc_wr_n, adc_rd_n, vgs1, vgs2;
  logic       fb_en;
  logic       reset1, rn, adc_overrun;
  count_t     sn, dn;
  duty_t      d_cur, d_comp;
  logic [1:0] comp_dir;
  prn_t       prn_used;

  int unsigned vo_mv, r_load_mohm, conversions, early_reads;
  int          il_ma;
  logic [7:0]  last_code;
  int          checks = 0, failures = 0;

  rsdc_controller dut (
    .clk(clk), .rst_n(rst_n), .adc_data(adc_data), .adc_cs_n(adc_cs_n),
    .adc_wr_n(adc_wr_n), .adc_rd_n(adc_rd_n), .vgs1(vgs1), .vgs2(vgs2),
    .vref(8'd168), .dz(8'd1), .delta_d(12'd1), .fb_en(fb_en), .d_fixed(12'd1229),
    .f_low_hz(20'd234465), .k_hz(8'd2), .reset1(reset1), .rn(rn),
    .adc_overrun(adc_overrun), .sn(sn), .dn(dn), .d_cur(d_cur), .d_comp(d_comp),
    .comp_dir(comp_dir), .prn_used(prn_used));

  adc_model adc (
    .cs_n(adc_cs_n), .wr_n(adc_wr_n), .rd_n(adc_rd_n), .vin_mv(vo_mv), .data(adc_data),
    .conversions(conversions), .early_reads(early_reads), .last_code(last_code));

  buck_model #(.V0(3.3), .I0(1.0), .DT_PS(15152)) plant (
    .clk(clk), .vgs1(vgs1), .vgs2(vgs2), .r_load_mohm(r_load_mohm),
    .vo_mv(vo_mv), .il_ma(il_ma));

  always #7576ps clk = ~clk;

  initial begin
    repeat (8_000_000) @(posedge clk);
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

  longint vo_sum;
  int     vo_n;
  bit     acc = 1'b0;

  always @(negedge clk) if (rst_n && reset1) begin
    if (acc) begin vo_sum += vo_mv; vo_n++; end
    check(!adc_overrun, "ADC conversion overran a cycle");
  end

  task automatic settle_and_measure(output int mv);
    repeat (1500) @(posedge reset1);
    vo_sum = 0; vo_n = 0; acc = 1'b1;
    repeat (400) @(posedge reset1);
    acc = 1'b0;
    mv = int'(vo_sum / vo_n);
  endtask

  int mv_fb [1:6], mv_fx [1:6];

  initial begin
    rst_n = 1'b0; fb_en = 1'b1; r_load_mohm = 3300;
    repeat (4) @(posedge clk); #1;
    rst_n = 1'b1;
    for (int a = 1; a <= 6; a++) begin
      r_load_mohm = 3300 / a;           // 3.3 V / a amperes
      settle_and_measure(mv_fb[a]);
    end
    fb_en = 1'b0;
    for (int a = 1; a <= 6; a++) begin
      r_load_mohm = 3300 / a;
      settle_and_measure(mv_fx[a]);
    end
    for (int a = 1; a <= 6; a++) begin
      $display("%0d A: feedback %0d mV, fixed d = 0.3 %0d mV", a, mv_fb[a], mv_fx[a]);
      check(mv_fb[a] > 3250 && mv_fb[a] < 3350, $sformatf("%0d A with feedback: %0d mV", a, mv_fb[a]));
      if (a > 1) check(mv_fx[a] < mv_fx[a-1], $sformatf("fixed d: no droop from %0d A to %0d A", a - 1, a));
    end
    check(mv_fx[1] - mv_fx[6] > 100, "fixed d: droop over 1..6 A");
    check(early_reads == 0, "ADC read before its conversion ended");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
