// tb_digital_compensator: self-checking test of the deadzone compensator.
//
// Random ADC words, references, deadzones and steps are applied; rn is
// high in about half of the clocks. A reference model in plain integers
// applies the rule (above vref+dz: step down; below vref-dz: step up;
// otherwise hold; clamp to [D_MIN, D_MAX]) and the duty ratio and
// direction are compared every clock. Long runs of "too low" and "too
// high" drive the duty into both clamps; each branch must occur.
module tb_digital_compensator;
  localparam int D_INIT = 1229, D_MIN = 0, D_MAX = 3891;

  logic       clk = 1'b0;
  logic       rst_n, rn;
  logic [7:0] vo, vref, dz;
  logic [11:0] delta_d, d_next;
  logic [1:0] dir;
  int         checks = 0, failures = 0;

  digital_compensator dut (.clk(clk), .rst_n(rst_n), .rn(rn), .vo(vo), .vref(vref),
                           .dz(dz), .delta_d(delta_d), .d_next(d_next), .dir(dir));

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

  int d_ref, dir_ref;
  int n_up = 0, n_down = 0, n_hold = 0, n_clamp_hi = 0, n_clamp_lo = 0;

  task automatic step(input bit r, input int v, input int ref_v, input int z, input int dd);
    rn = r; vo = 8'(v); vref = 8'(ref_v); dz = 8'(z); delta_d = 12'(dd);
    @(posedge clk); #1;
    if (r) begin
      if (v > ref_v + z) begin
        dir_ref = 2; n_down++;
        d_ref = d_ref - dd;
        if (d_ref < D_MIN) begin d_ref = D_MIN; n_clamp_lo++; end
      end else if (v < ref_v - z) begin
        dir_ref = 1; n_up++;
        d_ref = d_ref + dd;
        if (d_ref > D_MAX) begin d_ref = D_MAX; n_clamp_hi++; end
      end else begin
        dir_ref = 0; n_hold++;
      end
    end
    check(int'(d_next) == d_ref && int'(dir) == dir_ref,
          $sformatf("rn=%0b vo=%0d vref=%0d dz=%0d dd=%0d: d=%0d dir=%0d, expected %0d %0d",
                    r, v, ref_v, z, dd, d_next, dir, d_ref, dir_ref));
  endtask

  initial begin
    rst_n = 1'b0; rn = 1'b0; vo = 0; vref = 0; dz = 0; delta_d = 0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    d_ref = D_INIT; dir_ref = 0;
    check(int'(d_next) == D_INIT, "reset duty ratio");
    // random mix
    for (int i = 0; i < 4000; i++)
      step($urandom_range(0, 1), $urandom_range(0, 255), $urandom_range(0, 255),
           $urandom_range(0, 8), $urandom_range(0, 160));
    // edges of the deadzone: vo exactly at vref +/- dz holds
    for (int i = 0; i < 200; i++) begin
      int r, z;
      r = $urandom_range(20, 235); z = $urandom_range(0, 15);
      step(1, r + z, r, z, 5);
      step(1, r - z, r, z, 5);
      step(1, r + z + 1, r, z, 5);
      step(1, r - z - 1, r, z, 5);
    end
    // deadzone around the ends of the ADC range (no wrap)
    step(1, 0, 2, 10, 3);
    step(1, 255, 250, 10, 3);
    // output far too low: duty rises into the upper clamp
    for (int i = 0; i < 120; i++) step(1, 10, 169, 2, 64);
    // output far too high: duty falls into the lower clamp
    for (int i = 0; i < 120; i++) step(1, 250, 169, 2, 64);
    check(n_up > 0 && n_down > 0 && n_hold > 0 && n_clamp_hi > 0 && n_clamp_lo > 0,
          $sformatf("branches: up %0d down %0d hold %0d clamp_hi %0d clamp_lo %0d",
                    n_up, n_down, n_hold, n_clamp_hi, n_clamp_lo));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
