// buck_model: behavioural model (not synthesizable) of the synchronous buck
// power stage, for closing the control loop in simulation.
//
// Every rising edge of clk (period DT_PS) the model integrates the
// inductor current and output voltage with forward Euler:
//   v_sw = VIN when vgs1 is high, 0 when vgs2 is high (synchronous
//          rectifier); both off: the low-side body diode keeps v_sw near 0
//          while the current is positive
//   di/dt = (v_sw - R_L*i - v_o) / L
//   dv_c/dt = (i - v_o/R_load) / C,   v_o = v_c + ESR*(i - v_o/R_load)
// with L = 4.3 uH, C = 470 uF, VIN = 12 V, a lumped series loss R_L of
// 30 mOhm and a capacitor ESR of 50 mOhm (typical of a 470 uF electrolytic;
// its zero near 6.8 kHz matters for the loop's stability). The load is set in milliohms through r_load_mohm. The output
// voltage is reported in millivolts for the ADC model.
module buck_model #(
  parameter real VIN   = 12.0,
  parameter real L_H   = 4.3e-6,
  parameter real C_F   = 470e-6,
  parameter real R_L   = 0.030,
  parameter real ESR   = 0.050,
  parameter real V0    = 0.0,
  parameter real I0    = 0.0,
  parameter int  DT_PS = 15000
) (
  input  logic        clk,
  input  logic        vgs1,
  input  logic        vgs2,
  input  int unsigned r_load_mohm,
  output int unsigned vo_mv,
  output int          il_ma
);
  real vc = V0;
  real vo = V0;
  real il = I0;
  real dt, vsw, rl;

  initial dt = real'(DT_PS) * 1.0e-12;

  always @(posedge clk) begin
    vsw = vgs1 ? VIN : 0.0;
    rl  = real'(r_load_mohm) * 1.0e-3;
    il  = il + (vsw - R_L * il - vo) / L_H * dt;
    if (!vgs1 && !vgs2 && il < 0.0) il = 0.0;
    vc  = vc + (il - vo / rl) / C_F * dt;
    vo  = (vc + ESR * il) / (1.0 + ESR / rl);
    if (vo < 0.0) vo = 0.0;
  end

  assign vo_mv = int'(vo * 1000.0 + 0.5) < 0 ? 0 : int'(vo * 1000.0 + 0.5);
  assign il_ma = int'(il * 1000.0);
endmodule
