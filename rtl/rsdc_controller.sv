// rsdc_controller: digital controller for a randomly switched buck converter.
//
// The controller regulates the converter's output voltage while changing
// the switching frequency pseudorandomly from cycle to cycle, which spreads
// the switching noise over a band instead of concentrating it at one
// frequency and its harmonics. It joins four blocks:
//   prsg                 16 parallel m-LFSRs giving a 16-bit random word,
//   dpwm                 per cycle fsw = fL + K*PRN, SN = fclk/fsw,
//                        DN = SN*d; drives the gate signals Vgs1/Vgs2 and
//                        marks each cycle start with reset1,
//   adc_driver           started by reset1, strobes the external 8-bit ADC
//                        (CS, WR, then RD) and raises RN while the result
//                        is on the ADC bus,
//   digital_compensator  on RN compares the ADC word with Vref +/- dz and
//                        steps d(n+1) by delta_d or freezes it.
// So one output sample is taken and one duty-ratio update made in every
// switching cycle, and the update is used from the next cycle on.
//
// fb_en selects the duty source: 1 uses the compensator (closed loop), 0
// uses the constant d_fixed (open loop with a fixed duty ratio, the
// reference case). While the fixed duty ratio is selected, RN is withheld
// from the compensator so it holds its last duty ratio instead of winding
// up against an open loop; feedback resumes from that value. K = 0 gives a
// fixed switching frequency of fL.
// The mode input and the run-time fL, K, Vref, dz and delta_d inputs are
// this design's way of exposing the settings the controller was evaluated
// with; the block structure and the data flow between blocks follow the
// controller's description.
//
// Interface: clk, synchronous active-low rst_n; ADC bus adc_data and its
// strobes adc_cs_n/adc_wr_n/adc_rd_n; gate signals vgs1/vgs2 for the
// external driver stage; settings; and status outputs for observation.
module rsdc_controller
  import rsdc_pkg::*;
#(
  parameter int unsigned F_CLK_HZ = F_CLK_HZ_DEFAULT,
  parameter int unsigned T_WR     = 12,
  parameter int unsigned T_CONV   = 12,
  parameter int unsigned T_RD     = 6,
  parameter int unsigned SN_MIN   = 40,
  parameter int unsigned D_INIT   = 1229,
  parameter int unsigned D_MIN    = 0,
  parameter int unsigned D_MAX    = 3891
) (
  input  logic        clk,
  input  logic        rst_n,
  // ADC bus
  input  adc_word_t   adc_data,
  output logic        adc_cs_n,
  output logic        adc_wr_n,
  output logic        adc_rd_n,
  // gate signals to the interface and power-switch driver
  output logic        vgs1,
  output logic        vgs2,
  // settings
  input  adc_word_t   vref,
  input  adc_word_t   dz,
  input  duty_t       delta_d,
  input  logic        fb_en,
  input  duty_t       d_fixed,
  input  freq_t       f_low_hz,
  input  logic [K_W-1:0] k_hz,
  // status
  output logic        reset1,
  output logic        rn,
  output logic        adc_overrun,
  output count_t      sn,
  output count_t      dn,
  output duty_t       d_cur,
  output duty_t       d_comp,
  output logic [1:0]  comp_dir,
  output prn_t        prn_used
);
  prn_t  prn;
  duty_t d_sel;
  logic  adc_busy;
  logic  rn_comp;

  prsg u_prsg (
    .clk  (clk),
    .rst_n(rst_n),
    .prn_o(prn)
  );

  adc_driver #(.T_WR(T_WR), .T_CONV(T_CONV), .T_RD(T_RD)) u_adc_drv (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (reset1),
    .cs_n   (adc_cs_n),
    .wr_n   (adc_wr_n),
    .rd_n   (adc_rd_n),
    .rn     (rn),
    .busy   (adc_busy),
    .overrun(adc_overrun)
  );

  digital_compensator #(.D_INIT(D_INIT), .D_MIN(D_MIN), .D_MAX(D_MAX)) u_comp (
    .clk    (clk),
    .rst_n  (rst_n),
    .rn     (rn_comp),
    .vo     (adc_data),
    .vref   (vref),
    .dz     (dz),
    .delta_d(delta_d),
    .d_next (d_comp),
    .dir    (comp_dir)
  );

  assign rn_comp = rn && fb_en;
  assign d_sel   = fb_en ? d_comp : d_fixed;

  dpwm #(.F_CLK_HZ(F_CLK_HZ), .SN_MIN(SN_MIN)) u_dpwm (
    .clk     (clk),
    .rst_n   (rst_n),
    .d_next  (d_sel),
    .prn     (prn),
    .f_low_hz(f_low_hz),
    .k_hz    (k_hz),
    .vgs1    (vgs1),
    .vgs2    (vgs2),
    .reset1  (reset1),
    .sn      (sn),
    .dn      (dn),
    .d_cur   (d_cur),
    .prn_used(prn_used)
  );

  // The conversion started at a cycle start ends inside that cycle.
  a_adc_in_cycle: assert property (@(posedge clk) disable iff (!rst_n) reset1 |-> !adc_busy);
endmodule
