// rsdc_pkg: widths and default constants shared by the randomly switched
// DC-DC converter controller.
//
// The 8-bit ADC word, the 16-bit pseudorandom word and the 66 MHz clock are
// the values the controller was built and measured with; the remaining
// widths (duty-ratio fraction, frequency word, step counter) are chosen here
// to hold those values with margin.
package rsdc_pkg;

  // ADC result width (8-bit converter).
  localparam int unsigned ADC_W = 8;
  // Pseudorandom word width (16 one-bit generators).
  localparam int unsigned PRN_W = 16;
  // Duty ratio is an unsigned fraction d = duty / 2**DUTY_W.
  localparam int unsigned DUTY_W = 12;
  // Switching-frequency word in Hz (up to about 1 MHz).
  localparam int unsigned FSW_W = 20;
  // Step constant K of fsw = fL + K*PRN, in Hz per PRN step.
  localparam int unsigned K_W = 8;
  // Width of the clocks-per-cycle count SN and of the PWM counter.
  localparam int unsigned CNT_W = 16;

  // Fastest clock the controller was measured with.
  localparam int unsigned F_CLK_HZ_DEFAULT = 66_000_000;
  // Centre switching frequency of the power stage.
  localparam int unsigned F_CENTER_HZ = 300_000;

  typedef logic [ADC_W-1:0]  adc_word_t;
  typedef logic [DUTY_W-1:0] duty_t;
  typedef logic [PRN_W-1:0]  prn_t;
  typedef logic [FSW_W-1:0]  freq_t;
  typedef logic [CNT_W-1:0]  count_t;

endpackage
