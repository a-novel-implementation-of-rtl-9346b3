// digital_compensator: deadzone step controller for the duty ratio.
//
// Each time rn (read-now) is high the compensator takes the ADC word vo
// and compares it with the reference vref widened by a deadzone dz:
//   vo > vref + dz  ->  d(n+1) = d(n) - delta_d   (output too high)
//   vo < vref - dz  ->  d(n+1) = d(n) + delta_d   (output too low)
//   otherwise       ->  d(n+1) = d(n)             (duty frozen)
// Without rn the duty ratio is held. Freezing the duty inside the deadzone
// stops the loop from hunting around the set point. The result d_next is
// the duty ratio the DPWM will use for the next switching cycle.
//
// The decision rule is the compensator's own. This design adds: the duty
// ratio as an unsigned fraction d_next / 2**DUTY_W, clamping to
// [D_MIN, D_MAX] so a step never wraps, the comparison done one bit wider
// so vref +/- dz cannot overflow, and the reset value D_INIT (0.3, the duty
// ratio of the 12 V to 3.3 V stage). A direction output (up/down/hold)
// reports which branch was taken.
//
// Interface: clk, synchronous active-low rst_n, rn, vo, vref, dz, delta_d;
// d_next and dir, both registered: they change one clock after rn.
module digital_compensator
  import rsdc_pkg::*;
#(
  parameter int unsigned ADC_BITS  = ADC_W,
  parameter int unsigned DUTY_BITS = DUTY_W,
  parameter int unsigned D_INIT    = 1229,  // 0.3 * 4096
  parameter int unsigned D_MIN     = 0,
  parameter int unsigned D_MAX     = 3891   // 0.95 * 4096
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rn,
  input  logic [ADC_BITS-1:0]  vo,
  input  logic [ADC_BITS-1:0]  vref,
  input  logic [ADC_BITS-1:0]  dz,
  input  logic [DUTY_BITS-1:0] delta_d,
  output logic [DUTY_BITS-1:0] d_next,
  output logic [1:0]           dir      // 01 up, 10 down, 00 hold
);
  localparam logic [1:0] DIR_HOLD = 2'b00, DIR_UP = 2'b01, DIR_DOWN = 2'b10;

  logic signed [ADC_BITS+1:0]  vo_s, hi_s, lo_s;
  logic        [DUTY_BITS:0]   d_up, d_dn;   // one extra bit to catch wrap
  logic        [DUTY_BITS-1:0] d_new;
  logic        [1:0]           dir_new;

  always_comb begin
    vo_s = signed'({2'b00, vo});
    hi_s = signed'({2'b00, vref}) + signed'({2'b00, dz});
    lo_s = signed'({2'b00, vref}) - signed'({2'b00, dz});
    d_up = {1'b0, d_next} + {1'b0, delta_d};
    d_dn = {1'b0, d_next} - {1'b0, delta_d};
    d_new   = d_next;
    dir_new = DIR_HOLD;
    if (vo_s > hi_s) begin
      dir_new = DIR_DOWN;
      if (d_dn[DUTY_BITS] || d_dn < (DUTY_BITS+1)'(D_MIN)) d_new = DUTY_BITS'(D_MIN);
      else                                                   d_new = d_dn[DUTY_BITS-1:0];
    end else if (vo_s < lo_s) begin
      dir_new = DIR_UP;
      if (d_up > (DUTY_BITS+1)'(D_MAX)) d_new = DUTY_BITS'(D_MAX);
      else                              d_new = d_up[DUTY_BITS-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_next <= DUTY_BITS'(D_INIT);
      dir    <= DIR_HOLD;
    end else if (rn) begin
      d_next <= d_new;
      dir    <= dir_new;
    end
  end

  initial assert (D_MIN <= D_INIT && D_INIT <= D_MAX && D_MAX < (1 << DUTY_BITS))
    else $error("digital_compensator: need D_MIN <= D_INIT <= D_MAX < 2**DUTY_BITS");
endmodule
