// dpwm: digital pulse-width modulator with a pseudorandom switching period.
//
// Every switching cycle is a count of clock steps. At the start of a cycle
// the modulator
//   - takes the compensator's d(n+1) as the duty ratio d(n) of this cycle,
//   - samples the pseudorandom word as the integer PRN,
//   - forms the switching frequency  fsw = fL + K*PRN            (Hz),
//     the steps per cycle            SN  = floor(fclk / fsw),
//     and the steps of the on-time   DN  = floor(SN * d(n)).
// A counter runs 1, 2, ..., SN and then starts again at 1; reset1 is high in
// the first clock of each cycle. Vgs1 (high-side gate) is high while the
// counter has not passed DN, so it is high for exactly DN clocks; Vgs2
// (low-side gate of the synchronous buck) is its complement.
//
// The division fclk/fsw is done by a sequential divider (udiv_seq) that
// needs about 27 clocks. To keep every cycle exact, the SN computed from the
// PRN sampled at the start of cycle n is used as the length of cycle n+1:
// the sequence of switching frequencies is the same random sequence, shifted
// by one cycle. DN is recomputed at every cycle start from that cycle's SN
// and d(n). SN is clamped to [SN_MIN, 2**CNT_W-1]; SN_MIN must exceed the
// divider latency so a result is always ready by the cycle's end.
//
// Following the controller's description: equations (1)-(3), the counter
// up to SN with a reset at each cycle end, the on/off decision by comparing
// the counter with DN, complementary Vgs1/Vgs2, and a new PRN and d at each
// cycle start. This design's choices: the one-cycle lookahead for SN,
// floor rounding, the clamps, the duty ratio as a DUTY_W-bit fraction,
// fL and K as run-time inputs, no dead time between Vgs1 and Vgs2 (the
// external gate driver is expected to add it), both gates low in reset,
// and the first cycle after reset having SN_INIT = fclk/300 kHz steps.
//
// Interface: clk, synchronous active-low rst_n; d_next (duty fraction),
// prn (pseudorandom word), f_low_hz (fL, Hz), k_hz (K, Hz per PRN step).
// Outputs vgs1, vgs2, reset1 and the current cycle's sn, dn, d_cur and
// the prn_used sampled at its start, all registered.
module dpwm
  import rsdc_pkg::*;
#(
  parameter int unsigned F_CLK_HZ  = F_CLK_HZ_DEFAULT,
  parameter int unsigned DUTY_BITS = DUTY_W,
  parameter int unsigned PRN_BITS  = PRN_W,
  parameter int unsigned FSW_BITS  = FSW_W,
  parameter int unsigned K_BITS    = K_W,
  parameter int unsigned CNT_BITS  = CNT_W,
  parameter int unsigned SN_MIN    = 40,
  parameter int unsigned SN_INIT   = F_CLK_HZ / F_CENTER_HZ
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [DUTY_BITS-1:0] d_next,
  input  logic [PRN_BITS-1:0]  prn,
  input  logic [FSW_BITS-1:0]  f_low_hz,
  input  logic [K_BITS-1:0]    k_hz,
  output logic                 vgs1,
  output logic                 vgs2,
  output logic                 reset1,
  output logic [CNT_BITS-1:0]  sn,
  output logic [CNT_BITS-1:0]  dn,
  output logic [DUTY_BITS-1:0] d_cur,
  output logic [PRN_BITS-1:0]  prn_used
);
  // Widths of the frequency word and of the clock-rate dividend.
  localparam int unsigned KP_W  = K_BITS + PRN_BITS;
  localparam int unsigned F_W   = ((KP_W > FSW_BITS) ? KP_W : FSW_BITS) + 1;
  localparam int unsigned N_W   = $clog2(F_CLK_HZ + 1);
  localparam int unsigned DIV_LATENCY = N_W + 1;
  localparam logic [CNT_BITS-1:0] SN_MAX = '1;

  logic [CNT_BITS-1:0] cnt, cnt_n, sn_n, dn_n, sn_next;
  logic [DUTY_BITS-1:0] d_n;
  logic [CNT_BITS+DUTY_BITS-1:0] prod_n;
  logic                cycle_end;

  logic [F_W-1:0]      fsw;
  logic                div_start, div_done, div_busy;
  logic [N_W-1:0]      div_q;

  // Equation (1): fsw = fL + K * PRN, from the PRN at this cycle start.
  assign fsw = F_W'(f_low_hz) + F_W'(k_hz * prn);

  assign cycle_end = (cnt >= sn);

  // Next-state of counter, cycle length, duty ratio and on-time.
  always_comb begin
    if (cycle_end) begin
      cnt_n = CNT_BITS'(1);
      sn_n  = sn_next;
      d_n   = d_next;
    end else begin
      cnt_n = cnt + 1'b1;
      sn_n  = sn;
      d_n   = d_cur;
    end
    // Equation (3): DN = SN * d(n), d(n) a DUTY_BITS-bit fraction.
    prod_n = CNT_BITS'(sn_n) * (CNT_BITS+DUTY_BITS)'(d_n);
    dn_n   = prod_n[CNT_BITS+DUTY_BITS-1:DUTY_BITS];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt      <= CNT_BITS'(SN_INIT);   // first clock after reset ends a cycle
      sn       <= CNT_BITS'(SN_INIT);
      dn       <= '0;
      d_cur    <= '0;
      prn_used <= '0;
      reset1   <= 1'b0;
      vgs1     <= 1'b0;
      vgs2     <= 1'b0;
    end else begin
      cnt      <= cnt_n;
      sn       <= sn_n;
      dn       <= dn_n;
      d_cur    <= d_n;
      reset1   <= cycle_end;
      if (cycle_end) prn_used <= prn;
      // The gate stays on while the counter has not passed DN.
      vgs1 <= (cnt_n <= dn_n);
      vgs2 <= !(cnt_n <= dn_n);
    end
  end

  // Equation (2): SN = fclk / fsw, computed during the cycle for the next one.
  assign div_start = rst_n && cycle_end;

  udiv_seq #(.N_W(N_W), .D_W(F_W)) u_div (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (div_start),
    .dividend(N_W'(F_CLK_HZ)),
    .divisor (fsw),
    .busy    (div_busy),
    .done    (div_done),
    .quotient(div_q)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) sn_next <= CNT_BITS'(SN_INIT);
    else if (div_done) begin
      if (div_q < N_W'(SN_MIN))                 sn_next <= CNT_BITS'(SN_MIN);
      else if (N_W > CNT_BITS && div_q > N_W'(SN_MAX)) sn_next <= SN_MAX;
      else                                      sn_next <= CNT_BITS'(div_q);
    end
  end

  initial assert (SN_MIN > DIV_LATENCY && SN_INIT >= SN_MIN)
    else $error("dpwm: SN_MIN must exceed the divider latency and not exceed SN_INIT");

  // The divider always finishes before the cycle it serves begins.
  a_div_ready: assert property (@(posedge clk) disable iff (!rst_n) cycle_end |-> !div_busy);
  // Vgs1 and Vgs2 are never on together.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(vgs1 && vgs2));
endmodule
