// adc_driver: strobe generator for the external 8-bit ADC.
//
// One conversion is made per switching cycle. A start pulse (the DPWM's
// cycle-start pulse) begins the sequence:
//   WR   : cs_n and wr_n low for T_WR clocks (the ADC starts converting),
//   CONV : strobes released for T_CONV clocks while the ADC converts,
//   RD   : cs_n and rd_n low for T_RD clocks (the ADC drives its result),
//          and in the second-to-last of these clocks rn (read-now) is high
//          for one clock, telling the compensator to take the ADC's data
//          bus at the next clock edge.
// So RD falls after WR has risen, RN rises after RD has fallen, and the
// result is taken while the ADC's output buffers are still enabled (RD
// stays low for one clock after that edge, which covers the data hold). The
// whole sequence takes T_WR+T_CONV+T_RD clocks and has to fit inside the
// shortest switching cycle. A start pulse that arrives while a sequence is
// still running is ignored and reported on the overrun output.
//
// The order of the strobes and of RN, and the one conversion per cycle,
// follow the controller's description. The strobe lengths, the cs_n
// asserted with each strobe, the overrun flag and the reset state are this
// design's choices.
//
// Interface: clk, synchronous active-low rst_n, start; cs_n, wr_n, rd_n
// to the ADC; rn to the compensator; busy; overrun (one-clock pulse).
// All outputs are registered.
module adc_driver #(
  parameter int unsigned T_WR   = 12,
  parameter int unsigned T_CONV = 12,
  parameter int unsigned T_RD   = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic cs_n,
  output logic wr_n,
  output logic rd_n,
  output logic rn,
  output logic busy,
  output logic overrun
);
  typedef enum logic [1:0] {S_IDLE, S_WR, S_CONV, S_RD} state_t;

  localparam int unsigned TMAX = (T_WR > T_CONV) ? ((T_WR > T_RD) ? T_WR : T_RD)
                                                 : ((T_CONV > T_RD) ? T_CONV : T_RD);
  localparam int unsigned TW = $clog2(TMAX + 1);

  state_t        state;
  logic [TW-1:0] tcnt;   // clocks left in the current phase

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      tcnt    <= '0;
      cs_n    <= 1'b1;
      wr_n    <= 1'b1;
      rd_n    <= 1'b1;
      rn      <= 1'b0;
      overrun <= 1'b0;
    end else begin
      rn      <= 1'b0;
      overrun <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_WR;
          tcnt  <= TW'(T_WR - 1);
          cs_n  <= 1'b0;
          wr_n  <= 1'b0;
        end
        S_WR: if (tcnt == '0) begin
          state <= S_CONV;
          tcnt  <= TW'(T_CONV - 1);
          cs_n  <= 1'b1;
          wr_n  <= 1'b1;
        end else tcnt <= tcnt - 1'b1;
        S_CONV: if (tcnt == '0) begin
          state <= S_RD;
          tcnt  <= TW'(T_RD - 1);
          cs_n  <= 1'b0;
          rd_n  <= 1'b0;
          rn    <= (T_RD == 2);
        end else tcnt <= tcnt - 1'b1;
        S_RD: if (tcnt == '0) begin
          state <= S_IDLE;
          cs_n  <= 1'b1;
          rd_n  <= 1'b1;
        end else begin
          tcnt <= tcnt - 1'b1;
          rn   <= (tcnt == TW'(2));
        end
        default: state <= S_IDLE;
      endcase
      if (start && state != S_IDLE) overrun <= 1'b1;
    end
  end

  assign busy = (state != S_IDLE);

  initial assert (T_WR >= 1 && T_CONV >= 1 && T_RD >= 2)
    else $error("adc_driver: WR and CONV need one clock, RD two");

  // RN only comes while the ADC's output buffers are enabled, and they stay
  // enabled through the clock edge at which the result is taken.
  a_rn_in_read: assert property (@(posedge clk) disable iff (!rst_n)
                                 rn |-> (!rd_n && !cs_n) ##1 (!rd_n && !cs_n));
endmodule
