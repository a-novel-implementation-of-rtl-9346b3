// prsg: pseudorandom stream generator.
//
// N_LFSR maximum-length LFSRs (m_lfsr) run in parallel from the same clock,
// each started from a different seed. The output bit of LFSR i is bit i of
// the N_LFSR-bit stream prn_o, so with the default 16 registers the stream
// is a 16-bit word (largest value 2^16-1 = 65535) that changes every clock.
// Whoever uses the stream samples it when it needs a number; the bits in
// between are simply not used.
//
// Seeds: LFSR 0 starts from 0110100011110011b (68F3h); the other fifteen
// seeds are arbitrary nonzero values chosen so that the 16 output bits are
// linearly independent functions of the common sequence. Then the 16-bit
// word runs through all 65535 nonzero values before repeating. (Seeds
// formed by XORing one base value with a constant pattern look different
// but leave the bits linearly dependent, and the word then takes only a
// few thousand values.) The seed values are this design's choice; the
// structure (parallel m-LFSRs, one output bit each, distinct seeds, common
// clock) is the generator's own.
//
// Interface: clk, synchronous active-low reset rst_n, prn_o. No latency
// beyond the LFSR registers: prn_o is valid from the first clock after reset.
module prsg #(
  parameter int unsigned       N_LFSR = rsdc_pkg::PRN_W,
  parameter int unsigned       LFSR_W = 16,
  parameter logic [LFSR_W-1:0] TAPS   = LFSR_W'(16'hB400),
  parameter logic [LFSR_W-1:0] SEEDS [N_LFSR] = '{
    16'h68F3, 16'h52E7, 16'hF2A8, 16'h269F, 16'h6514, 16'hA6A4, 16'h0C5D, 16'h128C,
    16'hD240, 16'h8930, 16'h1819, 16'h5D9E, 16'h9532, 16'h0EDA, 16'hE8E3, 16'h81E8}
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [N_LFSR-1:0] prn_o
);

  for (genvar i = 0; i < int'(N_LFSR); i++) begin : g_lfsr
    logic [LFSR_W-1:0] state_unused;
    m_lfsr #(
      .WIDTH(LFSR_W),
      .TAPS (TAPS),
      .SEED (SEEDS[i])
    ) u_lfsr (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (1'b1),
      .state(state_unused),
      .bit_o(prn_o[i])
    );
  end

endmodule
