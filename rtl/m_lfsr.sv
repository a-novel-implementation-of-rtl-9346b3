// m_lfsr: maximum-length linear feedback shift register (Fibonacci form).
//
// The register is drawn as a row of WIDTH stages numbered 1 (leftmost) to
// WIDTH (rightmost). Every clock the contents move one stage to the right,
// the rightmost stage is the pseudorandom output bit, and the tapped stages
// (the output stage among them) are XORed together and fed back into the
// leftmost stage. Here stage k is held in state[WIDTH-k], so the output is
// state[0] and the feedback enters state[WIDTH-1].
//
// The 16-stage default uses taps 16,14,13,11 (x^16+x^14+x^13+x^11+1), a
// primitive polynomial, so the sequence repeats only after 2^16-1 clocks.
// The tap positions are this design's choice; the shift direction, the
// feedback into the leftmost bit and the one output bit per register follow
// the generator it belongs to. SEED is loaded at reset and must be nonzero.
//
// Interface: clk, synchronous active-low reset rst_n, enable en (shift when
// high), state (all stages) and bit_o (stage WIDTH). One bit per clock.
module m_lfsr #(
  parameter int unsigned     WIDTH = 16,
  parameter logic [WIDTH-1:0] TAPS = WIDTH'(16'hB400),
  parameter logic [WIDTH-1:0] SEED = WIDTH'(16'h68F3)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] state,
  output logic             bit_o
);
  // TAPS is written polynomial-style: bit (k-1) set means stage k is tapped.
  // 16'hB400 sets bits 15,13,12,10 -> stages 16,14,13,11.
  logic fb;

  always_comb begin
    fb = 1'b0;
    for (int k = 1; k <= int'(WIDTH); k++) begin
      if (TAPS[k-1]) fb ^= state[int'(WIDTH)-k];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {fb, state[WIDTH-1:1]};
  end

  assign bit_o = state[0];

  initial assert (SEED != '0) else $error("m_lfsr: SEED must be nonzero");
endmodule
