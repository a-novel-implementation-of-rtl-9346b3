// udiv_seq: unsigned restoring divider, one quotient bit per clock.
//
// A start pulse loads dividend and divisor; N_W clocks later done pulses
// for one clock and quotient holds floor(dividend / divisor) until the next
// start. The partial remainder shifts in one dividend bit per clock and the
// divisor is subtracted whenever it fits. A zero divisor gives an all-ones
// quotient. A start while busy restarts the division.
//
// Interface: clk, synchronous active-low rst_n, start, dividend (N_W bits),
// divisor (D_W bits); busy, done, quotient (N_W bits). Latency N_W clocks.
module udiv_seq #(
  parameter int unsigned N_W = 27,
  parameter int unsigned D_W = 20
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N_W-1:0] dividend,
  input  logic [D_W-1:0] divisor,
  output logic           busy,
  output logic           done,
  output logic [N_W-1:0] quotient
);
  localparam int unsigned SW = $clog2(N_W + 1);

  logic [N_W-1:0] num;    // dividend bits not yet shifted in
  logic [D_W-1:0] den;
  logic [D_W-1:0] rem;    // partial remainder, always below the divisor
  logic [SW-1:0]  steps;  // quotient bits still to produce
  logic [D_W:0]   trial;
  logic           fits;

  always_comb begin
    trial = {rem, num[N_W-1]};
    fits  = (trial >= {1'b0, den});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      num      <= '0;
      den      <= '0;
      rem      <= '0;
      steps    <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      quotient <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        num      <= dividend;
        den      <= divisor;
        rem      <= '0;
        steps    <= SW'(N_W);
        busy     <= 1'b1;
        quotient <= '0;
      end else if (busy) begin
        num      <= {num[N_W-2:0], 1'b0};
        rem      <= fits ? D_W'(trial - {1'b0, den}) : D_W'(trial);
        quotient <= {quotient[N_W-2:0], fits};
        steps    <= steps - 1'b1;
        if (steps == SW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
