// tb_m_lfsr: self-checking test of the 16-stage maximum-length LFSR.
//
// A reference register q[1..16] (stage 1 leftmost, stage 16 the output)
// is shifted right with q[1] = q[16]^q[14]^q[13]^q[11] and compared with
// the design every clock. The test also checks that the enable holds the
// state, that the state never becomes zero and that the sequence returns
// to its seed after exactly 2^16-1 = 65535 clocks and not earlier.
module tb_m_lfsr;
  localparam logic [15:0] SEED = 16'h68F3;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        en;
  logic [15:0] state;
  logic        bit_o;
  int          checks = 0, failures = 0;

  m_lfsr dut (.clk(clk), .rst_n(rst_n), .en(en), .state(state), .bit_o(bit_o));

  always #5 clk = ~clk;

  initial begin
    repeat (70000) @(posedge clk);
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

  logic q [1:16];
  logic fb;
  int   period;

  function automatic logic [15:0] packed_q();
    logic [15:0] v;
    for (int k = 1; k <= 16; k++) v[16-k] = q[k];
    return v;
  endfunction

  initial begin
    rst_n = 1'b0; en = 1'b0;
    for (int k = 1; k <= 16; k++) q[k] = SEED[16-k];
    @(posedge clk); #1;
    rst_n = 1'b1;
    check(state == SEED, "seed loaded at reset");
    // leftmost stage shows the seed's first printed bit (0), output its last (1)
    check(state[15] == 1'b0 && bit_o == 1'b1, "seed bit order");

    // hold
    repeat (3) @(posedge clk); #1;
    check(state == SEED, "enable low holds state");

    en = 1'b1;
    period = 0;
    for (int n = 1; n <= 65535; n++) begin
      @(posedge clk); #1;
      fb = q[16] ^ q[14] ^ q[13] ^ q[11];
      for (int k = 16; k >= 2; k--) q[k] = q[k-1];
      q[1] = fb;
      if (n <= 3000) begin
        check(state == packed_q(), $sformatf("state step %0d", n));
        check(bit_o == q[16], $sformatf("output bit step %0d", n));
      end
      if (state == '0) check(1'b0, "state reached zero");
      if (state == SEED && period == 0) period = n;
    end
    check(period == 65535, $sformatf("period %0d, expected 65535", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
