// adc_model: behavioural model (not synthesizable) of an external 8-bit
// ADC with a WR-then-RD interface.
//
// A falling edge of wr_n with cs_n low arms the converter; the rising edge
// of wr_n samples the input voltage vin_mv (millivolts) and starts a
// conversion of T_CONV_NS. While cs_n and rd_n are low the output buffers
// drive the result onto data after T_ACC_NS; otherwise data reads 0 (a
// two-state stand-in for the released bus). Reading before the conversion
// has finished returns the previous result and counts an early read.
// code = round(vin_mv * 255 / VFS_MV), limited to 0..255.
module adc_model #(
  parameter int unsigned VFS_MV    = 5000,
  parameter int unsigned T_CONV_NS = 150,
  parameter int unsigned T_ACC_NS  = 30
) (
  input  logic        cs_n,
  input  logic        wr_n,
  input  logic        rd_n,
  input  int unsigned vin_mv,
  output logic [7:0]  data,
  output int unsigned conversions,
  output int unsigned early_reads,
  output logic [7:0]  last_code
);
  logic       armed = 1'b0;
  logic       converting = 1'b0;
  logic [7:0] result = 8'h00;
  logic       buf_on = 1'b0;

  function automatic logic [7:0] to_code(input int unsigned mv);
    longint unsigned c;
    c = (longint'(mv) * 255 + VFS_MV / 2) / VFS_MV;
    return (c > 255) ? 8'hFF : 8'(c);
  endfunction

  initial begin
    conversions = 0;
    early_reads = 0;
    last_code   = 8'h00;
  end

  always @(negedge wr_n) if (!cs_n) armed = 1'b1;

  always @(posedge wr_n) begin
    if (armed) begin
      armed      = 1'b0;
      last_code  = to_code(vin_mv);
      converting = 1'b1;
      #(T_CONV_NS * 1ns);
      result      = last_code;
      converting  = 1'b0;
      conversions = conversions + 1;
    end
  end

  always @(negedge rd_n) begin
    if (!cs_n) begin
      if (converting) early_reads = early_reads + 1;
      #(T_ACC_NS * 1ns);
      if (!rd_n && !cs_n) buf_on = 1'b1;
    end
  end

  always @(posedge rd_n or posedge cs_n) buf_on = 1'b0;

  assign data = buf_on ? result : 8'h00;
endmodule
