// correction_block: applies the calibration look-up table to every sample.
//
// The LUT holds, for each ADC output level k (level n = k - N/2 + 1), the
// signed error value err(n) in LSB with LUT_F fraction bits, as produced by
// eq. (37): corrected = (n - 1/2) - V_offset + (I(n-1-V_offset) + I(n-V_offset))/2.
// The output is corr_out = (n - 1/2) + err(n), signed, LUT_F fraction bits,
// registered: it appears one clock after 'adc_valid'/'adc_code' with
// 'corr_valid'. While 'lut_valid' is low (no calibration has finished yet)
// the LUT is ignored and the block passes the level centres (n - 1/2)
// through unchanged; the LUT memory itself is not reset. The DSP writes entries through 'lut_we'/'lut_addr'/'lut_data'
// while conversion goes on; the document says only that the LUT is "written
// into the Correction Block", the port style and latency are this design's.
module correction_block
  import cal_pkg::*;
#(
  parameter int unsigned QB = Q_BITS,
  parameter int unsigned BW = LUT_W,
  parameter int unsigned OW = OUT_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 adc_valid,
  input  logic [QB-1:0]        adc_code,
  input  logic                 lut_valid,
  input  logic                 lut_we,
  input  logic [QB-1:0]        lut_addr,
  input  logic signed [BW-1:0] lut_data,
  output logic                 corr_valid,
  output logic signed [OW-1:0] corr_out
);

  logic signed [BW-1:0] lut [2**QB];
  logic signed [OW-1:0] centre;

  // (n - 1/2) with n = k - N/2 + 1, in LUT_F fraction bits.
  always_comb begin
    centre = (OW'(signed'({1'b0, adc_code})) - OW'(2**(QB-1)) + OW'(1)) <<< LUT_F;
    centre = centre - OW'(2**(LUT_F-1));
  end

  always_ff @(posedge clk) begin
    if (lut_we) lut[lut_addr] <= lut_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      corr_valid <= 1'b0;
      corr_out   <= '0;
    end else begin
      corr_valid <= adc_valid;
      if (adc_valid) corr_out <= lut_valid ? centre + OW'(lut[adc_code]) : centre;
    end
  end

endmodule
