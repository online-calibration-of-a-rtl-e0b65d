// online_cal_adc: digital part of the self-calibrating ADC system.
//
// Two converters sample the same input on every clock: the ADC under
// calibration ('adc_code') and the extra E-ADC ('eadc_code'), whose input the
// analog switch S takes either straight from the input (mismatch estimation)
// or through the nominal 0.5 attenuator (nonlinearity estimation). This block
// drives S through 'phase' and contains the rest of the calibration
// processor:
//   - two histogram counters (one per converter),
//   - three working memories: ADC/E-ADC mapping, preconditioned E-ADC
//     histogram, INL values,
//   - the DSP & control sequencer (cal_dsp),
//   - the correction block, whose LUT maps each ADC code to its corrected
//     value.
// Conversion is never interrupted: 'corr_out' follows 'adc_code' one clock
// later with 'corr_valid', and the LUT is rewritten at the end of every
// calibration cycle while 'enable' is high. Both converter codes are offset
// binary (code 0 = lowest level) and are taken together, qualified by
// 'adc_valid'. The partition into counters, memory, DSP & control and
// correction block follows the document's block diagram; the separate
// memory for the preconditioned histogram and the interfaces between the
// parts are this design's.
//
// Lint note: the DSP's alpha*k estimate is an internal intermediate that is
// not brought out of the top, so it is reported as unused here.
module online_cal_adc
  import cal_pkg::*;
#(
  parameter int unsigned QB        = Q_BITS,
  parameter int unsigned N_SAMPLES = 5_000_000,
  parameter int unsigned M_AVG     = 8,
  parameter int unsigned R_TERMS   = 25
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic                    adc_valid,
  input  logic [QB-1:0]           adc_code,
  input  logic [QB-1:0]           eadc_code,
  output phase_e                  phase,
  output logic                    corr_valid,
  output logic signed [OUT_W-1:0] corr_out,
  output logic signed [POS_W-1:0] offset_est,
  output logic                    offset_found,
  output logic [ALPHA_W-1:0]      alpha_est,
  output logic                    cal_done,
  output logic [15:0]             cal_count
);

  logic              hist_clear, clr_busy_a, clr_busy_e, count_en;
  logic [QB-1:0]     ha_addr, he_addr;
  logic [CNT_W-1:0]  ha_data, he_data;
  logic              map_we, hep_we, inl_we, lut_we;
  logic [QB-1:0]     map_waddr, map_raddr, hep_waddr, hep_raddr, inl_waddr, inl_raddr, lut_addr;
  logic [MAP_W-1:0]  map_wdata, map_rdata;
  logic [HV_W-1:0]   hep_wdata, hep_rdata, ak_est;
  logic signed [INL_W-1:0] inl_wdata, inl_rdata;
  logic signed [LUT_W-1:0] lut_data;

  hist_counter #(.QB(QB), .CW(CNT_W)) u_hist_adc (
    .clk, .rst_n, .clear(hist_clear), .clear_busy(clr_busy_a), .count_en,
    .sample_valid(adc_valid), .sample_code(adc_code), .rd_addr(ha_addr), .rd_data(ha_data)
  );

  hist_counter #(.QB(QB), .CW(CNT_W)) u_hist_eadc (
    .clk, .rst_n, .clear(hist_clear), .clear_busy(clr_busy_e), .count_en,
    .sample_valid(adc_valid), .sample_code(eadc_code), .rd_addr(he_addr), .rd_data(he_data)
  );

  cal_ram #(.AW(QB), .W(MAP_W)) u_map_mem (
    .clk, .we(map_we), .waddr(map_waddr), .wdata(map_wdata), .raddr(map_raddr), .rdata(map_rdata)
  );

  cal_ram #(.AW(QB), .W(HV_W)) u_hep_mem (
    .clk, .we(hep_we), .waddr(hep_waddr), .wdata(hep_wdata), .raddr(hep_raddr), .rdata(hep_rdata)
  );

  cal_ram #(.AW(QB), .W(INL_W)) u_inl_mem (
    .clk, .we(inl_we), .waddr(inl_waddr), .wdata(inl_wdata), .raddr(inl_raddr), .rdata(inl_rdata)
  );

  cal_dsp #(.QB(QB), .N_SAMPLES(N_SAMPLES), .M_AVG(M_AVG), .R_TERMS(R_TERMS)) u_dsp (
    .clk, .rst_n, .enable, .sample_valid(adc_valid), .phase,
    .hist_clear, .hist_clear_busy(clr_busy_a | clr_busy_e), .hist_count_en(count_en),
    .ha_addr, .ha_data, .he_addr, .he_data,
    .map_we, .map_waddr, .map_wdata, .map_raddr, .map_rdata,
    .hep_we, .hep_waddr, .hep_wdata, .hep_raddr, .hep_rdata,
    .inl_we, .inl_waddr, .inl_wdata, .inl_raddr, .inl_rdata,
    .lut_we, .lut_addr, .lut_data,
    .offset_est, .offset_found, .alpha_est, .ak_est, .cal_done, .cal_count
  );

  correction_block #(.QB(QB), .BW(LUT_W), .OW(OUT_W)) u_corr (
    .clk, .rst_n, .adc_valid, .adc_code, .lut_valid(cal_count != '0), .lut_we, .lut_addr, .lut_data, .corr_valid, .corr_out
  );

endmodule
