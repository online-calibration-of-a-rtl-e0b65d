// tb_online_cal_adc: end-to-end test of the self-calibrating ADC system.
//
// Behavioural models stand for the analog parts: the ADC under calibration
// (gain 0.95, offset +20 LSB, DNL sigma 0.1 LSB), the E-ADC (gain 1.03,
// offset -22 LSB, independent DNL), the attenuator (alpha = 0.494) and the
// switch S, which the design drives through 'phase'. The input is normal with
// sigma = F/6, F being the full scale. These are the conditions of the
// document's simulation, and the design runs at its default parameters
// (12 bits, 5e6 samples per phase, M = 8, R = 25): one complete calibration
// cycle takes about 15 million clocks.
//
// Checks: before the first LUT is written the output is the plain level
// centre. After one cycle the estimated offset is within 1.5 LSB of the
// modelled +20 LSB and alpha within 0.008 of 0.494 (the binomial spread of
// the alpha estimate at this sample count is about 0.002). Every converted
// sample in the central half of the range is compared with the centre of the
// code's real input interval: the mean error must be below 6 LSB (it is 20
// uncorrected), the RMS error at most half the uncorrected one, and no sample
// may be off by 25 LSB.
// These bounds are loose because the INL estimate amplifies the statistical
// error of alpha (see README). Conversion is checked to continue while
// calibration runs. The mechanisms counted: both phases of switch S, the
// three mapping cases of the mismatch estimation (e_a+1 = e_a, = e_a + 1,
// > e_a + 1), the change of sign in the offset search, LUT writes, and
// corrected output delivered during a collection.
module tb_online_cal_adc;
  import cal_pkg::*;
  import adc_model_pkg::*;

  localparam int          QB   = Q_BITS;
  localparam int          NS   = 5_000_000;   // the design's default N_SAMPLES
  localparam int          N    = 1 << QB;
  localparam real         ALPHA = 0.494;
  localparam real         SIGMA = real'(N) / 6.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enable = 1'b0;
  logic adc_valid = 1'b0;
  logic [QB-1:0] adc_code = '0, eadc_code = '0;
  phase_e phase;
  logic corr_valid;
  logic signed [OUT_W-1:0] corr_out;
  logic signed [POS_W-1:0] offset_est;
  logic offset_found;
  logic [ALPHA_W-1:0] alpha_est;
  logic cal_done;
  logic [15:0] cal_count;

  online_cal_adc dut (
    .clk, .rst_n, .enable, .adc_valid, .adc_code, .eadc_code, .phase,
    .corr_valid, .corr_out, .offset_est, .offset_found, .alpha_est, .cal_done, .cal_count
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_phase_mm = 0, n_phase_nl = 0, n_case1 = 0, n_case2 = 0, n_case3 = 0;
  int n_lut_wr = 0, n_out_during_cal = 0, n_offset_found = 0;
  adc_model adc, eadc;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample source
  logic [QB-1:0] code_d;
  logic          valid_d;
  always @(posedge clk) begin
    real u;
    if (rst_n) begin
      u         = SIGMA * randn();
      adc_valid <= ($urandom_range(15) != 0);
      adc_code  <= QB'(adc.convert(u));
      eadc_code <= QB'(eadc.convert((phase == PHASE_MISMATCH) ? u : ALPHA * u));
    end
    code_d  <= adc_code;
    valid_d <= adc_valid;
  end

  int prev_e = 0;

  initial begin
    int   a_e;
    real  sum_c, sum_u, sum_b, sc, su;
    int   nc;
    adc  = new(QB, 0.95, 20.0, 0.1);
    eadc = new(QB, 1.03, -22.0, 0.1);
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // before calibration: output = level centre (n - 1/2), LSB_F fraction bits
    repeat (50) begin
      @(negedge clk);
      if (valid_d && corr_valid)
        check(int'(corr_out) == ((int'(code_d) - N / 2 + 1) * (1 << LUT_F)) - (1 << (LUT_F - 1)),
              "uncalibrated output is not the level centre");
    end

    enable <= 1'b1;
    // follow the cycle
    fork
      begin : mon
        forever begin
          @(posedge clk);
          if (dut.u_dsp.map_we) begin
            a_e = int'(dut.u_dsp.map_waddr) + int'(signed'(dut.u_dsp.map_wdata[MAP_W-1 -: MAP_X_W]));
            if (dut.u_dsp.map_waddr != 0) begin
              if (a_e == prev_e) n_case1++;
              else if (a_e == prev_e + 1) n_case2++;
              else if (a_e > prev_e + 1) n_case3++;
            end
            prev_e = a_e;
          end
          if (dut.u_dsp.hist_count_en && phase == PHASE_MISMATCH && dut.u_dsp.smp_cnt == 0) n_phase_mm++;
          if (dut.u_dsp.hist_count_en && phase == PHASE_NONLINEARITY && dut.u_dsp.smp_cnt == 0) n_phase_nl++;
          if (dut.u_dsp.lut_we) n_lut_wr++;
          if (dut.u_dsp.hist_count_en && corr_valid) n_out_during_cal++;
        end
      end
      begin
        @(posedge cal_done);
      end
    join_any
    disable mon;
    @(posedge clk);
    if (offset_found) n_offset_found++;

    $display("offset_est = %f LSB, alpha_est = %f", real'(offset_est) / 65536.0,
             real'(alpha_est) / real'(1 << ALPHA_F));
    check(offset_found, "offset sign change not found");
    check(real'(offset_est) / 65536.0 > 18.5 && real'(offset_est) / 65536.0 < 21.5, "offset estimate");  // +20 modelled
    check(real'(alpha_est) / real'(1 << ALPHA_F) > ALPHA - 0.008 &&
          real'(alpha_est) / real'(1 << ALPHA_F) < ALPHA + 0.008, "alpha estimate");
    check(cal_count == 16'd1, "calibration count");
    check(phase == PHASE_MISMATCH, "new cycle starts with mismatch estimation");

    // corrected output against the real centre of each code's interval
    sum_c = 0.0; sum_u = 0.0; sum_b = 0.0; nc = 0;
    repeat (20000) begin
      @(negedge clk);
      if (corr_valid && valid_d) begin
        real mid;
        mid = adc.midpoint(int'(code_d));
        if (mid > -real'(N) / 4.0 && mid < real'(N) / 4.0) begin
          sc  = real'(corr_out) / real'(1 << LUT_F) - mid;
          su  = real'(int'(code_d) - N / 2) + 0.5 - mid;
          sum_c += sc * sc;
          sum_u += su * su;
          nc++;
          check(sc < 25.0 && sc > -25.0, $sformatf("corrected error %f at code %0d", sc, code_d));
          sum_b += sc;
        end
      end
    end
    $display("rms error: uncorrected %f LSB, corrected %f LSB over %0d samples",
             $sqrt(sum_u / nc), $sqrt(sum_c / nc), nc);
    $display("mean corrected error %f LSB", sum_b / nc);
    check(sum_b / nc < 6.0 && sum_b / nc > -6.0, "offset left in the corrected output");
    check($sqrt(sum_c / nc) * 2.0 < $sqrt(sum_u / nc), "rms improvement");

    $display("mechanisms: mismatch phase %0d, nonlinearity phase %0d, map cases %0d/%0d/%0d, offset found %0d, lut writes %0d, outputs during collection %0d",
             n_phase_mm, n_phase_nl, n_case1, n_case2, n_case3, n_offset_found, n_lut_wr, n_out_during_cal);
    check(n_phase_mm > 0, "mismatch phase never ran");
    check(n_phase_nl > 0, "nonlinearity phase never ran");
    check(n_case1 > 0, "mapping case e_a+1 = e_a never seen");
    check(n_case2 > 0, "mapping case e_a+1 = e_a + 1 never seen");
    check(n_case3 > 0, "mapping case e_a+1 > e_a + 1 never seen");
    check(n_offset_found > 0, "offset change of sign never seen");
    check(n_lut_wr == N, "LUT not fully written");
    check(n_out_during_cal > 0, "conversion stopped during calibration");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
