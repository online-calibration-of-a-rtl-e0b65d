// tb_cal_dsp: self-checking test of the calibration DSP & control.
//
// The DSP is run at 10 bits with M = 8 and R = 25. The testbench plays the
// histogram counters and the memories: when the DSP clears the histograms it
// loads noise-free expected histograms of the two modelled converters (ADC:
// gain 0.95, offset +20 LSB, DNL sigma 0.1; E-ADC: gain 1.03, offset -22 LSB,
// own DNL), for alpha = 1 or 0.494 according to the phase the DSP selects,
// and it pulses sample_valid until the DSP has counted its N_SAMPLES.
//
// After one cycle each result is compared with a reference computed here from
// the same histograms: the mapping e_a - a and f_a (exact), the preconditioned
// histogram H_e' (exact), the offset (to 2^-14 LSB), alpha (to 1e-5), every
// INL value (to 0.02 LSB) and every LUT entry (to 0.03 LSB). The reference
// evaluates the equations in real arithmetic; only the positions alpha^p v_n
// are stepped in the DSP's 16-bit-fraction format so that both end the
// product at the same term. Finally the corrected level centres (level
// centre plus LUT entry) are compared with the true centres of the modelled
// ADC's code intervals over the central half of the range: with noise-free
// histograms the RMS error must be below 1 LSB (it is about 20 LSB before
// correction). The cycle count of the calibration is checked
// against the collection length, and the phase sequence (mismatch, then
// nonlinearity, then mismatch again for the next cycle) is checked.
module tb_cal_dsp;
  import cal_pkg::*;
  import adc_model_pkg::*;

  localparam int  QB = 10;
  localparam int  N  = 1 << QB;
  localparam int  NS = 40;
  localparam int  MA = 8;
  localparam int  RT = 25;
  localparam real ALPHA = 0.494;
  localparam real TOTAL = 5.0e6;
  localparam real SIGMA = real'(N) / 6.0;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, sample_valid = 1'b0;
  phase_e phase;
  logic hist_clear, hist_clear_busy = 1'b0, hist_count_en;
  logic [QB-1:0] ha_addr, he_addr, map_waddr, map_raddr, hep_waddr, hep_raddr, inl_waddr, inl_raddr, lut_addr;
  logic [CNT_W-1:0] ha_data, he_data;
  logic map_we, hep_we, inl_we, lut_we;
  logic [MAP_W-1:0] map_wdata, map_rdata;
  logic [HV_W-1:0] hep_wdata, hep_rdata, ak_est;
  logic signed [INL_W-1:0] inl_wdata, inl_rdata;
  logic signed [LUT_W-1:0] lut_data;
  logic signed [POS_W-1:0] offset_est;
  logic offset_found, cal_done;
  logic [ALPHA_W-1:0] alpha_est;
  logic [15:0] cal_count;

  cal_dsp #(.QB(QB), .N_SAMPLES(NS), .M_AVG(MA), .R_TERMS(RT)) dut (.*);

  always #5 clk = ~clk;

  // memories played by the testbench
  logic [CNT_W-1:0] ha_mem [N], he_mem [N];
  logic [MAP_W-1:0] map_mem [N];
  logic [HV_W-1:0]  hep_mem [N];
  logic signed [INL_W-1:0] inl_mem [N];
  logic signed [LUT_W-1:0] lut_mem [N];
  int h1a [N], h1e [N], h2a [N], h2e [N];
  int n_phase_switch = 0;

  assign ha_data   = ha_mem[ha_addr];
  assign he_data   = he_mem[he_addr];
  assign map_rdata = map_mem[map_raddr];
  assign hep_rdata = hep_mem[hep_raddr];
  assign inl_rdata = inl_mem[inl_raddr];

  always @(posedge clk) begin
    if (map_we) map_mem[map_waddr] <= map_wdata;
    if (hep_we) hep_mem[hep_waddr] <= hep_wdata;
    if (inl_we) inl_mem[inl_waddr] <= inl_wdata;
    if (lut_we) lut_mem[lut_addr]  <= lut_data;
  end

  // histogram "counters": a clear loads the histogram of the selected phase
  always @(posedge clk) begin
    if (hist_clear) begin
      for (int k = 0; k < N; k++) begin
        ha_mem[k] <= CNT_W'((phase == PHASE_MISMATCH) ? h1a[k] : h2a[k]);
        he_mem[k] <= CNT_W'((phase == PHASE_MISMATCH) ? h1e[k] : h2e[k]);
      end
      hist_clear_busy <= 1'b1;
    end else if (hist_clear_busy) hist_clear_busy <= 1'b0;
    sample_valid <= ($urandom_range(1) == 1);
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- reference
  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic real interp(input real h[], input real x);
    int  k;
    real f, h0, h1;
    k  = $floor(x);
    f  = x - real'(k);
    h0 = (k >= 0 && k < N) ? h[k] : 0.0;
    h1 = (k + 1 >= 0 && k + 1 < N) ? h[k + 1] : 0.0;
    return h0 + f * (h1 - h0);
  endfunction

  function automatic real interp_i(input real v[], input real x);
    int  k;
    real f;
    k = $floor(x);
    f = x - real'(k);
    return ((k < 0) ? v[0] : (k > N - 1) ? v[N - 1] : v[k]) * (1.0 - f)
         + ((k + 1 < 0) ? v[0] : (k + 1 > N - 1) ? v[N - 1] : v[k + 1]) * f;
  endfunction

  initial begin
    adc_model adc, eadc;
    longint sa[N + 1], se[N + 1];
    int     e_ref[N + 1], f_ref[N + 1];
    longint hep_ref[N];
    real    ha_r[], he_r[], inl_r[];
    real    voff, alpha, ak, suma, sume, icur, lut_ref, dd;
    longint dl, dl1, dprev;
    int     l_off, t_start, t_end, nth;
    bit     found;

    adc  = new(QB, 0.95, 20.0, 0.1);
    eadc = new(QB, 1.03, -22.0, 0.1);
    for (int k = 0; k < N; k++) begin
      h1a[k] = int'(adc.expected_hits(k, TOTAL, SIGMA, 1.0));
      h1e[k] = int'(eadc.expected_hits(k, TOTAL, SIGMA, 1.0));
      h2a[k] = int'(adc.expected_hits(k, TOTAL, SIGMA, 1.0));
      h2e[k] = int'(eadc.expected_hits(k, TOTAL, SIGMA, ALPHA));
    end
    // the two converters see the same samples: equal totals
    begin
      longint ta, te;
      ta = 0; te = 0;
      for (int k = 0; k < N; k++) begin ta += h1a[k]; te += h1e[k]; end
      h1e[N / 2] += int'(ta - te);
      ta = 0; te = 0;
      for (int k = 0; k < N; k++) begin ta += h2a[k]; te += h2e[k]; end
      h2e[N / 2] += int'(ta - te);
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(phase == PHASE_MISMATCH, "idle phase");
    enable = 1'b1;
    t_start = 0;
    fork
      begin : phases
        phase_e last;
        last = phase;
        forever begin
          @(negedge clk);
          t_start++;
          if (phase != last) n_phase_switch++;
          last = phase;
        end
      end
      @(posedge cal_done);
    join_any
    disable phases;
    t_end = t_start;
    @(negedge clk);
    enable = 1'b0;

    // ---- mapping, eqs. (9)-(11)
    sa[0] = 0; se[0] = 0;
    for (int k = 0; k < N; k++) begin
      sa[k + 1] = sa[k] + h1a[k];
      se[k + 1] = se[k] + h1e[k];
    end
    for (int a = 0; a < N; a++) begin
      int e;
      e = N - 1;
      for (int j = N - 1; j >= 0; j--) if (se[j + 1] > sa[a]) e = j;
      e_ref[a] = e;
      if (h1e[e] == 0 || se[e + 1] <= sa[a]) f_ref[a] = 0;
      else f_ref[a] = int'(((se[e + 1] - sa[a]) * 65536) / h1e[e]);
      if (f_ref[a] > 65536) f_ref[a] = 65536;
      check(int'(signed'(map_mem[a][MAP_W-1 -: MAP_X_W])) == e - a, $sformatf("e_%0d", a));
      check(int'(map_mem[a][MAP_F_W-1:0]) == f_ref[a], $sformatf("f_%0d: %0d vs %0d", a, map_mem[a][MAP_F_W-1:0], f_ref[a]));
    end
    e_ref[N] = N; f_ref[N] = 65536;

    // ---- preconditioning, eq. (12)
    ha_r = new[N]; he_r = new[N]; inl_r = new[N];
    for (int a = 0; a < N; a++) begin
      longint acc;
      acc = 0;
      if (e_ref[a] == e_ref[a + 1]) acc = longint'(f_ref[a] > f_ref[a + 1] ? f_ref[a] - f_ref[a + 1] : 0) * h2e[e_ref[a]];
      else begin
        acc = longint'(f_ref[a]) * h2e[e_ref[a]];
        for (int n = e_ref[a] + 1; n < e_ref[a + 1] && n < N; n++) acc += longint'(65536) * h2e[n];
        if (e_ref[a + 1] < N) acc += longint'(65536 - f_ref[a + 1]) * h2e[e_ref[a + 1]];
      end
      hep_ref[a] = acc >>> 8;
      check(longint'(hep_mem[a]) == hep_ref[a], $sformatf("H_e'(%0d): %0d vs %0d", a, hep_mem[a], hep_ref[a]));
      ha_r[a] = real'(h2a[a]);
      he_r[a] = real'(hep_ref[a]) / 256.0;
    end

    // ---- offset, eqs. (20)-(22)
    found = 1'b0; dprev = 0; dl = 0; l_off = 0; voff = 0.0;
    for (int l = 0; l < N && !found; l++) begin
      dl1 = dprev + longint'(h2a[l]) * 256 - hep_ref[l];
      if (dprev > 0 && dl1 <= 0) begin
        found = 1'b1;
        voff = real'(l - N / 2) + real'(dprev) / real'(dprev - dl1);
      end
      dprev = dl1;
    end
    check(found == offset_found, "offset change of sign");
    check(fabs(real'(offset_est) / 65536.0 - voff) < 1.0 / 16384.0,
          $sformatf("offset %f vs %f", real'(offset_est) / 65536.0, voff));

    // ---- alpha, eq. (27), and alpha*k, eq. (33)
    suma = 0.0; sume = 0.0;
    for (int p = 1; p <= MA; p++) begin
      suma += interp(ha_r, real'(p) + voff + N / 2 - 1) + interp(ha_r, real'(1 - p) + voff + N / 2 - 1);
      sume += interp(he_r, real'(p) + voff + N / 2 - 1) + interp(he_r, real'(1 - p) + voff + N / 2 - 1);
    end
    alpha = suma / sume;
    ak    = suma / (2.0 * MA);
    check(fabs(real'(alpha_est) / real'(1 << ALPHA_F) - alpha) < 1.0e-5,
          $sformatf("alpha %f vs %f", real'(alpha_est) / real'(1 << ALPHA_F), alpha));
    check(fabs(real'(ak_est) / 256.0 - ak) < 0.01, $sformatf("alpha*k %f vs %f", real'(ak_est) / 256.0, ak));

    // ---- INL, eq. (36), and LUT, eq. (37)
    inl_r[N / 2 - 1] = 0.0;
    for (int dir = 0; dir < 2; dir++) begin
      icur = 0.0;
      for (int n = (dir == 0) ? 1 : 0; (dir == 0) ? n <= N / 2 : n >= -N / 2 + 2; n += (dir == 0) ? 1 : -1) begin
        real    prod, yr;
        longint yfx;
        prod = interp(ha_r, real'(n) + voff + N / 2 - 1) / ak;
        yfx  = (longint'(n) <<< 16) - 32768;
        for (int p = 1; p <= RT; p++) begin
          real hA, hE;
          yfx = (yfx * longint'(alpha_est)) >>> ALPHA_F;
          if (yfx < 32768 && yfx > -32768) break;
          yr = real'(yfx) / 65536.0;
          hA = interp(ha_r, yr + voff + N / 2 - 0.5);
          hE = interp(he_r, yr + voff + N / 2 - 0.5);
          if (alpha * hE >= 1.0 / 256.0) prod = prod * hA / (alpha * hE);
        end
        dd = prod - 1.0;
        if (dir == 0) begin icur += dd; inl_r[n + N / 2 - 1] = icur; end
        else          begin icur -= dd; inl_r[n + N / 2 - 2] = icur; end
      end
    end
    for (int k = 0; k < N; k++)
      check(fabs(real'(inl_mem[k]) / 65536.0 - inl_r[k]) < 0.02,
            $sformatf("I(%0d): %f vs %f", k - N / 2 + 1, real'(inl_mem[k]) / 65536.0, inl_r[k]));
    for (int k = 0; k < N; k++) begin
      lut_ref = -voff + 0.5 * (interp_i(inl_r, real'(k - 1) - voff) + interp_i(inl_r, real'(k) - voff));
      check(fabs(real'(lut_mem[k]) / 256.0 - lut_ref) < 0.03,
            $sformatf("LUT(%0d): %f vs %f", k, real'(lut_mem[k]) / 256.0, lut_ref));
    end

    begin
      real se2, su2; int nn;
      se2 = 0; su2 = 0; nn = 0;
      for (int k = 0; k < N; k++) begin
        real mid, c;
        mid = adc.midpoint(k);
        if (mid > -N/4 && mid < N/4) begin
          c = real'(k - N/2) + 0.5 + real'(lut_mem[k]) / 256.0 - mid;
          se2 += c*c; su2 += (real'(k - N/2) + 0.5 - mid)**2; nn++;
        end
      end
      $display("against the model: rms error corrected %f LSB, uncorrected %f LSB", $sqrt(se2/nn), $sqrt(su2/nn));
      check($sqrt(se2/nn) < 1.0, "corrected codes not within 1 LSB rms of the model");
    end
    // ---- control: phases and cycle length
    check(n_phase_switch == 1, $sformatf("phase switches %0d", n_phase_switch));
    check(phase == PHASE_MISMATCH, "next cycle does not start with mismatch estimation");
    check(cal_count == 16'd1, "cal_count");
    // two collections of NS valid samples (about 2*NS clocks each) plus the
    // processing, bounded by the figures in the DSP's timing note
    nth = 2 * (2 * NS + 20) + 3 * N + 6 * N + 3 * N + N * RT * 100 + 8 * N;
    check(t_end > 2 * NS && t_end < nth, $sformatf("cycle took %0d clocks", t_end));
    $display("cycle length %0d clocks, offset %f, alpha %f", t_end, voff, alpha);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
