// cal_dsp: the "DSP & control" of the calibration processor.
//
// It runs the calibration cycle again and again while 'enable' is high:
//
//   1. mismatch estimation: 'phase' = PHASE_MISMATCH (switch S bypasses the
//      attenuator, alpha = 1), both histograms are cleared and N_SAMPLES
//      samples counted; then the ADC/E-ADC mapping is computed from the
//      accumulated histograms S_a*, S_e*: for each ADC level a the first
//      E-ADC level e_a with S_e*(e_a) <= S_a*(a) < S_e*(e_a+1) and the
//      fraction f_a = (S_e*(e_a+1) - S_a*(a)) / H_e*(e_a)  (eqs. 9-11).
//      e_a - a and f_a are written to the mapping memory.
//   2. nonlinearity estimation: 'phase' = PHASE_NONLINEARITY (alpha ~ 0.5),
//      histograms cleared and N_SAMPLES samples counted again.
//   3. preconditioning (eq. 12): H_e'(a) = f_a H_e(e_a) + sum of the whole
//      E-ADC bins strictly between e_a and e_a+1 + (1 - f_a+1) H_e(e_a+1),
//      or (f_a - f_a+1) H_e(e_a) when e_a = e_a+1; written to the H_e'
//      memory. The ADC histogram is used as it is.
//   4. offset (eqs. 18-22): dS'(l) = S_a'(l) - S_e'(l) is scanned upward for
//      the change of sign dS'(l) > 0, dS'(l+1) <= 0, and
//      V_off = (n_off - 1) + |dS'(n_off)| / (|dS'(n_off)| + |dS'(n_off+1)|).
//   5. alpha and alpha*k (eqs. 27, 33) from M levels either side of the
//      offset-shifted origin.
//   6. INL (eq. 36, the explicit form): for each level n
//      1 + D(n) = H_A(n)/(alpha k) * prod_{p=1..R} H_A(alpha^p v_n) / (alpha H_E(alpha^p v_n)),
//      with I(0) = 0, I(n) = I(n-1) + D(n) for n = 1..N/2, then
//      I(n-1) = I(n) - D(n) for n = 0 down to -N/2+2. Written to the INL memory.
//   7. LUT (eq. 37): err(n) = -V_off + (I(n-1-V_off) + I(n-V_off)) / 2, written
//      into the correction block.
//
// H_A, H_E are the histograms shifted to the offset and linearly interpolated
// between level centres: level index k stands for level n = k - N/2 + 1 with
// centre n - 1/2 LSB, so amplitude v (LSB) sits at index
// v + V_off + N/2 - 1/2. Values outside the N levels read as zero; the INL is
// held at its end values outside the levels.
//
// The steps, equations, M and R follow the document. This design's own
// choices: the fixed-point formats of cal_pkg, one shared shift-subtract
// divider (DIV_NW clocks per division), one memory read per clock through
// registered addresses, a factor of the product being skipped (taken as 1)
// when its denominator alpha*H_E is zero, the product being ended once
// alpha^p v_n comes within 1/2 LSB of the origin (there each factor is
// H_A(0) / (alpha H_E(0)) = 1 by eq. (26); evaluating it from single noisy
// bins instead would multiply the same error up to R times), and the
// explicit eq. (36) being
// used for every level (no implicit iteration of eq. (35) near n = 0).
//
// Timing, N = 2^QB: each collection takes 2^QB clear cycles plus N_SAMPLES
// valid samples; mapping about 3N cycles, preconditioning about 5N, offset
// 2N, INL about N * R * (DIV_NW + 10), LUT about 7N.
//
// Lint notes: the divider's 'busy' and remainder outputs are not needed here
// (the FSM waits on 'done' and uses only the quotient), and 'dval', which
// holds D(n) = quotient - 1, is one bit wider than the INL accumulator so the
// subtraction cannot wrap; only its low INL_W bits are added, so its top bit
// is reported as unused.
module cal_dsp
  import cal_pkg::*;
#(
  parameter int unsigned QB        = Q_BITS,
  parameter int unsigned N_SAMPLES = 5_000_000,
  parameter int unsigned M_AVG     = 8,
  parameter int unsigned R_TERMS   = 25
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       enable,
  input  logic                       sample_valid,
  // analog switch S
  output phase_e                     phase,
  // histogram counters
  output logic                       hist_clear,
  input  logic                       hist_clear_busy,
  output logic                       hist_count_en,
  output logic [QB-1:0]              ha_addr,
  input  logic [CNT_W-1:0]           ha_data,
  output logic [QB-1:0]              he_addr,
  input  logic [CNT_W-1:0]           he_data,
  // mapping memory: {e_a - a (signed MAP_X_W), f_a (1.FF)}
  output logic                       map_we,
  output logic [QB-1:0]              map_waddr,
  output logic [MAP_W-1:0]           map_wdata,
  output logic [QB-1:0]              map_raddr,
  input  logic [MAP_W-1:0]           map_rdata,
  // preconditioned E-ADC histogram H_e' (HF fraction bits)
  output logic                       hep_we,
  output logic [QB-1:0]              hep_waddr,
  output logic [HV_W-1:0]            hep_wdata,
  output logic [QB-1:0]              hep_raddr,
  input  logic [HV_W-1:0]            hep_rdata,
  // INL memory (signed, DF fraction bits)
  output logic                       inl_we,
  output logic [QB-1:0]              inl_waddr,
  output logic signed [INL_W-1:0]    inl_wdata,
  output logic [QB-1:0]              inl_raddr,
  input  logic signed [INL_W-1:0]    inl_rdata,
  // correction LUT
  output logic                       lut_we,
  output logic [QB-1:0]              lut_addr,
  output logic signed [LUT_W-1:0]    lut_data,
  // results
  output logic signed [POS_W-1:0]    offset_est,   // V_off, LSB, POS_F fraction bits
  output logic                       offset_found,
  output logic [ALPHA_W-1:0]         alpha_est,    // ALPHA_F fraction bits
  output logic [HV_W-1:0]            ak_est,       // alpha*k, HF fraction bits
  output logic                       cal_done,     // one-cycle pulse per finished cycle
  output logic [15:0]                cal_count
);

  localparam int unsigned N      = 2**QB;
  localparam int unsigned IW     = QB + 2;           // signed level / index width
  localparam int unsigned SUM_W  = CNT_W + QB + HF + 2;
  localparam int unsigned DIV_NW = ACC_W + HV_W;
  localparam int unsigned DIV_DW = 64;
  localparam int unsigned PROD_W = ACC_W + HV_W;

  typedef enum logic [5:0] {
    S_IDLE,
    S_CLR, S_CLR_WAIT, S_COLLECT,
    S_MAP_INIT, S_MAP_RD, S_MAP_STEP, S_MAP_DIV, S_MAP_WR,
    S_PRE_RDA, S_PRE_RDB, S_PRE_LATB, S_PRE_RDN, S_PRE_ACC, S_PRE_WR,
    S_OFF_RD, S_OFF_STEP, S_OFF_WAIT,
    S_AL_SET, S_AL_ACC, S_AL_DIV,
    S_INL_START, S_INL_N0, S_INL_P, S_INL_DIV, S_INL_DIVW, S_INL_FIN, S_INL_FINW,
    S_LUT_SET, S_LUT_R0, S_LUT_R1, S_LUT_R2, S_LUT_WR,
    S_IP0, S_IP1, S_IP2,
    S_DONE
  } state_e;

  state_e state, ret_state;

  // shared divider
  logic              div_start, div_busy, div_done;
  logic [DIV_NW-1:0] div_num, div_q;
  logic [DIV_DW-1:0] div_den, div_rem;

  seq_divider #(.NW(DIV_NW), .DW(DIV_DW)) u_div (
    .clk(clk), .rst_n(rst_n), .start(div_start), .dividend(div_num),
    .divisor(div_den), .busy(div_busy), .done(div_done), .quotient(div_q),
    .remainder(div_rem)
  );

  // counters and working registers
  logic [31:0]              smp_cnt;
  logic [IW-1:0]            a_r, e_r, n_r;        // level indices (a, e: unsigned use)
  logic [SUM_W-1:0]         sa_r, se_r;
  logic signed [IW-1:0]     ea_r, eb_r;
  logic [MAP_F_W-1:0]       fa_r, fb_r;
  logic [PROD_W-1:0]        pacc_r;               // preconditioning sum, FF fraction bits
  logic signed [SUM_W:0]    dcur_r;               // dS'
  logic [7:0]               p_r;
  logic [HV_W+8-1:0]        suma_r, sume_r;
  logic signed [POS_W-1:0]  pos_r, y_r;
  logic [HV_W-1:0]          h0a_r, h0e_r, ia_r, ie_r;
  logic [ACC_W-1:0]         acc_r;
  logic signed [INL_W-1:0]  icur_r, i0_r, i1_r;
  logic                     neg_dir_r;
  logic                     first_r;

  // registered read addresses
  logic [QB-1:0] rd_a, rd_e, rd_p, rd_m, rd_i;
  assign ha_addr   = rd_a;
  assign he_addr   = rd_e;
  assign hep_raddr = rd_p;
  assign map_raddr = rd_m;
  assign inl_raddr = rd_i;

  // ---------------------------------------------------------------- helpers
  // clamp a signed index to the level range
  function automatic logic [QB-1:0] clampi(input logic signed [POS_W-1:0] k);
    if (k < 0) return '0;
    else if (k > POS_W'(N - 1)) return QB'(N - 1);
    else return QB'(k);
  endfunction

  function automatic logic inrange(input logic signed [POS_W-1:0] k);
    return (k >= 0) && (k <= POS_W'(N - 1));
  endfunction

  // linear interpolation of unsigned histogram values, ph = POS_F fraction
  function automatic logic [HV_W-1:0] lerp_h(input logic [HV_W-1:0] v0,
                                             input logic [HV_W-1:0] v1,
                                             input logic [POS_F-1:0] ph);
    logic signed [HV_W+1:0]        d;
    logic signed [HV_W+POS_F+2:0]  m;
    logic signed [HV_W+1:0]        r;
    d = signed'({2'b00, v1}) - signed'({2'b00, v0});
    m = d * signed'({1'b0, ph});
    r = signed'({2'b00, v0}) + (HV_W+2)'(m >>> POS_F);
    return (r < 0) ? '0 : r[HV_W-1:0];
  endfunction

  function automatic logic signed [INL_W-1:0] lerp_i(input logic signed [INL_W-1:0] v0,
                                                     input logic signed [INL_W-1:0] v1,
                                                     input logic [POS_F-1:0] ph);
    logic signed [INL_W+POS_F+1:0] m;
    m = (INL_W+POS_F+2)'(v1 - v0) * signed'({1'b0, ph});
    return v0 + INL_W'(m >>> POS_F);
  endfunction

  // index of amplitude v (LSB, POS_F): v + V_off + N/2 - 1/2
  function automatic logic signed [POS_W-1:0] amp2idx(input logic signed [POS_W-1:0] v,
                                                      input logic signed [POS_W-1:0] voff);
    return v + voff + (POS_W'(N / 2) <<< POS_F) - (POS_W'(1) <<< (POS_F - 1));
  endfunction

  // level n as POS value from index k: n = k - N/2 + 1
  function automatic logic signed [POS_W-1:0] lev2pos(input logic signed [IW-1:0] n);
    return POS_W'(n) <<< POS_F;
  endfunction

  // ------------------------------------------------------- combinational
  logic signed [POS_W-1:0]        kf;              // floor(pos_r)
  logic [POS_F-1:0]               ph;
  logic signed [POS_W+ALPHA_W:0]  yprod;
  logic [ALPHA_W+HV_W-1:0]        aeprod;
  logic [DIV_DW-1:0]              den_c;
  logic signed [INL_W:0]          dval;
  logic signed [SUM_W:0]          dnext;
  logic signed [INL_W+1:0]        err_c;
  logic signed [POS_W-1:0]        ynext;           // alpha^(p+1) v_n
  logic                           near0;           // |ynext| < 1/2 LSB

  always_comb begin
    kf     = pos_r >>> POS_F;
    ph     = pos_r[POS_F-1:0];
    yprod  = (POS_W+ALPHA_W+1)'(y_r) * signed'({1'b0, alpha_est});
    ynext  = POS_W'(yprod >>> ALPHA_F);
    near0  = (ynext < (POS_W'(1) <<< (POS_F - 1))) && (ynext > -(POS_W'(1) <<< (POS_F - 1)));
    aeprod = alpha_est * ie_r;
    den_c  = DIV_DW'(aeprod >> ALPHA_F);
    dval   = (INL_W+1)'(signed'({1'b0, div_q})) - (INL_W+1)'(signed'(1 << DF));
    dnext  = dcur_r + (SUM_W+1)'({ha_data, {HF{1'b0}}}) - (SUM_W+1)'(hep_rdata);
    err_c  = (INL_W+2)'(lerp_i(i0_r, i1_r, ph)) + (INL_W+2)'(lerp_i(i1_r, inl_rdata, ph));
    err_c  = (err_c >>> 1) - (INL_W+2)'(offset_est >>> (POS_F - DF));
  end

  assign hist_count_en = (state == S_COLLECT);

  // ------------------------------------------------------------ main FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      ret_state    <= S_IDLE;
      phase        <= PHASE_MISMATCH;
      hist_clear   <= 1'b0;
      map_we       <= 1'b0;  map_waddr <= '0; map_wdata <= '0;
      hep_we       <= 1'b0;  hep_waddr <= '0; hep_wdata <= '0;
      inl_we       <= 1'b0;  inl_waddr <= '0; inl_wdata <= '0;
      lut_we       <= 1'b0;  lut_addr  <= '0; lut_data  <= '0;
      offset_est   <= '0;
      offset_found <= 1'b0;
      alpha_est    <= ALPHA_W'(1) << ALPHA_F;
      ak_est       <= '0;
      cal_done     <= 1'b0;
      cal_count    <= '0;
      div_start    <= 1'b0;
      div_num      <= '0;
      div_den      <= '0;
      smp_cnt      <= '0;
      a_r <= '0; e_r <= '0; n_r <= '0;
      sa_r <= '0; se_r <= '0;
      ea_r <= '0; eb_r <= '0; fa_r <= '0; fb_r <= '0;
      pacc_r <= '0; dcur_r <= '0;
      p_r <= '0; suma_r <= '0; sume_r <= '0;
      pos_r <= '0; y_r <= '0;
      h0a_r <= '0; h0e_r <= '0; ia_r <= '0; ie_r <= '0;
      acc_r <= '0; icur_r <= '0; i0_r <= '0; i1_r <= '0;
      neg_dir_r <= 1'b0; first_r <= 1'b0;
      rd_a <= '0; rd_e <= '0; rd_p <= '0; rd_m <= '0; rd_i <= '0;
    end else begin
      hist_clear <= 1'b0;
      map_we     <= 1'b0;
      hep_we     <= 1'b0;
      inl_we     <= 1'b0;
      lut_we     <= 1'b0;
      cal_done   <= 1'b0;
      div_start  <= 1'b0;

      unique case (state)
        S_IDLE: if (enable) begin
          phase <= PHASE_MISMATCH;
          state <= S_CLR;
        end

        // ---------------- histogram collection (both phases)
        S_CLR: begin
          hist_clear <= 1'b1;
          smp_cnt    <= '0;
          state      <= S_CLR_WAIT;
        end
        S_CLR_WAIT: if (!hist_clear && !hist_clear_busy) state <= S_COLLECT;
        S_COLLECT: if (sample_valid) begin
          smp_cnt <= smp_cnt + 1;
          if (smp_cnt == N_SAMPLES - 1) begin
            if (phase == PHASE_MISMATCH) state <= S_MAP_INIT;
            else begin
              a_r  <= '0;
              rd_m <= '0;
              state <= S_PRE_RDA;
            end
          end
        end

        // ---------------- mismatch mapping, eqs. (9)-(11)
        S_MAP_INIT: begin
          a_r <= '0; e_r <= '0; sa_r <= '0; se_r <= '0;
          rd_a <= '0; rd_e <= '0;
          state <= S_MAP_RD;
        end
        S_MAP_RD: begin
          // he_data = H_e*(e), ha_data = H_a*(a)
          if ((se_r + SUM_W'(he_data) <= sa_r) && (e_r < IW'(N - 1))) begin
            se_r  <= se_r + SUM_W'(he_data);
            e_r   <= e_r + 1'b1;
            rd_e  <= QB'(e_r + 1'b1);
            state <= S_MAP_STEP;       // one cycle for the new read
          end else begin
            div_num <= (se_r + SUM_W'(he_data) > sa_r)
                       ? DIV_NW'(SUM_W'(se_r + SUM_W'(he_data) - sa_r)) << FF : '0;
            div_den <= (he_data == '0) ? DIV_DW'(1) : DIV_DW'(he_data);
            div_start <= 1'b1;
            state <= S_MAP_DIV;
          end
        end
        S_MAP_STEP: state <= S_MAP_RD;
        S_MAP_DIV: if (div_done) begin
          map_we    <= 1'b1;
          map_waddr <= QB'(a_r);
          map_wdata <= {MAP_X_W'(signed'(e_r) - signed'(a_r)),
                        (div_q > DIV_NW'(1 << FF)) ? MAP_F_W'(1 << FF) : MAP_F_W'(div_q)};
          sa_r      <= sa_r + SUM_W'(ha_data);
          state     <= S_MAP_WR;
        end
        S_MAP_WR: begin
          if (a_r == IW'(N - 1)) begin
            phase <= PHASE_NONLINEARITY;
            state <= S_CLR;
          end else begin
            a_r   <= a_r + 1'b1;
            rd_a  <= QB'(a_r + 1'b1);
            state <= S_MAP_STEP;
          end
        end

        // ---------------- preconditioning, eq. (12)
        S_PRE_RDA: begin               // map_rdata = entry a
          ea_r  <= IW'(signed'(a_r)) + IW'(signed'(map_rdata[MAP_W-1 -: MAP_X_W]));
          fa_r  <= map_rdata[MAP_F_W-1:0];
          rd_m  <= QB'(a_r + 1'b1);
          state <= S_PRE_RDB;
        end
        S_PRE_RDB: begin               // map_rdata = entry a+1
          if (a_r == IW'(N - 1)) begin
            eb_r <= IW'(N);
            fb_r <= MAP_F_W'(1 << FF);
          end else begin
            eb_r <= IW'(signed'(a_r) + 1) + IW'(signed'(map_rdata[MAP_W-1 -: MAP_X_W]));
            fb_r <= map_rdata[MAP_F_W-1:0];
          end
          n_r    <= (ea_r < 0) ? '0 : (ea_r > IW'(N - 1)) ? IW'(N - 1) : ea_r;
          rd_e   <= clampi(POS_W'(ea_r));
          pacc_r <= '0;
          state  <= S_PRE_LATB;
        end
        S_PRE_LATB: state <= S_PRE_ACC;   // read latency of H_e''(e_a)
        S_PRE_ACC: begin               // he_data = H_e''(n)
          logic [MAP_F_W-1:0] w;
          if (n_r == ea_r && n_r == eb_r) w = (fa_r > fb_r) ? fa_r - fb_r : '0;
          else if (n_r == ea_r)           w = fa_r;
          else if (n_r == eb_r)           w = MAP_F_W'(1 << FF) - fb_r;
          else                            w = MAP_F_W'(1 << FF);
          pacc_r <= pacc_r + PROD_W'(w) * PROD_W'(he_data);
          if (signed'(n_r) >= eb_r || n_r == IW'(N - 1)) begin
            state <= S_PRE_WR;
          end else begin
            n_r   <= n_r + 1'b1;
            rd_e  <= QB'(n_r + 1'b1);
            state <= S_PRE_RDN;
          end
        end
        S_PRE_RDN: state <= S_PRE_ACC;
        S_PRE_WR: begin
          hep_we    <= 1'b1;
          hep_waddr <= QB'(a_r);
          hep_wdata <= HV_W'(pacc_r >> (FF - HF));
          if (a_r == IW'(N - 1)) begin
            n_r   <= '0;
            rd_a  <= '0;
            rd_p  <= '0;
            dcur_r <= '0;
            offset_found <= 1'b0;
            state <= S_OFF_WAIT;
          end else begin
            a_r   <= a_r + 1'b1;
            rd_m  <= QB'(a_r + 1'b1);
            state <= S_PRE_RDA;
          end
        end

        // ---------------- offset, eqs. (18)-(22)
        S_OFF_WAIT: state <= S_OFF_RD;  // H_e' last write settles
        S_OFF_RD: begin                 // ha_data, hep_rdata = level n_r
          dcur_r  <= dnext;
          if (!offset_found && dcur_r > 0 && dnext <= 0) begin
            offset_found <= 1'b1;
            div_num   <= DIV_NW'(dcur_r) << POS_F;
            div_den   <= DIV_DW'(dcur_r) + DIV_DW'(-dnext);
            div_start <= 1'b1;
            state     <= S_OFF_STEP;
          end else if (n_r == IW'(N - 1)) begin
            // no change of sign: keep a zero offset
            offset_est <= '0;
            state <= S_AL_SET;
            p_r   <= 8'd1;
            suma_r <= '0; sume_r <= '0;
          end else begin
            n_r  <= n_r + 1'b1;
            rd_a <= QB'(n_r + 1'b1);
            rd_p <= QB'(n_r + 1'b1);
            state <= S_OFF_WAIT;
          end
        end
        S_OFF_STEP: if (div_done) begin
          // n_off - 1 = n_r - N/2  (level of index n_r is n_r - N/2 + 1)
          offset_est <= ((POS_W'(n_r) - POS_W'(N / 2)) <<< POS_F) + POS_W'(div_q);
          p_r    <= 8'd1;
          suma_r <= '0; sume_r <= '0;
          state  <= S_AL_SET;
        end

        // ---------------- alpha and alpha*k, eqs. (27), (33)
        S_AL_SET: begin
          // levels n = p and n = 1 - p, index pos = n + V_off + N/2 - 1
          pos_r     <= amp2idx(lev2pos(first_r ? IW'(1) - IW'(p_r) : IW'(p_r))
                               - (POS_W'(1) <<< (POS_F - 1)), offset_est);
          ret_state <= S_AL_ACC;
          state     <= S_IP0;
        end
        S_AL_ACC: begin
          suma_r <= suma_r + (HV_W+8)'(ia_r);
          sume_r <= sume_r + (HV_W+8)'(ie_r);
          if (!first_r) begin
            first_r <= 1'b1;
            state   <= S_AL_SET;
          end else begin
            first_r <= 1'b0;
            if (p_r == 8'(M_AVG)) begin
              div_num   <= DIV_NW'(suma_r + (HV_W+8)'(ia_r)) << ALPHA_F;
              div_den   <= DIV_DW'(sume_r + (HV_W+8)'(ie_r));
              div_start <= 1'b1;
              ak_est    <= HV_W'((suma_r + (HV_W+8)'(ia_r)) / (HV_W+8)'(2 * M_AVG));
              state     <= S_AL_DIV;
            end else begin
              p_r   <= p_r + 1'b1;
              state <= S_AL_SET;
            end
          end
        end
        S_AL_DIV: if (div_done) begin
          alpha_est <= ALPHA_W'(div_q);
          // I(0) = 0
          inl_we    <= 1'b1;
          inl_waddr <= QB'(N / 2 - 1);
          inl_wdata <= '0;
          icur_r    <= '0;
          n_r       <= IW'(1);
          neg_dir_r <= 1'b0;
          state     <= S_INL_START;
        end

        // ---------------- INL, eq. (36)
        S_INL_START: begin
          // H_A(v_n): index n + V_off + N/2 - 1
          y_r       <= lev2pos(n_r) - (POS_W'(1) <<< (POS_F - 1));
          pos_r     <= amp2idx(lev2pos(n_r) - (POS_W'(1) <<< (POS_F - 1)), offset_est);
          ret_state <= S_INL_N0;
          state     <= S_IP0;
        end
        S_INL_N0: begin
          acc_r <= ACC_W'(ia_r) << (AF - HF);
          p_r   <= 8'd1;
          y_r   <= ynext;
          pos_r <= amp2idx(ynext, offset_est);
          ret_state <= S_INL_DIV;
          state <= near0 ? S_INL_P : S_IP0;
          if (near0) p_r <= 8'(R_TERMS);
        end
        S_INL_DIV: begin
          if (den_c != '0) begin
            div_num   <= DIV_NW'(acc_r) * DIV_NW'(ia_r);
            div_den   <= den_c;
            div_start <= 1'b1;
            state     <= S_INL_DIVW;
          end else begin
            state <= S_INL_P;
          end
        end
        S_INL_DIVW: if (div_done) begin
          acc_r <= (div_q >= (DIV_NW'(1) << ACC_W)) ? '1 : ACC_W'(div_q);
          state <= S_INL_P;
        end
        S_INL_P: begin
          if (p_r == 8'(R_TERMS)) begin
            div_num   <= DIV_NW'(acc_r) << DF;
            div_den   <= (ak_est == '0) ? DIV_DW'(1) : DIV_DW'(ak_est) << (AF - HF);
            div_start <= 1'b1;
            state     <= S_INL_FIN;
          end else if (near0) begin
            p_r   <= 8'(R_TERMS);     // remaining factors are 1, eq. (26)
          end else begin
            p_r   <= p_r + 1'b1;
            y_r   <= ynext;
            pos_r <= amp2idx(ynext, offset_est);
            ret_state <= S_INL_DIV;
            state <= S_IP0;
          end
        end
        S_INL_FIN: if (div_done) state <= S_INL_FINW;
        S_INL_FINW: begin
          // dval = D(n) with DF fraction bits
          inl_we <= 1'b1;
          if (!neg_dir_r) begin
            icur_r    <= icur_r + INL_W'(dval);
            inl_wdata <= icur_r + INL_W'(dval);
            inl_waddr <= QB'(signed'(n_r) + IW'(N / 2 - 1));
            if (n_r == IW'(N / 2)) begin
              neg_dir_r <= 1'b1;
              icur_r    <= '0;
              n_r       <= '0;
            end else begin
              n_r <= n_r + 1'b1;
            end
            state <= S_INL_START;
          end else begin
            icur_r    <= icur_r - INL_W'(dval);
            inl_wdata <= icur_r - INL_W'(dval);
            inl_waddr <= QB'(signed'(n_r) + IW'(N / 2 - 2));
            if (signed'(n_r) == -signed'(IW'(N / 2 - 2))) begin
              a_r   <= '0;
              state <= S_LUT_SET;
            end else begin
              n_r   <= n_r - 1'b1;
              state <= S_INL_START;
            end
          end
        end

        // ---------------- LUT, eq. (37)
        S_LUT_SET: begin
          // I at level n-1-V_off: index k - 1 - V_off
          pos_r <= ((POS_W'(a_r) - POS_W'(1)) <<< POS_F) - offset_est;
          state <= S_LUT_R0;
        end
        S_LUT_R0: begin
          rd_i  <= clampi(kf);
          state <= S_LUT_R1;
        end
        S_LUT_R1: begin
          i0_r  <= inl_rdata;
          rd_i  <= clampi(kf + 1);
          state <= S_LUT_R2;
        end
        S_LUT_R2: begin
          i1_r  <= inl_rdata;
          rd_i  <= clampi(kf + 2);
          state <= S_LUT_WR;
        end
        S_LUT_WR: begin
          logic signed [INL_W+1:0] e8;
          e8 = err_c >>> (DF - LUT_F);
          lut_we   <= 1'b1;
          lut_addr <= QB'(a_r);
          if (e8 > (INL_W+2)'(2**(LUT_W-1) - 1))       lut_data <= LUT_W'(2**(LUT_W-1) - 1);
          else if (e8 < -(INL_W+2)'(2**(LUT_W-1)))     lut_data <= LUT_W'(-(2**(LUT_W-1)));
          else                                          lut_data <= LUT_W'(e8);
          if (a_r == IW'(N - 1)) state <= S_DONE;
          else begin
            a_r   <= a_r + 1'b1;
            state <= S_LUT_SET;
          end
        end

        S_DONE: begin
          cal_done  <= 1'b1;
          cal_count <= cal_count + 1'b1;
          phase     <= PHASE_MISMATCH;
          state     <= enable ? S_CLR : S_IDLE;
        end

        // ---------------- interpolation subroutine: ia_r = H_A, ie_r = H_E at pos_r
        S_IP0: begin
          rd_a  <= clampi(kf);
          rd_p  <= clampi(kf);
          state <= S_IP1;
        end
        S_IP1: begin
          h0a_r <= inrange(kf) ? {ha_data, {HF{1'b0}}} : '0;
          h0e_r <= inrange(kf) ? hep_rdata : '0;
          rd_a  <= clampi(kf + 1);
          rd_p  <= clampi(kf + 1);
          state <= S_IP2;
        end
        S_IP2: begin
          ia_r  <= lerp_h(h0a_r, inrange(kf + 1) ? {ha_data, {HF{1'b0}}} : '0, ph);
          ie_r  <= lerp_h(h0e_r, inrange(kf + 1) ? hep_rdata : '0, ph);
          state <= ret_state;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
