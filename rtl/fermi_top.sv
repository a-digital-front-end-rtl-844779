// fermi_top: one FERMI module - twelve acquisition channels on three channel
// ICs and the service part (trigger, readout, controller).
//
// Every channel digitises its compressed analog signal at each bunch
// crossing and linearises the 10-bit code to 16 bits in its look-up table.
// Trigger path: each channel IC adds its enabled channels, the service part
// adds the three sums into the module sum, integrates, scales and limits it
// to the 12-bit first level trigger word, and runs the constant-fraction
// pulse detector, whose pulse and pile-up flags go to the trigger with the
// word and into the memory with the samples.  Storage: each channel IC keeps
// three of its four channels (one is a spare) in an ECC-protected memory
// written every clock at the pointer the external address generator sends.
// Readout: the output stage receives the pointers of a time frame and reads
// it out in full or filtered.  The controller programs all of this through
// its command links.
//
// The A/D converter is either of the document's two candidates, chosen by
// ADC_ARCH: 0 selects the parallel successive-approximation converter (its
// comparators, S/H and DACs are analog and reached through the psa_* ports),
// 1 the pipeline flash converter (its comparator banks arrive on the pf_*
// ports, its phases are generated from clk_master).  The analog compressor,
// DC level DAC and calibration pulser are outside; their settings are ports.
// The memory is written only while the controller's clock server enables
// acquisition.  The pulse flags stored with a sample are those produced in
// the same clock, i.e. they belong to the sum of a sample seven clocks older
// (CFD delay plus pipeline), a fixed offset a reader of the memory removes.
module fermi_top
  import fermi_pkg::*;
#(
  parameter int ADC_ARCH = 0,
  parameter int PSA_SUB  = ADC_BITS + 2       // SA channels per converter
) (
  input  logic                          clk,        // 67 MHz internal clock
  input  logic                          clk_glb,    // global trigger clock
  input  logic                          clk_master, // 268 MHz, ADC_ARCH 1
  input  logic                          rst_n,
  // parallel SA converters (ADC_ARCH 0)
  input  logic [N_CH-1:0][PSA_SUB-1:0]  psa_comp,
  output logic [N_CH-1:0][PSA_SUB-1:0]  psa_sample,
  output logic [N_CH-1:0][PSA_SUB-1:0]  psa_azero,
  output logic [N_CH-1:0][PSA_SUB-1:0][ADC_BITS-1:0] psa_dac,
  // pipeline flash converters (ADC_ARCH 1)
  input  logic                          pf_sync,
  input  logic [N_CH-1:0][30:0]         pf_flash_th,
  input  logic [N_CH-1:0][7:0]          pf_crs_th,
  input  logic [N_CH-1:0][7:0]          pf_fin_th,
  output logic [N_CH-1:0][7:0]          pf_lsb_sel,
  output logic [2:0]                    pf_phi,
  output logic [4:0]                    pf_suh_sample,
  output logic [4:0]                    pf_suh_predict,
  output logic [4:0]                    pf_suh_hold_c,
  output logic [4:0]                    pf_suh_hold_f,
  output logic [2:0]                    pf_vin1_sel,
  output logic [2:0]                    pf_vin2_sel,
  // command links
  input  logic [1:0]                    link_valid,
  input  logic [1:0]                    link_data,
  // write pointer from the address generator (SEC-DED coded)
  input  logic [14:0]                   wr_ptr,
  // first level trigger (global clock domain)
  output logic [TRIG_BITS-1:0]          trig_data,
  output cfd_flags_t                    trig_flags,
  // readout
  input  logic [14:0]                   ro_ptr,
  input  logic                          ro_pstrobe,
  input  logic                          ro_load,
  input  ro_mode_e                      ro_mode,
  input  logic                          ro_strobe,
  output logic [31:0]                   ro_data,
  output logic                          ro_valid,
  output logic                          ro_filt,
  output logic                          ro_err,
  output logic                          ro_busy,
  // analog settings and supervision
  output logic                          cal_pulse,
  output logic [11:0]                   cal_amp,
  output logic [15:0]                   dc_level,
  output logic [7:0]                    clk_phase,
  output logic                          acq_en,
  output logic                          alarm,
  output logic [7:0]                    link_err,
  output logic [N_IC-1:0][6:0]          mem_status,
  output logic [N_IC-1:0][60:0]         mem_spy
);
  // ---------------- controller ----------------
  lut_mode_e          lut_mode;
  logic [N_CH-1:0]    lut_bypass;
  logic [N_CH-1:0]    lut_wr, ch_enable;
  logic [15:0]        lut_wdata, cfd_veto, diag_sample;
  logic               lut_cnt_clear, addr_diag, data_diag_en, ptr_diag_en, status_clear;
  logic [N_IC-1:0][1:0] skip;
  logic [3:0]         integ_len, diag_en, cw_idx, cfd_frac;
  logic [4:0]         trig_shift;
  logic [1:0]         cfd_delay, cw_res;
  logic [2:0]         cfd_align;
  logic [5:0]         win_short, win_long;
  logic [N_IC-1:0]    mark_en;
  logic [9:0]         mark_addr;
  logic [14:0]        ptr_diag;
  logic               cw_en, cw_bank;
  logic signed [7:0]  cw_weight;
  logic [7:0]         err_in;

  fermi_controller u_ctrl (
    .clk, .rst_n, .link_valid, .link_data, .err_in,
    .lut_mode, .lut_bypass, .lut_wr, .lut_wdata, .lut_cnt_clear,
    .ch_enable, .skip, .integ_len, .trig_shift, .cfd_delay, .cfd_frac, .cfd_align,
    .cfd_veto, .win_short, .win_long,
    .diag_en, .addr_diag, .data_diag_en, .ptr_diag_en, .status_clear, .diag_sample,
    .mark_en, .mark_addr, .ptr_diag,
    .cw_en, .cw_bank, .cw_idx, .cw_weight, .cw_res,
    .cal_pulse, .cal_amp, .dc_level, .clk_en(acq_en), .clk_phase,
    .alarm, .link_err);

  // ---------------- A/D converters ----------------
  logic [N_CH-1:0][ADC_BITS-1:0] adc_code;

  if (ADC_ARCH == 0) begin : g_psa
    for (genvar c = 0; c < N_CH; c++) begin : g_ch
      psa_adc #(.N(ADC_BITS), .K(PSA_SUB - ADC_BITS)) u_adc (
        .clk, .rst_n, .comp(psa_comp[c]), .sample(psa_sample[c]),
        .azero(psa_azero[c]), .dac_code(psa_dac[c]), .dout(adc_code[c]),
        .dout_valid(), .dout_sub());
    end
    assign pf_lsb_sel = '0;
    assign {pf_phi, pf_suh_sample, pf_suh_predict, pf_suh_hold_c, pf_suh_hold_f,
            pf_vin1_sel, pf_vin2_sel} = '0;
  end else begin : g_pf
    adc_phase_gen u_ph (
      .clk_master, .rst_n, .sync(pf_sync), .slot_clk(), .phi(pf_phi), .Phi(),
      .suh_sample(pf_suh_sample), .suh_sync(), .suh_predict(pf_suh_predict),
      .suh_hold_c(pf_suh_hold_c), .suh_hold_f(pf_suh_hold_f),
      .vin1_sel(pf_vin1_sel), .vin2_sel(pf_vin2_sel));
    for (genvar c = 0; c < N_CH; c++) begin : g_ch
      flash_adc_coder u_adc (
        .clk, .rst_n, .flash_th(pf_flash_th[c]), .crs_th(pf_crs_th[c]),
        .fin_th(pf_fin_th[c]), .lsb_sel(pf_lsb_sel[c]), .dout(adc_code[c]),
        .overrange());
    end
    assign psa_sample = '0;
    assign psa_azero  = '0;
    assign psa_dac    = '0;
  end

  // ---------------- look-up tables ----------------
  logic [N_CH-1:0][LIN_BITS-1:0] lin;
  for (genvar c = 0; c < N_CH; c++) begin : g_lut
    lut u_lut (
      .clk, .rst_n, .mode(lut_bypass[c] ? LUT_BYPASS : lut_mode), .adc_code(adc_code[c]),
      .cnt_clear(lut_cnt_clear), .wr_strobe(lut_wr[c]), .wr_data(lut_wdata),
      .lin_out(lin[c]));
  end

  // ---------------- trigger ----------------
  logic [N_IC-1:0][LIN_BITS+1:0] ic_sum;
  logic [N_IC-1:0]               sum_err;
  logic [LIN_BITS+3:0]           module_sum;
  cfd_flags_t                    flags;

  for (genvar k = 0; k < N_IC; k++) begin : g_sum
    channel_sum u_sum (
      .clk, .rst_n, .in(lin[k*CH_PER_IC +: CH_PER_IC]),
      .enable(ch_enable[k*CH_PER_IC +: CH_PER_IC]), .sum(ic_sum[k]), .err(sum_err[k]));
  end

  l1_integrator u_l1 (
    .clk, .clk_glb, .rst_n, .ic_sum, .length(integ_len), .shift(trig_shift),
    .module_sum, .trig_data, .saturated());

  cfd u_cfd (
    .clk, .rst_n, .s_in(module_sum), .delay_sel(cfd_delay), .frac(cfd_frac),
    .veto({4'b0, cfd_veto}), .win_short, .win_long, .align(cfd_align), .flags);

  always_ff @(posedge clk_glb or negedge rst_n)
    if (!rst_n) trig_flags <= '0;
    else        trig_flags <= flags;

  // ---------------- data memories ----------------
  mem_word_t                          diag_word;
  mem_word_t [N_IC-1:0][USED_PER_IC-1:0] rd_data;
  logic [N_IC-1:0]                    rd_ready, rd_valid, rd_sec, rd_ded;
  logic                               mem_req;
  logic [ADDR_BITS-1:0]               mem_addr;
  logic [N_IC-1:0][60:0]              spy;

  assign diag_word = '{pileup: 1'b0, pulse: 1'b0, sample: diag_sample};

  for (genvar k = 0; k < N_IC; k++) begin : g_mem
    mem_word_t [CH_PER_IC-1:0] words;
    for (genvar i = 0; i < CH_PER_IC; i++) begin : g_w
      assign words[i] = '{pileup: flags.mild | flags.severe, pulse: flags.pulse,
                          sample: lin[k*CH_PER_IC + i]};
    end
    data_memory u_mem (
      .clk, .rst_n, .wr_en(acq_en), .ch_in(words), .diag_en, .diag_word,
      .skip(skip[k]), .wr_ptr, .addr_diag,
      .rd_req(mem_req), .rd_addr(mem_addr), .rd_ready(rd_ready[k]),
      .rd_valid(rd_valid[k]), .rd_data(rd_data[k]), .rd_sec(rd_sec[k]),
      .rd_ded(rd_ded[k]), .mark_en(mark_en[k]), .mark_addr,
      .status_clear, .status(mem_status[k]), .spy(spy[k]));
  end
  assign mem_spy = spy;

  // ---------------- output stage ----------------
  logic ptr_sec, ptr_ded;
  readout_controller u_ro (
    .clk, .rst_n, .ptr_code(ro_ptr), .pstrobe(ro_pstrobe), .load(ro_load),
    .mode(ro_mode), .ptr_diag_en, .ptr_diag,
    .mem_rd_req(mem_req), .mem_rd_addr(mem_addr), .mem_rd_ready(&rd_ready),
    .mem_rd_valid(rd_valid[0]), .mem_rd_data(rd_data),
    .mem_rd_sec(|rd_sec), .mem_rd_ded(|rd_ded),
    .data_diag_en, .data_diag(diag_word),
    .cw_en, .cw_bank, .cw_idx, .cw_weight, .cw_res,
    .out_data(ro_data), .out_valid(ro_valid), .out_filt(ro_filt), .out_err(ro_err),
    .strobe(ro_strobe), .busy(ro_busy), .ptr_sec, .ptr_ded);

  // ---------------- supervision ----------------
  always_comb begin
    err_in    = '0;
    err_in[0] = |sum_err;
    for (int k = 0; k < N_IC; k++) begin
      err_in[1] |= mem_status[k][1] | mem_status[k][3];  // uncorrectable
      err_in[2] |= mem_status[k][4];                     // odd/even
      err_in[3] |= mem_status[k][5];                     // duplicate mismatch
      err_in[4] |= mem_status[k][6];                     // spare cells used up
    end
    err_in[5] = ptr_ded;
    err_in[6] = ro_valid && ro_err;
  end
endmodule
