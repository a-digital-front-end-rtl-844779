// tb_fermi_top_flash: end-to-end run of a FERMI module built with the
// pipeline flash A/D converters (ADC_ARCH = 1), otherwise at default size.
//
// A behavioural model of each channel's flash converter drives the
// comparator banks: the 5-bit flash bank sees each sample with a threshold
// error of up to +-15 LSB (corrected digitally by the redundant bit), the
// coarse bank the residue three slots later and the fine bank that residue
// against the resistor string the module's LSB switch control selects.  The
// address generator and the external readout controller are modelled as in
// tb_fermi_top.  The test loads the tables over the command link, checks
// every trigger word, reads full and filtered frames with the tables in
// use and with six channels on the emergency bypass, replays the tables as a test pattern
// and checks that every channel delivers consecutive table entries, and
// fires a calibration pulse.  Bypass, test pattern, flash corrections,
// saturation, pulses, pile-ups, stalls and corrected pointers are counted
// and each must have happened.
module tb_fermi_top_flash;
  import fermi_pkg::*;
  localparam int NE = 36000;         // clock edges simulated after reset
  localparam int LAT_MEM = 7;        // analog sample edge -> memory write
  logic clk = 0, clk_glb = 0, clk_master = 0, rst_n = 0;
  logic [11:0][11:0] psa_comp, psa_sample, psa_azero;
  logic [11:0][11:0][9:0] psa_dac;
  logic pf_sync;
  logic [11:0][30:0] pf_flash_th;
  logic [11:0][7:0] pf_crs_th, pf_fin_th, pf_lsb_sel;
  logic [2:0] pf_phi, pf_vin1_sel, pf_vin2_sel;
  logic [4:0] pf_suh_sample, pf_suh_predict, pf_suh_hold_c, pf_suh_hold_f;
  logic [1:0] link_valid, link_data;
  logic [14:0] wr_ptr, ro_ptr, pclean, rclean;
  logic [9:0] waddr, raddr;
  logic [11:0] trig_data;
  cfd_flags_t trig_flags;
  logic ro_pstrobe, ro_load, ro_strobe, ro_valid, ro_filt, ro_err, ro_busy;
  ro_mode_e ro_mode;
  logic [31:0] ro_data;
  logic cal_pulse, acq_en, alarm;
  logic [11:0] cal_amp;
  logic [15:0] dc_level;
  logic [7:0] clk_phase, link_err;
  logic [2:0][6:0] mem_status;
  logic [2:0][60:0] mem_spy;
  int checks = 0, failures = 0;

  fermi_top #(.ADC_ARCH(1)) dut (.*);
  secded_enc #(.K(10)) u_we (.data(waddr), .code(pclean));
  secded_enc #(.K(10)) u_re (.data(raddr), .code(rclean));

  always #5 clk = ~clk;
  initial begin #3; forever #5 clk_glb = ~clk_glb; end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (NE + 40000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference functions ----------------
  logic [11:0] cur_byp = '0;   // channels bypassing their table (as seen by the checks)
  function automatic int tab(int code);
    return code + (code * code) / 17;
  endfunction
  function automatic int lutf(int c, int code);
    return cur_byp[c] ? code : tab(code);
  endfunction

  int base [NE + 64];
  function automatic int vin(int c, int e);
    int v;
    if (e < 0) return 0;
    v = (base[e] * (c + 4)) / 15;
    return (v > 1023) ? 1023 : v;
  endfunction

  // enabled channels: all but the left-out ones (IC0 ch1, IC1 ch2 -> 1, 6)
  // and IC2's spare channel 11
  localparam logic [11:0] ENABLES = 12'b0111_1011_1101;
  int lane_ch [9] = '{0, 2, 3, 4, 5, 7, 8, 9, 10};

  function automatic int modsum(int e);   // module sum entering memory edge e
    int s = 0;
    for (int c = 0; c < 12; c++) if (ENABLES[c]) s += lutf(c, vin(c, e - LAT_MEM));
    return s;
  endfunction

  // ---------------- analog model of the pipeline flash converters ----------------
  // Before each edge e the flash bank of channel c sees the sample of edge
  // e (with a threshold error of up to +-15 LSB), the coarse bank the residue
  // of sample e-3 and the fine bank that residue against the string the
  // LSB switch control of the module selects.
  int edge_no = -1;
  int n_fcorr = 0;
  function automatic int flash_of(int c, int e);
    int v, er, f;
    v = vin(c, e);
    er = int'((e * 7 + c * 13) % 31) - 15;
    f = (v - er) / 32;
    if (v - er < 0) f = 0;
    if (f > 31) f = 31;
    if (v - 32 * f + 16 < 0 || v - 32 * f + 16 > 63) f = v / 32;
    return f;
  endfunction
  always @(negedge clk) begin
    int e, f, r, sel;
    e = edge_no + 1;
    for (int c = 0; c < 12; c++) begin
      f = flash_of(c, e);
      if (trig_on && f != vin(c, e) / 32) n_fcorr++;
      pf_flash_th[c] = '0;
      for (int i = 0; i < f; i++) pf_flash_th[c][i] = 1'b1;
      r = vin(c, e - 3) - 32 * flash_of(c, e - 3) + 16;
      for (int k = 1; k <= 8; k++) pf_crs_th[c][k-1] = (r >= 8 * k);
      r = vin(c, e - 4) - 32 * flash_of(c, e - 4) + 16;
      sel = 0;
      for (int k = 0; k < 8; k++) if (pf_lsb_sel[c][k]) sel = k;
      for (int k = 1; k <= 8; k++) pf_fin_th[c][k-1] = (r >= 8 * sel + k);
    end
  end
  always #1.25 clk_master = ~clk_master;

  // ---------------- address generator model ----------------
  int n_psec = 0;
  int wr_edge [1024];       // edge at which each address was last written
  always @(negedge clk) begin
    waddr = 10'((edge_no + 1) % 1024);
    #1;
    wr_ptr = pclean;
    if ((edge_no % 61) == 5) begin
      int b;
      b = $urandom_range(0, 14);
      wr_ptr[b] = ~wr_ptr[b];
      n_psec++;
    end
    wr_edge[(edge_no + 1) % 1024] = edge_no + 1;
  end
  always @(posedge clk) if (rst_n) edge_no++;

  // ---------------- trigger check ----------------
  int n_trig = 0, n_sat = 0, n_pulse = 0, n_mild = 0, n_severe = 0;
  bit trig_on = 0;
  always @(posedge clk_glb) begin
    #1;
    if (trig_on) begin
      int x, acc, v;
      x = edge_no - 3;                  // memory-write edge of newest sample
      acc = modsum(x) + modsum(x - 1) + modsum(x - 2);
      v = acc >> 4;
      if (v > 4095) v = 4095;
      check(int'(trig_data) == v, $sformatf("trigger word edge %0d got %0d exp %0d", x, trig_data, v));
      n_trig++;
      if (v == 4095) n_sat++;
      n_pulse  += int'(trig_flags.pulse);
      n_mild   += int'(trig_flags.mild);
      n_severe += int'(trig_flags.severe);
    end
  end

  // ---------------- command link ----------------
  task automatic send(logic [7:0] a, logic [15:0] d);
    logic [24:0] f;
    f = {a, d, ^{a, d}};
    for (int i = 24; i >= 0; i--) begin
      @(negedge clk);
      link_valid[0] = 1; link_data[0] = f[i];
    end
    @(negedge clk);
    link_valid[0] = 0;
    repeat (2) @(negedge clk);
  endtask

  // ---------------- readout ----------------
  int n_bypass = 0, n_test = 0, n_cal = 0;
  always @(negedge clk) if (cal_pulse) n_cal++;

  // In test mode the stored samples of a frame must be consecutive table
  // entries tab(k), tab(k+1), ... with the same k on every channel.
  task automatic readout_test();
    logic [31:0] d;
    int k0, e0;
    k0 = -1;
    e0 = edge_no - 40;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      raddr = 10'((e0 + i) % 1024);
      #1;
      ro_ptr = rclean;
      ro_pstrobe = 1;
      @(negedge clk);
      ro_pstrobe = 0;
    end
    @(negedge clk);
    ro_mode = RO_FULL; ro_load = 1;
    @(negedge clk);
    ro_load = 0;
    for (int ch = 0; ch < 9; ch++)
      for (int i = 0; i < 8; i++) begin
        take(d);
        if (ch == 0 && i == 0)
          for (int k = 0; k < 1024; k++) if (tab(k) == int'(d[15:0])) k0 = k;
        check(k0 >= 0 && int'(d[15:0]) == tab((k0 + i) % 1024) && d[31:28] == 4'(ch),
              $sformatf("test pattern ch %0d word %0d got %0d (k0 %0d)", ch, i, d[15:0], k0));
      end
    n_test++;
  endtask
  int n_full = 0, n_filt = 0, n_stall = 0, n_flagged = 0;
  always @(posedge clk) if (dut.mem_req && !(&dut.rd_ready)) n_stall++;
  int wt [8];

  task automatic take(output logic [31:0] d);
    int k;
    k = 0;
    while (!ro_valid && k < 3000) begin @(negedge clk); k++; end
    d = ro_data;
    ro_strobe = 1;
    @(negedge clk);
    ro_strobe = 0;
  endtask

  task automatic readout(ro_mode_e m);
    int e0;
    int pe [8];
    logic [31:0] d;
    e0 = edge_no - 40;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      pe[i] = e0 + i;
      raddr = 10'(pe[i] % 1024);
      #1;
      ro_ptr = rclean;
      if (i == 3) ro_ptr[7] = ~ro_ptr[7];
      ro_pstrobe = 1;
      @(negedge clk);
      ro_pstrobe = 0;
    end
    @(negedge clk);
    ro_mode = m; ro_load = 1;
    @(negedge clk);
    ro_load = 0;
    for (int ch = 0; ch < 9; ch++) begin
      if (m == RO_FULL) begin
        for (int i = 0; i < 8; i++) begin
          int expv;
          take(d);
          expv = lutf(lane_ch[ch], vin(lane_ch[ch], pe[i] - LAT_MEM));
          check(d[31:28] == 4'(ch) && int'(d[15:0]) == expv && d[20:18] == 3'b000,
                $sformatf("full ch %0d ptr %0d got %h exp %0d", ch, i, d, expv));
          if (d[16]) n_flagged++;
        end
      end else begin
        longint s = 0;
        for (int i = 0; i < 8; i++) s += longint'(lutf(lane_ch[ch], vin(lane_ch[ch], pe[i] - LAT_MEM))) * wt[i];
        take(d);
        check(d[31:28] == 4'(ch) && d[27:0] == 28'(s) && ro_filt && !ro_err,
              $sformatf("filtered ch %0d got %h exp %0d", ch, d, s));
      end
    end
    if (m == RO_FULL) n_full++; else n_filt++;
  endtask

  initial begin
    // analog pulse train: pulses of random height at random gaps
    real shape [9] = '{0.3, 0.8, 1.0, 0.8, 0.55, 0.35, 0.2, 0.1, 0.05};
    int nxt;
    for (int e = 0; e < NE + 64; e++) base[e] = 8 + $urandom_range(0, 6);
    nxt = 30000;
    while (nxt < NE) begin
      int a;
      a = $urandom_range(40, 1200);
      for (int k = 0; k < 9; k++) if (nxt + k < NE + 64) base[nxt + k] += int'(a * shape[k]);
      nxt += $urandom_range(4, 30);
    end
    link_valid = 0; link_data = 0; pf_sync = 0; ro_ptr = '0; ro_pstrobe = 0; ro_load = 0; ro_strobe = 0;
    ro_mode = RO_FULL; raddr = '0;
    psa_comp = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. configuration
    send(8'h00, {10'b0, 4'hF, 2'd1});           // LUT load, all channels
    send(8'h03, 16'h0);
    for (int i = 0; i < 1024; i++) send(8'h02, 16'(tab(i)));
    send(8'h00, {10'b0, 4'hF, 2'd0});           // normal mode
    send(8'h04, {4'b0, ENABLES});
    send(8'h05, {10'b0, 2'd3, 2'd2, 2'd1});     // left-out channels
    send(8'h06, {7'b0, 5'd4, 4'd3});            // window 3, shift 4
    send(8'h07, {7'b0, 3'd0, 4'd6, 2'd2});      // D=2, F=6/16
    send(8'h08, 16'd3000);                      // veto
    send(8'h09, {4'b0, 6'd16, 6'd5});           // windows
    for (int i = 0; i < 8; i++) begin
      wt[i] = (i * 29 % 23) - 11;
      send(8'h10, {3'b0, 4'(i), 1'b0, 8'(wt[i])});
    end
    repeat (20) @(negedge clk);
    // 2. acquisition with trigger checking
    trig_on = 1;
    while (edge_no < 30500) @(negedge clk);
    // 3. readouts while the pulse train runs, table mode
    readout(RO_FULL);
    repeat (100) @(negedge clk);
    readout(RO_FILT0);
    // 4. emergency bypass of the tables
    trig_on = 0;
    send(8'h01, 16'h0F3);                  // channels 0, 1, 4..7 bypassed
    cur_byp = 12'h0F3;
    repeat (60) @(negedge clk);
    trig_on = 1;
    readout(RO_FULL);
    repeat (100) @(negedge clk);
    readout(RO_FILT0);
    n_bypass++;
    trig_on = 0;
    send(8'h01, 16'h000);
    cur_byp = '0;
    // 5. test pattern playback: every channel replays the table
    send(8'h00, {10'b0, 4'hF, 2'd2});
    send(8'h03, 16'h0);
    repeat (60) @(negedge clk);
    readout_test();
    // 6. calibration pulse
    send(8'h11, 16'h0456);
    repeat (4) @(negedge clk);
    check(n_cal == 1 && cal_amp == 12'h456, "calibration pulse");
    send(8'h00, {10'b0, 4'hF, 2'd0});
    check(!alarm && mem_status[0][3:0] == 4'b0100, $sformatf("status %b alarm %b", mem_status[0], alarm));
    $display("trigger words=%0d saturated=%0d pulses=%0d mild=%0d severe=%0d",
             n_trig, n_sat, n_pulse, n_mild, n_severe);
    $display("bypass=%0d test pattern=%0d flash corrections=%0d", n_bypass, n_test, n_fcorr);
    $display("full=%0d filtered=%0d stalls=%0d corrected pointers=%0d flagged words=%0d",
             n_full, n_filt, n_stall, n_psec, n_flagged);
    check(n_sat > 0,   "trigger saturation happened");
    check(n_pulse > 0, "pulse detected");
    check(n_mild > 0,  "mild pile-up");
    check(n_severe > 0, "severe pile-up");
    check(n_full > 0 && n_filt > 0, "both readout modes");
    check(n_stall > 0, "read stall");
    check(n_bypass > 0 && n_test > 0, "table bypass and test pattern");
    check(n_fcorr > 0, "flash errors corrected digitally");
    check(n_psec > 0 && dut.u_ro.ptr_sec, "pointer correction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
