// tb_fermi_top: end-to-end run of a FERMI module at its default size
// (twelve channels with parallel SA converters, three channel ICs).
//
// Behavioural models stand in for what is outside the digital design: the
// analog front end (one random pulse train, scaled per channel, sampled by
// the S/H of each SA channel and compared with its DAC code), the address
// generator (sequential SEC-DED coded pointers, some with a flipped bit)
// and the external readout controller.  The test
//   1. loads all twelve look-up tables over the command link with
//      lin = code + code^2/17 and programs enables, the left-out channels
//      (channel 1 on IC 0, channel 2 on IC 1), trigger and CFD settings and
//      eight filter weights;
//   2. runs acquisition and compares every 12-bit trigger word with a
//      reference computed from the analog model (3-sample window, shift 4);
//   3. reads time frames of eight pointers in full and in filtered mode and
//      compares all nine channels with the reference;
//   4. counts pulses, pile-ups, saturated trigger words, corrected
//      pointers, read stalls and both readout modes, and fails if any of
//      them never happened.
module tb_fermi_top;
  import fermi_pkg::*;
  localparam int NE = 40000;         // clock edges simulated after reset
  localparam int LAT_MEM = 13;       // analog sample edge -> memory write
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

  fermi_top dut (.*);
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
  function automatic int lutf(int code);
    return code + (code * code) / 17;
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
    for (int c = 0; c < 12; c++) if (ENABLES[c]) s += lutf(vin(c, e - LAT_MEM));
    return s;
  endfunction

  // ---------------- analog model of the SA converters ----------------
  int edge_no = -1;
  int held [12][12];
  always @(negedge clk) begin
    for (int c = 0; c < 12; c++)
      for (int j = 0; j < 12; j++)
        if (psa_sample[c][j]) held[c][j] = vin(c, edge_no + 1);
  end
  always_comb
    for (int c = 0; c < 12; c++)
      for (int j = 0; j < 12; j++) psa_comp[c][j] = (held[c][j] >= int'(psa_dac[c][j]));

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
          expv = lutf(vin(lane_ch[ch], pe[i] - LAT_MEM));
          check(d[31:28] == 4'(ch) && int'(d[15:0]) == expv && d[20:18] == 3'b000,
                $sformatf("full ch %0d ptr %0d got %h exp %0d", ch, i, d, expv));
          if (d[16]) n_flagged++;
        end
      end else begin
        longint s = 0;
        for (int i = 0; i < 8; i++) s += longint'(lutf(vin(lane_ch[ch], pe[i] - LAT_MEM))) * wt[i];
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
    link_valid = 0; link_data = 0; pf_sync = 0; pf_flash_th = '0; pf_crs_th = '0;
    pf_fin_th = '0; ro_ptr = '0; ro_pstrobe = 0; ro_load = 0; ro_strobe = 0;
    ro_mode = RO_FULL; raddr = '0;
    for (int c = 0; c < 12; c++) for (int j = 0; j < 12; j++) held[c][j] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. configuration
    send(8'h00, {10'b0, 4'hF, 2'd1});           // LUT load, all channels
    send(8'h03, 16'h0);
    for (int i = 0; i < 1024; i++) send(8'h02, 16'(lutf(i)));
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
    // 3. readouts while the pulse train runs
    for (int r = 0; r < 6; r++) begin
      readout((r % 2) ? RO_FILT0 : RO_FULL);
      repeat ($urandom_range(50, 400)) @(negedge clk);
    end
    while (edge_no < NE - 10) @(negedge clk);
    trig_on = 0;
    check(!alarm && mem_status[0][3:0] == 4'b0100, $sformatf("status %b alarm %b", mem_status[0], alarm));
    $display("trigger words=%0d saturated=%0d pulses=%0d mild=%0d severe=%0d",
             n_trig, n_sat, n_pulse, n_mild, n_severe);
    $display("full=%0d filtered=%0d stalls=%0d corrected pointers=%0d flagged words=%0d",
             n_full, n_filt, n_stall, n_psec, n_flagged);
    check(n_sat > 0,   "trigger saturation happened");
    check(n_pulse > 0, "pulse detected");
    check(n_mild > 0,  "mild pile-up");
    check(n_severe > 0, "severe pile-up");
    check(n_full > 0 && n_filt > 0, "both readout modes");
    check(n_stall > 0, "read stall");
    check(n_psec > 0 && dut.u_ro.ptr_sec, "pointer correction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
