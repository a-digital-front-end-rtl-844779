// tb_fermi_controller: sends command frames on the main and the back-up
// link and checks the register they set or the strobe they issue: LUT mode
// and per-channel LUT write, channel enables, left-out channels, trigger and
// discriminator settings, a weight with its residue modulo 3 (negative
// weights included), a calibration pulse, a clock burst of exact length
// with the clock otherwise disabled, a frame with bad parity (dropped and
// counted), and the alarm raised by an error input.  It then sends 300
// random frames to random registers (per-channel LUT bypass included), on either link or on both at once
// (the main link must win), some with bad parity, and compares every
// register output with a model after each frame.
module tb_fermi_controller;
  import fermi_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] link_valid, link_data;
  logic [7:0] err_in;
  lut_mode_e  lut_mode;
  logic [11:0] lut_wr, ch_enable, lut_bypass;
  logic [15:0] lut_wdata, cfd_veto, diag_sample, dc_level;
  logic lut_cnt_clear, addr_diag, data_diag_en, ptr_diag_en, status_clear;
  logic [2:0][1:0] skip;
  logic [3:0] integ_len, cfd_frac, diag_en, cw_idx;
  logic [4:0] trig_shift;
  logic [1:0] cfd_delay, cw_res;
  logic [2:0] cfd_align, mark_en;
  logic [5:0] win_short, win_long;
  logic [9:0] mark_addr;
  logic [14:0] ptr_diag;
  logic cw_en, cw_bank, cal_pulse, clk_en, alarm;
  logic signed [7:0] cw_weight;
  logic [11:0] cal_amp;
  logic [7:0] clk_phase, link_err;
  int checks = 0, failures = 0;

  fermi_controller dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one frame; returns at the negedge after the last bit
  task automatic send(int l, logic [7:0] a, logic [15:0] d, bit badpar = 0);
    logic [24:0] f;
    f = {a, d, ^{a, d} ^ badpar};
    for (int i = 24; i >= 0; i--) begin
      @(negedge clk);
      link_valid[l] = 1; link_data[l] = f[i];
    end
    @(negedge clk);
    link_valid[l] = 0;
  endtask

  // watch strobes
  int n_lutwr [12];
  int n_cw = 0, n_cal = 0;
  always @(negedge clk) begin
    for (int c = 0; c < 12; c++) if (lut_wr[c]) n_lutwr[c]++;
    if (cw_en) n_cw++;
    if (cal_pulse) n_cal++;
  end

  initial begin
    link_valid = 0; link_data = 0; err_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(clk_en && !alarm && lut_mode == LUT_NORMAL, "reset state");
    send(0, 8'h00, {10'b0, 4'd5, 2'd1});
    @(negedge clk);
    check(lut_mode == LUT_LOAD, "LUT mode");
    send(0, 8'h02, 16'hBEEF);
    repeat (2) @(negedge clk);
    check(n_lutwr[5] == 1 && n_lutwr[4] == 0 && lut_wdata == 16'hBEEF, "LUT write to channel 5 only");
    send(1, 8'h04, 16'h0A5A);                 // back-up link
    @(negedge clk);
    check(ch_enable == 12'hA5A, "channel enables over back-up link");
    send(0, 8'h05, {10'b0, 2'd0, 2'd2, 2'd1});
    @(negedge clk);
    check(skip[0] == 1 && skip[1] == 2 && skip[2] == 0, "left-out channels");
    send(1, 8'h06, {7'b0, 5'd7, 4'd6});
    send(0, 8'h07, {7'b0, 3'd4, 4'd9, 2'd3});
    send(0, 8'h08, 16'd1234);
    send(0, 8'h09, {4'b0, 6'd20, 6'd4});
    @(negedge clk);
    check(integ_len == 6 && trig_shift == 7, "trigger settings");
    check(cfd_delay == 3 && cfd_frac == 9 && cfd_align == 4 && cfd_veto == 1234, "CFD settings");
    check(win_short == 4 && win_long == 20, "pile-up windows");
    for (int w = -128; w < 128; w += 37) begin
      int r;
      send(0, 8'h10, {3'b0, 4'd3, 1'b1, 8'(w)});
      @(negedge clk);
      r = w % 3; if (r < 0) r += 3;
      check(cw_weight == 8'(w) && cw_bank && cw_idx == 3 && cw_res == 2'(r),
            $sformatf("weight %0d residue %0d", w, cw_res));
    end
    send(0, 8'h11, 16'h0123);
    @(negedge clk);
    @(negedge clk);
    check(n_cal == 1 && cal_amp == 12'h123, $sformatf("calibration pulse n=%0d amp=%h", n_cal, cal_amp));
    check(n_cw == 7, "one coefficient write per frame");
    // clock server: disable, then a burst of 10 clocks
    send(0, 8'h13, 16'h0000);
    @(negedge clk);
    check(!clk_en, "clock disabled");
    begin
      int cnt;
      send(0, 8'h14, 16'd10);
      cnt = 0;
      repeat (40) begin
        @(negedge clk);
        if (clk_en) cnt++;
      end
      check(cnt == 10, $sformatf("burst length %0d", cnt));
    end
    send(0, 8'h13, 16'h0001);
    // bad parity is dropped and counted
    send(0, 8'h12, 16'h7777, 1);
    @(negedge clk);
    check(dc_level == 0 && link_err == 1, "bad frame dropped");
    send(0, 8'h12, 16'h7777);
    @(negedge clk);
    check(dc_level == 16'h7777 && clk_en, "DC level");
    check(alarm, "alarm on link error");
    send(0, 8'h0B, 16'h0);
    @(negedge clk);
    err_in = 8'h04;
    @(negedge clk);
    err_in = 0;
    @(negedge clk);
    check(alarm, "alarm on error input");

    // random register traffic on both links against a register model
    begin
      logic [15:0] m [logic [7:0]];
      logic [7:0] regs [13] = '{8'h00, 8'h01, 8'h04, 8'h05, 8'h06, 8'h07, 8'h08, 8'h09,
                                8'h0A, 8'h0C, 8'h0E, 8'h12, 8'h15};
      m[8'h00] = {10'b0, 4'd5, 2'd1}; m[8'h04] = 16'h0A5A; m[8'h05] = {10'b0, 2'd0, 2'd2, 2'd1};
      m[8'h06] = {7'b0, 5'd7, 4'd6}; m[8'h07] = {7'b0, 3'd4, 4'd9, 2'd3}; m[8'h08] = 16'd1234;
      m[8'h09] = {4'b0, 6'd20, 6'd4}; m[8'h0A] = 0; m[8'h0C] = 0; m[8'h0E] = 0;
      m[8'h12] = 16'h7777; m[8'h15] = 0; m[8'h01] = 0;
      for (int n = 0; n < 300; n++) begin
        logic [7:0] a, a2;
        logic [15:0] d, d2;
        int mode;
        a = regs[$urandom_range(0, 12)]; d = 16'($urandom);
        if (a == 8'h00 && d[1:0] == 2'd1) d[1:0] = 2'd0;
        mode = $urandom_range(0, 3);
        if (mode == 3) begin
          // both links complete a frame in the same clock: main wins
          logic [24:0] f0, f1;
          a2 = regs[$urandom_range(0, 12)]; d2 = 16'($urandom);
          if (a2 == 8'h00 && d2[1:0] == 2'd1) d2[1:0] = 2'd0;
          f0 = {a, d, ^{a, d}}; f1 = {a2, d2, ^{a2, d2}};
          for (int i = 24; i >= 0; i--) begin
            @(negedge clk);
            link_valid = 2'b11; link_data = {f1[i], f0[i]};
          end
          @(negedge clk);
          link_valid = 0;
        end else send(mode % 2, a, d, mode == 2 && n % 5 == 0);
        if (!(mode == 2 && n % 5 == 0)) m[a] = d;
        @(negedge clk);
        check(lut_mode == lut_mode_e'(m[8'h00][1:0]) && lut_bypass == m[8'h01][11:0] && ch_enable == m[8'h04][11:0] &&
              skip[0] == m[8'h05][1:0] && skip[1] == m[8'h05][3:2] && skip[2] == m[8'h05][5:4],
              $sformatf("frame %0d lut/enable/skip", n));
        check(integ_len == m[8'h06][3:0] && trig_shift == m[8'h06][8:4] &&
              cfd_delay == m[8'h07][1:0] && cfd_frac == m[8'h07][5:2] && cfd_align == m[8'h07][8:6] &&
              cfd_veto == m[8'h08] && win_short == m[8'h09][5:0] && win_long == m[8'h09][11:6],
              $sformatf("frame %0d trigger/CFD", n));
        check(diag_en == m[8'h0A][3:0] && addr_diag == m[8'h0A][4] && data_diag_en == m[8'h0A][5] &&
              ptr_diag_en == m[8'h0A][6] && diag_sample == m[8'h0C] && ptr_diag == m[8'h0E][14:0] &&
              dc_level == m[8'h12] && clk_phase == m[8'h15][7:0],
              $sformatf("frame %0d diagnostics/analog", n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
