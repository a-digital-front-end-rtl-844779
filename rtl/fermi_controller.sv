// fermi_controller: control unit of the FERMI service part.
//
// Commands arrive on two serial links, a main one and a back-up one with the
// same command set, each a 25-bit frame sent MSB first while the link's
// valid line is high: 8-bit register address, 16-bit data and an even parity
// bit.  A frame with wrong parity is dropped and counted in link_err; a gap
// in valid restarts the frame.  When both links complete a frame in the same
// cycle the main link wins.  Each good frame writes one register, and some
// addresses also issue a strobe:
//   0x00 [1:0] LUT mode (all channels), [5:2] LUT channel (15 = all)
//   0x01 [11:0] per-channel bypass of the LUT, for a channel whose table
//        failed when no spare is left
//   0x02 LUT word: written through the W register of the selected LUTs
//   0x03 LUT counter clear
//   0x04 [11:0] channel enables of the trigger sum
//   0x05 [5:0] left-out channel of each channel IC (2 bits per IC)
//   0x06 [3:0] integration length, [8:4] trigger shift
//   0x07 [1:0] CFD delay, [5:2] CFD fraction, [8:6] flag alignment
//   0x08 CFD veto level
//   0x09 [5:0] severe window, [11:6] mild window
//   0x0A [3:0] diagnostic word select, [4] counter addressing,
//        [5] readout data diagnostic, [6] pointer diagnostic
//   0x0B status clear (strobe)
//   0x0C diagnostic sample word
//   0x0D [9:0] address to enter as faulty, [11:10] channel IC (strobe)
//   0x0E diagnostic pointer code
//   0x10 [7:0] filter weight, [8] bank, [12:9] index (strobe; the residue
//        modulo 3 is computed here and stored with the weight)
//   0x11 [11:0] calibration amplitude, and fire one calibration pulse
//   0x12 DC level
//   0x13 [0] clock enable
//   0x14 clock burst: enable the clock for this many cycles
//   0x15 [7:0] clock phase adjustment
// The controller also watches the error inputs of the module and raises a
// sticky alarm.  Its duties (programming every feature, supervising the
// module and the links, back-up link, calibration pulses, loading test
// patterns into the LUT, clock enable, bursts and phase) follow the document;
// the frame format and register map are this design's choices.
// Timing: a register changes two clocks after the last bit of its frame.
module fermi_controller
  import fermi_pkg::*;
#(
  parameter int NERR = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        link_valid,   // [0] main, [1] back-up
  input  logic [1:0]        link_data,
  input  logic [NERR-1:0]   err_in,       // error reports of the module
  // LUT
  output lut_mode_e         lut_mode,
  output logic [N_CH-1:0]   lut_bypass,   // per-channel emergency bypass
  output logic [N_CH-1:0]   lut_wr,
  output logic [15:0]       lut_wdata,
  output logic              lut_cnt_clear,
  // trigger
  output logic [N_CH-1:0]   ch_enable,
  output logic [N_IC-1:0][1:0] skip,
  output logic [3:0]        integ_len,
  output logic [4:0]        trig_shift,
  output logic [1:0]        cfd_delay,
  output logic [3:0]        cfd_frac,
  output logic [2:0]        cfd_align,
  output logic [15:0]       cfd_veto,
  output logic [5:0]        win_short,
  output logic [5:0]        win_long,
  // memory and readout diagnostics
  output logic [3:0]        diag_en,
  output logic              addr_diag,
  output logic              data_diag_en,
  output logic              ptr_diag_en,
  output logic              status_clear,
  output logic [15:0]       diag_sample,
  output logic [N_IC-1:0]   mark_en,
  output logic [9:0]        mark_addr,
  output logic [14:0]       ptr_diag,
  // filter coefficients
  output logic              cw_en,
  output logic              cw_bank,
  output logic [3:0]        cw_idx,
  output logic signed [7:0] cw_weight,
  output logic [1:0]        cw_res,
  // calibration, DC level and clock server
  output logic              cal_pulse,
  output logic [11:0]       cal_amp,
  output logic [15:0]       dc_level,
  output logic              clk_en,
  output logic [7:0]        clk_phase,
  // supervision
  output logic              alarm,
  output logic [7:0]        link_err
);
  localparam int FB = 25;

  // ---------------- frame receivers ----------------
  logic [1:0][FB-1:0] sh;
  logic [1:0][4:0]    nb;
  logic [1:0]         done, bad;
  logic [1:0][FB-1:0] frame;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; nb <= '0; done <= '0; bad <= '0; frame <= '0;
    end else begin
      for (int l = 0; l < 2; l++) begin
        done[l] <= 1'b0;
        bad[l]  <= 1'b0;
        if (!link_valid[l]) nb[l] <= '0;
        else begin
          sh[l] <= {sh[l][FB-2:0], link_data[l]};
          if (nb[l] == 5'(FB - 1)) begin
            nb[l]    <= '0;
            frame[l] <= {sh[l][FB-2:0], link_data[l]};
            if (^{sh[l][FB-2:0], link_data[l]}) bad[l] <= 1'b1;
            else                                 done[l] <= 1'b1;
          end else nb[l] <= nb[l] + 1'b1;
        end
      end
    end
  end

  logic        cmd;
  logic [7:0]  addr;
  logic [15:0] data;
  always_comb begin
    cmd  = done[0] || done[1];
    addr = done[0] ? frame[0][24:17] : frame[1][24:17];
    data = done[0] ? frame[0][16:1]  : frame[1][16:1];
  end

  // ---------------- registers and strobes ----------------
  logic [3:0]  lut_ch;
  logic        clk_on;
  logic [15:0] burst;
  logic [NERR-1:0] err_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lut_mode <= LUT_NORMAL; lut_bypass <= '0; lut_ch <= 4'hF; lut_wr <= '0; lut_wdata <= '0;
      lut_cnt_clear <= 1'b0;
      ch_enable <= '1;
      for (int i = 0; i < N_IC; i++) skip[i] <= 2'd3;
      integ_len <= 4'd1; trig_shift <= '0;
      cfd_delay <= 2'd1; cfd_frac <= 4'd8; cfd_align <= '0; cfd_veto <= '0;
      win_short <= 6'd2; win_long <= 6'd8;
      diag_en <= '0; addr_diag <= 1'b0; data_diag_en <= 1'b0; ptr_diag_en <= 1'b0;
      status_clear <= 1'b0; diag_sample <= '0; mark_en <= '0; mark_addr <= '0;
      ptr_diag <= '0;
      cw_en <= 1'b0; cw_bank <= 1'b0; cw_idx <= '0; cw_weight <= '0; cw_res <= '0;
      cal_pulse <= 1'b0; cal_amp <= '0; dc_level <= '0;
      clk_on <= 1'b1; burst <= '0; clk_phase <= '0;
      err_seen <= '0; link_err <= '0;
    end else begin
      lut_wr <= '0; lut_cnt_clear <= 1'b0; status_clear <= 1'b0;
      mark_en <= '0; cw_en <= 1'b0; cal_pulse <= 1'b0;
      if (burst != '0) burst <= burst - 1'b1;
      err_seen <= err_seen | err_in;
      if ((bad[0] || bad[1]) && link_err != 8'hFF) link_err <= link_err + 1'b1;
      if (cmd) begin
        unique case (addr)
          8'h00: begin lut_mode <= lut_mode_e'(data[1:0]); lut_ch <= data[5:2]; end
          8'h01: lut_bypass <= data[N_CH-1:0];
          8'h02: begin
            lut_wdata <= data;
            for (int c = 0; c < N_CH; c++)
              lut_wr[c] <= (lut_ch == 4'hF) || (int'(lut_ch) == c);
          end
          8'h03: lut_cnt_clear <= 1'b1;
          8'h04: ch_enable <= data[N_CH-1:0];
          8'h05: for (int i = 0; i < N_IC; i++) skip[i] <= data[2*i +: 2];
          8'h06: begin integ_len <= data[3:0]; trig_shift <= data[8:4]; end
          8'h07: begin cfd_delay <= data[1:0]; cfd_frac <= data[5:2]; cfd_align <= data[8:6]; end
          8'h08: cfd_veto <= data;
          8'h09: begin win_short <= data[5:0]; win_long <= data[11:6]; end
          8'h0A: begin
            diag_en <= data[3:0]; addr_diag <= data[4];
            data_diag_en <= data[5]; ptr_diag_en <= data[6];
          end
          8'h0B: begin status_clear <= 1'b1; err_seen <= '0; end
          8'h0C: diag_sample <= data;
          8'h0D: begin
            mark_addr <= data[9:0];
            for (int i = 0; i < N_IC; i++) mark_en[i] <= (int'(data[11:10]) == i);
          end
          8'h0E: ptr_diag <= data[14:0];
          8'h10: begin
            cw_en     <= 1'b1;
            cw_weight <= data[7:0];
            cw_bank   <= data[8];
            cw_idx    <= data[12:9];
            cw_res    <= mod3(longint'($signed(data[7:0])));
          end
          8'h11: begin cal_amp <= data[11:0]; cal_pulse <= 1'b1; end
          8'h12: dc_level <= data;
          8'h13: clk_on <= data[0];
          8'h14: burst <= data;
          8'h15: clk_phase <= data[7:0];
          default: ;
        endcase
      end
    end
  end

  assign clk_en = clk_on || (burst != '0);
  assign alarm  = (err_seen != '0) || (link_err != '0);
endmodule
