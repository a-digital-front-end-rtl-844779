// readout_controller: output stage of a FERMI module - frame pointer buffer,
// readout sequencer, digital filter and readout register.
//
// An external controller sends the pointers of a requested time frame, one
// per pstrobe, as SEC-DED coded words (a diagnostic register can replace
// them).  Each pointer is registered, corrected and registered again before
// it enters the frame pointer buffer (FPB); corrected and uncorrectable
// pointer errors are reported.  `load` ends the set, latches the mode and
// starts the readout at once.  For every active channel in turn the
// sequencer reads the frame's samples from the data memory.  In full mode
// each sample, with its error bits, is placed in the readout register; in
// filtered mode the samples go through the inner-product filter with the
// coefficient bank the mode names, and only the result is placed there.  The
// sequencer waits until the register has been read (`strobe`) before it
// produces the next datum.  A diagnostic register can replace the memory
// data to check the output path.
//
// Pointer ECC, FPB, mode with two coefficient banks, start on load, one
// datum per read, diagnostic registers and multiplexers follow the
// document.  The channel-by-channel order, the 16-pointer FPB and the 32-bit
// output word layout are this design's choices:
//   full:     {channel[3:0], 7'b0, ptr_ded, mem_ded, mem_sec, word[17:0]}
//   filtered: {channel[3:0], result[27:0]} with out_filt = 1.
module readout_controller
  import fermi_pkg::*;
#(
  parameter int AW    = ADDR_BITS,
  parameter int PA    = hamming_bits(AW),
  parameter int NPTR  = 16,
  parameter int NCHAN = N_USED,
  parameter int WW    = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // pointer input
  input  logic [AW+PA:0]           ptr_code,
  input  logic                     pstrobe,
  input  logic                     load,
  input  ro_mode_e                 mode,
  input  logic                     ptr_diag_en,
  input  logic [AW+PA:0]           ptr_diag,
  // data memory read port
  output logic                     mem_rd_req,
  output logic [AW-1:0]            mem_rd_addr,
  input  logic                     mem_rd_ready,
  input  logic                     mem_rd_valid,
  input  mem_word_t [NCHAN-1:0]    mem_rd_data,
  input  logic                     mem_rd_sec,
  input  logic                     mem_rd_ded,
  input  logic                     data_diag_en,
  input  mem_word_t                data_diag,
  // filter coefficient load
  input  logic                     cw_en,
  input  logic                     cw_bank,
  input  logic [$clog2(NPTR)-1:0]  cw_idx,
  input  logic signed [WW-1:0]     cw_weight,
  input  logic [1:0]               cw_res,
  // readout register
  output logic [31:0]              out_data,
  output logic                     out_valid,
  output logic                     out_filt,
  output logic                     out_err,    // filter residue check
  input  logic                     strobe,     // register has been read
  output logic                     busy,
  output logic                     ptr_sec,    // sticky
  output logic                     ptr_ded     // sticky
);
  // ---------------- pointer path: R, ECC DEC, R, FPB ----------------
  logic [AW+PA:0] p1;
  logic           s1, s2;
  logic [AW-1:0]  p2, pdec;
  logic           psec, pded, ded2;
  secded_dec #(.K(AW)) u_pdec (.code(p1), .data(pdec), .single_err(psec), .double_err(pded));

  logic [AW-1:0]           fpb [NPTR];
  logic [NPTR-1:0]         fpb_bad;
  logic [$clog2(NPTR):0]   nptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1 <= '0; s1 <= 1'b0; p2 <= '0; s2 <= 1'b0; ded2 <= 1'b0;
      ptr_sec <= 1'b0; ptr_ded <= 1'b0;
    end else begin
      p1 <= ptr_diag_en ? ptr_diag : ptr_code;
      s1 <= pstrobe && !busy;
      p2 <= pdec;
      s2 <= s1;
      ded2 <= pded;
      if (s1 && psec && !pded) ptr_sec <= 1'b1;
      if (s1 && pded)          ptr_ded <= 1'b1;
    end
  end

  // ---------------- sequencer ----------------
  typedef enum logic [2:0] {IDLE, REQ, WAITD, FWAIT, OUTW} st_e;
  st_e                      st;
  ro_mode_e                 mode_q;
  logic [$clog2(NCHAN)-1:0] ch;
  logic [$clog2(NPTR):0]    pi;
  logic                     load_d1, load_d2;
  mem_word_t                word;
  logic                     last;

  assign last = (pi == nptr - 1'b1);
  assign mem_rd_req  = (st == REQ);
  assign mem_rd_addr = fpb[pi[$clog2(NPTR)-1:0]];
  assign busy = (st != IDLE);

  always_comb word = data_diag_en ? data_diag : mem_rd_data[ch];

  // filter
  logic                      f_start, f_xv, f_yv, f_err;
  logic signed [27:0]        f_y;
  assign f_xv = (st == WAITD) && mem_rd_valid && (mode_q != RO_FULL);
  digital_filter #(.XW(LIN_BITS), .WW(WW), .NMAX(NPTR)) u_filt (
    .clk, .rst_n,
    .cw_en, .cw_bank, .cw_idx, .cw_weight, .cw_res,
    .start(f_start), .bank(mode_q == RO_FILT1),
    .x_valid(f_xv), .x(word.sample), .x_last(last),
    .y_valid(f_yv), .y(f_y), .err(f_err));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; mode_q <= RO_FULL; ch <= '0; pi <= '0; nptr <= '0;
      fpb_bad <= '0; load_d1 <= 1'b0; load_d2 <= 1'b0; f_start <= 1'b0;
      out_data <= '0; out_valid <= 1'b0; out_filt <= 1'b0; out_err <= 1'b0;
    end else begin
      f_start <= 1'b0;
      // load is delayed to follow the last pointer through the ECC stages
      load_d1 <= load && !busy;
      load_d2 <= load_d1;
      if (s2 && st == IDLE && int'(nptr) < NPTR) begin
        fpb[nptr[$clog2(NPTR)-1:0]]     <= p2;
        fpb_bad[nptr[$clog2(NPTR)-1:0]] <= ded2;
        nptr <= nptr + 1'b1;
      end
      if (strobe) out_valid <= 1'b0;
      unique case (st)
        IDLE: if (load_d2 && nptr != '0) begin
          mode_q  <= mode;
          ch      <= '0;
          pi      <= '0;
          f_start <= 1'b1;
          st      <= REQ;
        end
        REQ:   if (mem_rd_ready) st <= WAITD;
        WAITD: if (mem_rd_valid) begin
          if (mode_q == RO_FULL) begin
            out_data  <= {4'(ch), 7'b0, fpb_bad[pi[$clog2(NPTR)-1:0]],
                          mem_rd_ded, mem_rd_sec, word};
            out_valid <= 1'b1;
            out_filt  <= 1'b0;
            out_err   <= 1'b0;
            st        <= OUTW;
          end else if (last) st <= FWAIT;
          else begin
            pi <= pi + 1'b1;
            st <= REQ;
          end
        end
        FWAIT: if (f_yv) begin
          out_data  <= {4'(ch), f_y};
          out_valid <= 1'b1;
          out_filt  <= 1'b1;
          out_err   <= f_err;
          st        <= OUTW;
        end
        OUTW: if (strobe || !out_valid) begin
          // the datum has been read: move on
          if (mode_q == RO_FULL && !last) begin
            pi <= pi + 1'b1;
            st <= REQ;
          end else if (ch == $clog2(NCHAN)'(NCHAN - 1)) begin
            nptr    <= '0;
            fpb_bad <= '0;
            st      <= IDLE;
          end else begin
            ch      <= ch + 1'b1;
            pi      <= '0;
            f_start <= 1'b1;
            st      <= REQ;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
