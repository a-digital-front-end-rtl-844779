// data_memory: pipeline memory of one channel IC.
//
// Write side, one word per bunch crossing: each of the four 18-bit channel
// words can be replaced by a diagnostic word (W); the crossover switch keeps
// three of them (54 bits), and a SEC-DED encoder widens them to 61 bits.  The
// write pointer comes from the external address generator as a 15-bit SEC-DED
// code word; it is registered, corrected and registered again.  A diagnostic
// counter can take the place of the pointers.  The memory is two single-port
// banks selected by the address LSB, so successive writes must alternate odd
// and even: a flip-flop toggling at every write is compared with the LSB and
// a mismatch is reported.  A write into an address entered in the ten-cell
// associative memory goes there instead.  Pointer decoding and data encoding
// are duplicated and the copies compared.
//
// Read side: a read request is accepted (rd_ready) whenever it targets the
// bank that is not being written in that cycle.  The word is decoded and
// delivered with its error bits two clocks after acceptance; a word that
// cannot be corrected enters its address into the associative memory.  A spy
// register keeps the last raw code word read.  Sticky status bits report
// corrected and uncorrectable errors, odd/even and duplicate mismatches.
//
// The structure (diagnostic input, crossover, 54/61-bit ECC, pointer ECC,
// odd/even check, toggling banks, associative memory, spy register, two-fold
// redundancy) follows the document.  The 10-bit address, the read arbitration
// and the automatic entry of bad addresses are this design's choices.
module data_memory
  import fermi_pkg::*;
#(
  parameter int AW    = ADDR_BITS,
  parameter int NCH   = CH_PER_IC,
  parameter int NUSED = USED_PER_IC,
  parameter int DW    = NUSED * WORD_BITS,           // 54
  parameter int PA    = hamming_bits(AW),            // pointer check bits
  parameter int PD    = hamming_bits(DW),            // data check bits
  parameter int CW    = DW + PD + 1                  // 61
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // write side
  input  logic                      wr_en,
  input  mem_word_t [NCH-1:0]       ch_in,
  input  logic [NCH-1:0]            diag_en,     // per-channel W select
  input  mem_word_t                 diag_word,
  input  logic [$clog2(NCH)-1:0]    skip,        // channel left out
  input  logic [AW+PA:0]            wr_ptr,      // SEC-DED coded pointer
  input  logic                      addr_diag,   // use internal counter
  // read side
  input  logic                      rd_req,
  input  logic [AW-1:0]             rd_addr,
  output logic                      rd_ready,
  output logic                      rd_valid,
  output mem_word_t [NUSED-1:0]     rd_data,
  output logic                      rd_sec,      // corrected error
  output logic                      rd_ded,      // uncorrectable error
  // fault management and diagnostics
  input  logic                      mark_en,
  input  logic [AW-1:0]             mark_addr,
  input  logic                      status_clear,
  output logic [6:0]                status,
  output logic [CW-1:0]             spy
);
  localparam int HALF = 1 << (AW - 1);

  // ---------------- write path, stage 1 ----------------
  mem_word_t [NCH-1:0]   sel_in;
  mem_word_t [NUSED-1:0] lanes;
  always_comb
    for (int i = 0; i < NCH; i++) sel_in[i] = diag_en[i] ? diag_word : ch_in[i];

  crossover_switch #(.W(WORD_BITS), .N_IN(NCH), .N_OUT(NUSED)) u_x (
    .in(sel_in), .skip(skip), .out(lanes));

  logic [AW+PA:0] ptr_q;
  logic [DW-1:0]  data_q;
  logic           we_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q  <= '0;
      data_q <= '0;
      we_q   <= 1'b0;
    end else begin
      ptr_q  <= wr_ptr;
      data_q <= lanes;
      we_q   <= wr_en;
    end
  end

  // duplicated pointer decoders and data encoders
  logic [1:0][AW-1:0] addr_c;
  logic [1:0]         a_sec, a_ded;
  logic [1:0][CW-1:0] code_c;
  for (genvar r = 0; r < 2; r++) begin : g_red
    secded_dec #(.K(AW)) u_adec (.code(ptr_q), .data(addr_c[r]),
                                 .single_err(a_sec[r]), .double_err(a_ded[r]));
    secded_enc #(.K(DW)) u_denc (.data(data_q), .code(code_c[r]));
  end

  // ---------------- write path, stage 2 ----------------
  logic [AW-1:0] cnt, addr2;
  logic [CW-1:0] code2;
  logic          we2, oddeven;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      addr2   <= '0;
      code2   <= '0;
      we2     <= 1'b0;
      oddeven <= 1'b0;
    end else begin
      addr2 <= addr_diag ? cnt : addr_c[0];
      code2 <= code_c[0];
      we2   <= we_q;
      if (we_q && addr_diag) cnt <= cnt + 1'b1;
      if (we2) oddeven <= ~oddeven;
    end
  end

  logic oe_err;
  assign oe_err = we2 && (addr2[0] != oddeven);

  // ---------------- associative memory ----------------
  logic          cam_wr_hit, cam_rd_hit, cam_full;
  logic [CW-1:0] cam_rd_data;
  logic          auto_mark;
  logic [AW-1:0] rd_addr_q;
  assoc_memory #(.CELLS(10), .AW(AW), .DW(CW)) u_cam (
    .clk, .rst_n,
    .mark_en(mark_en || auto_mark),
    .mark_addr(mark_en ? mark_addr : rd_addr_q),
    .wr_en(we2), .wr_addr(addr2), .wr_data(code2), .wr_hit(cam_wr_hit),
    .rd_addr(rd_addr), .rd_hit(cam_rd_hit), .rd_data(cam_rd_data),
    .full(cam_full));

  // ---------------- two toggling single-port banks ----------------
  logic [CW-1:0] bank0 [HALF];
  logic [CW-1:0] bank1 [HALF];
  logic [CW-1:0] q0, q1;
  logic          rd_acc, rd_bank_q, cam_hit_q;
  logic [CW-1:0] cam_q;

  assign rd_ready = !(we2 && (addr2[0] == rd_addr[0]));
  assign rd_acc   = rd_req && rd_ready;

  always_ff @(posedge clk) begin
    if (we2 && !cam_wr_hit && addr2[0] == 1'b0) bank0[addr2[AW-1:1]] <= code2;
    else if (rd_acc && rd_addr[0] == 1'b0)      q0 <= bank0[rd_addr[AW-1:1]];
  end
  always_ff @(posedge clk) begin
    if (we2 && !cam_wr_hit && addr2[0] == 1'b1) bank1[addr2[AW-1:1]] <= code2;
    else if (rd_acc && rd_addr[0] == 1'b1)      q1 <= bank1[rd_addr[AW-1:1]];
  end

  logic rd_pend;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pend   <= 1'b0;
      rd_bank_q <= 1'b0;
      cam_hit_q <= 1'b0;
      cam_q     <= '0;
      rd_addr_q <= '0;
    end else begin
      rd_pend   <= rd_acc;
      rd_bank_q <= rd_addr[0];
      cam_hit_q <= cam_rd_hit;
      cam_q     <= cam_rd_data;
      rd_addr_q <= rd_addr;
    end
  end

  // ---------------- read decode (duplicated) ----------------
  logic [CW-1:0]      rcode;
  logic [1:0][DW-1:0] rdat;
  logic [1:0]         d_sec, d_ded;
  assign rcode = cam_hit_q ? cam_q : (rd_bank_q ? q1 : q0);
  for (genvar r = 0; r < 2; r++) begin : g_rdec
    secded_dec #(.K(DW)) u_ddec (.code(rcode), .data(rdat[r]),
                                 .single_err(d_sec[r]), .double_err(d_ded[r]));
  end
  assign auto_mark = rd_pend && d_ded[0] && !cam_hit_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_data  <= '0;
      rd_sec   <= 1'b0;
      rd_ded   <= 1'b0;
      spy      <= '0;
    end else begin
      rd_valid <= rd_pend;
      if (rd_pend) begin
        rd_data <= rdat[0];
        rd_sec  <= d_sec[0];
        rd_ded  <= d_ded[0];
        spy     <= rcode;
      end
    end
  end

  // ---------------- sticky status ----------------
  // [0] data corrected  [1] data uncorrectable  [2] pointer corrected
  // [3] pointer uncorrectable  [4] odd/even mismatch  [5] duplicate mismatch
  // [6] associative memory full
  logic red_err;
  assign red_err = (addr_c[0] != addr_c[1]) || (code_c[0] != code_c[1]) ||
                   (rd_pend && (rdat[0] != rdat[1] || d_ded[0] != d_ded[1]));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) status <= '0;
    else if (status_clear) status <= '0;
    else begin
      if (rd_pend && d_sec[0] && !d_ded[0]) status[0] <= 1'b1;
      if (rd_pend && d_ded[0])              status[1] <= 1'b1;
      if (we_q && a_sec[0] && !a_ded[0])    status[2] <= 1'b1;
      if (we_q && a_ded[0])                 status[3] <= 1'b1;
      if (oe_err)                           status[4] <= 1'b1;
      if (red_err)                          status[5] <= 1'b1;
      if (cam_full)                         status[6] <= 1'b1;
    end
  end
endmodule
