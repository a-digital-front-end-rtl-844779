// fermi_pkg: shared widths, types and helper functions of the FERMI
// calorimeter front-end.
//
// The acquisition part has twelve channels on three channel ICs of four
// channels each; nine are used and three are spares.  A sample leaves the
// 10-bit A/D converter, is linearised to 16 bits by a look-up table and is
// stored with two module-level flags as an 18-bit word.  Three used channels
// of one channel IC share a 54-bit memory word, protected by a 7-bit
// single-error-correcting, double-error-detecting (SEC-DED) code to 61 bits.
// Those numbers follow the document; the 10-bit memory address and the flag
// layout of the 18-bit word are this design's choices.
package fermi_pkg;

  localparam int ADC_BITS    = 10;  // A/D converter resolution
  localparam int LIN_BITS    = 16;  // linearised sample
  localparam int CH_PER_IC   = 4;   // channels on one channel IC
  localparam int USED_PER_IC = 3;   // of which used for acquisition
  localparam int N_IC        = 3;   // channel ICs in one FERMI
  localparam int N_CH        = N_IC * CH_PER_IC;    // 12 physical channels
  localparam int N_USED      = N_IC * USED_PER_IC;  // 9 active channels
  localparam int WORD_BITS   = 18;  // stored word: sample + 2 flags
  localparam int MEM_DATA    = USED_PER_IC * WORD_BITS;  // 54
  localparam int TRIG_BITS   = 12;  // first level trigger word
  localparam int ADDR_BITS   = 10;  // data memory address (assumed)

  // Flags produced by the pulse detector, one bit each.
  typedef struct packed {
    logic severe;  // second pulse inside the short window
    logic mild;    // second pulse inside the long window
    logic pulse;   // pulse detected at this bunch crossing
  } cfd_flags_t;

  // The 18-bit word stored for one channel and one bunch crossing.
  typedef struct packed {
    logic                pileup;  // mild or severe pile-up
    logic                pulse;   // module pulse detect
    logic [LIN_BITS-1:0] sample;  // linearised sample
  } mem_word_t;

  // Look-up table operating mode.
  typedef enum logic [1:0] {
    LUT_NORMAL = 2'd0,  // ADC code addresses the table
    LUT_LOAD   = 2'd1,  // table written through W at counter address
    LUT_TEST   = 2'd2,  // counter runs at bunch-crossing rate: test pattern
    LUT_BYPASS = 2'd3   // emergency path around the table
  } lut_mode_e;

  // Readout mode carried with a pointer set.
  typedef enum logic [1:0] {
    RO_FULL  = 2'd0,  // every sample of the time frame
    RO_FILT0 = 2'd1,  // filtered with coefficient bank 0
    RO_FILT1 = 2'd2   // filtered with coefficient bank 1
  } ro_mode_e;

  // Number of Hamming check bits for K data bits (without overall parity).
  function automatic int hamming_bits(int k);
    int p = 0;
    while ((1 << p) < k + p + 1) p++;
    return p;
  endfunction

  // Residue modulo 3 of a signed value, always in 0..2.
  function automatic logic [1:0] mod3(longint v);
    longint r = v % 3;
    if (r < 0) r += 3;
    return 2'(r);
  endfunction

endpackage
