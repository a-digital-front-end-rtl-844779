// adc_phase_gen: clock phases of the pipeline flash A/D converter.
//
// A master clock at four times the 67 MHz sampling rate (268 MHz) is
// divided into 15-ns slots of four ticks.  Within each slot the comparators
// of the two-step flash converter get their three phases: comparison (phi1)
// for two ticks, reset (phi2) and auto-zero (phi3) for one tick each.  Five
// subtract-and-hold (SU&H) circuits are interleaved: the slot phases Phi1 to
// Phi5 rotate one per slot, and SU&H i samples in slot i, waits in slot
// i+1 (the extra synchronising phase), subtracts and predicts in slot i+2,
// holds for the coarse comparison in slot i+3 and for the fine comparison in
// slot i+4 (all modulo 5).  The outputs name
// which SU&H drives the coarse (Vin1) and fine (Vin2) comparator inputs.
// `sync` restarts the sequence at tick 0 of slot 0, to align it with the
// bunch crossing clock.
// The 268 MHz master clock, the 2:1:1 comparator phase lengths, five SU&H
// circuits and their phase plan follow the document; the order of the three
// comparator phases in a slot and the registered outputs are this design's.
//
// Timing: all outputs are registered on the master clock.
module adc_phase_gen #(
  parameter int NSUH  = 5,
  parameter int TICKS = 4
) (
  input  logic                     clk_master,
  input  logic                     rst_n,
  input  logic                     sync,
  output logic                     slot_clk,   // 67 MHz sampling clock
  output logic [2:0]               phi,        // [0] phi1 [1] phi2 [2] phi3
  output logic [NSUH-1:0]          Phi,        // slot phases Phi1..Phi5
  output logic [NSUH-1:0]          suh_sample,
  output logic [NSUH-1:0]          suh_sync,
  output logic [NSUH-1:0]          suh_predict,
  output logic [NSUH-1:0]          suh_hold_c,
  output logic [NSUH-1:0]          suh_hold_f,
  output logic [$clog2(NSUH)-1:0]  vin1_sel,
  output logic [$clog2(NSUH)-1:0]  vin2_sel
);
  localparam int SB = $clog2(NSUH);
  logic [$clog2(TICKS)-1:0] tick, tick_n;
  logic [SB-1:0]            slot, slot_n;

  always_comb begin
    tick_n = tick + 1'b1;
    slot_n = slot;
    if (int'(tick) == TICKS - 1) begin
      tick_n = '0;
      slot_n = (int'(slot) == NSUH - 1) ? '0 : slot + 1'b1;
    end
    if (sync) begin
      tick_n = '0;
      slot_n = '0;
    end
  end

  always_ff @(posedge clk_master or negedge rst_n) begin
    if (!rst_n) begin
      tick <= '0; slot <= '0;
      slot_clk <= 1'b0; phi <= '0; Phi <= '0;
      suh_sample <= '0; suh_sync <= '0; suh_predict <= '0;
      suh_hold_c <= '0; suh_hold_f <= '0; vin1_sel <= '0; vin2_sel <= '0;
    end else begin
      tick <= tick_n;
      slot <= slot_n;
      slot_clk <= (int'(tick_n) < TICKS / 2);
      phi[0]   <= (int'(tick_n) < TICKS / 2);
      phi[1]   <= (int'(tick_n) == TICKS / 2);
      phi[2]   <= (int'(tick_n) == TICKS - 1);
      for (int i = 0; i < NSUH; i++) begin
        Phi[i]          <= (int'(slot_n) == i);
        suh_sample[i]   <= (int'(slot_n) == i);
        suh_sync[i] <= (int'(slot_n) == (i + 1) % NSUH);
        suh_predict[i]  <= (int'(slot_n) == (i + 2) % NSUH);
        suh_hold_c[i]   <= (int'(slot_n) == (i + 3) % NSUH);
        suh_hold_f[i]   <= (int'(slot_n) == (i + 4) % NSUH);
      end
      vin1_sel <= SB'((int'(slot_n) + NSUH - 3) % NSUH);
      vin2_sel <= SB'((int'(slot_n) + NSUH - 4) % NSUH);
    end
  end
endmodule
