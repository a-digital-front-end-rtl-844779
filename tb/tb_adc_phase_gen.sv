// tb_adc_phase_gen: runs the phase generator from a 268 MHz master clock
// and checks, tick by tick after a sync pulse: the 15-ns slot of four
// ticks, the comparator phases (comparison two ticks, reset one, auto-zero
// one, never overlapping), the rotating one-hot slot phases, the role of
// each of the five SU&H circuits (sample, wait, predict, coarse hold, fine
// hold in consecutive slots) and which SU&H drives the coarse and fine
// comparator inputs.
module tb_adc_phase_gen;
  logic clk_master = 0, rst_n = 0, sync;
  logic slot_clk;
  logic [2:0] phi, vin1_sel, vin2_sel;
  logic [4:0] Phi, suh_sample, suh_sync, suh_predict, suh_hold_c, suh_hold_f;
  int checks = 0, failures = 0;

  adc_phase_gen dut (.*);
  always #1.865 clk_master = ~clk_master;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk_master);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, slot, tick;
    sync = 0;
    repeat (3) @(posedge clk_master);
    rst_n = 1;
    repeat (7) @(posedge clk_master);
    @(negedge clk_master) sync = 1;
    @(negedge clk_master) sync = 0;
    // outputs after the sync edge describe tick 0 of slot 0
    for (t = 0; t < 400; t++) begin
      tick = t % 4;
      slot = (t / 4) % 5;
      check(phi[0] == (tick < 2) && phi[1] == (tick == 2) && phi[2] == (tick == 3),
            $sformatf("comparator phases t=%0d phi=%b", t, phi));
      check(slot_clk == (tick < 2), "slot clock");
      check(Phi == 5'(1 << slot), $sformatf("slot phase t=%0d", t));
      for (int i = 0; i < 5; i++) begin
        check(suh_sample[i]  == (slot == i), "SU&H sample");
        check(suh_sync[i]    == (slot == (i + 1) % 5), "SU&H wait");
        check(suh_predict[i] == (slot == (i + 2) % 5), "SU&H predict");
        check(suh_hold_c[i]  == (slot == (i + 3) % 5), "SU&H coarse hold");
        check(suh_hold_f[i]  == (slot == (i + 4) % 5), "SU&H fine hold");
      end
      check(suh_hold_c[vin1_sel] && suh_hold_f[vin2_sel], "comparator input select");
      @(negedge clk_master);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
