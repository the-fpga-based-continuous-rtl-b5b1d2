// tb_bbq_dfs: self-checking test of the chirp synthesiser. After each
// excitation trigger it samples dac_out 34 clocks after every sample strobe
// and compares it with round(amp * sin(2 pi phase / 2^40)), where the 40-bit
// phase and the frequency sweep (start, increment, clamp at end) are
// modelled here in 64-bit integers. Covers an up-chirp, a down-chirp, the
// end of a chirp after 'length' samples (output returns to zero), a
// continuous tone (length 0), a restart by a new trigger and 'stop'.
module tb_bbq_dfs;
  import bbq_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  dfs_cfg_t           cfg = '0;
  logic               trig = 0, stop = 0, smp_stb = 0;
  logic signed [23:0] dac_out;
  logic               active;

  bbq_dfs dut (.clk, .rst_n, .cfg, .trig, .stop, .smp_stb, .dac_out, .active);

  int checks = 0, failures = 0;

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  task automatic chirp(input dfs_cfg_t c, input int nsmp);
    longint unsigned ph, fr;
    longint          nf;
    real             e;
    @(negedge clk);
    cfg = c; trig = 1;
    @(negedge clk);
    trig = 0;
    cfg = '0;                        // the chirp keeps its own copy
    ph = 0; fr = 64'(c.f_start);
    for (int i = 0; i < nsmp; i++) begin
      smp_stb = 1;
      @(negedge clk);
      smp_stb = 0;
      repeat (33) @(negedge clk);
      if (c.length == 0 || i < int'(c.length)) begin
        e = real'(c.amp) * $sin(2.0 * PI * real'(ph >> 8) / 4294967296.0);
        chk($sformatf("sample %0d: %0d expected %0f", i, dac_out, e),
            real'(dac_out) - e < 2.0 && e - real'(dac_out) < 2.0);
        ph = (ph + fr) & 64'hFF_FFFF_FFFF;
        nf = longint'(fr) + longint'(c.f_inc);
        if (c.f_inc >= 0) fr = (nf > longint'(c.f_end)) ? 64'(c.f_end) : 64'(nf);
        else              fr = (nf < longint'(c.f_end)) ? 64'(c.f_end) : 64'(nf);
      end else begin
        chk($sformatf("zero after chirp end, sample %0d", i), dac_out == 0 && !active);
      end
      repeat (4) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // up-chirp 0.01 -> 0.05 of the sample rate, clamped before its end
    chirp('{f_start: 40'd10995116278, f_end: 40'd54975581389, f_inc: 40'sd400000000,
            length: 32'd150, amp: 24'd8000000}, 170);
    // down-chirp 0.3 -> 0.2, runs into the clamp
    chirp('{f_start: 40'd329853488333, f_end: 40'd219902325555, f_inc: -40'sd2000000000,
            length: 32'd80, amp: 24'd1234567}, 90);
    // continuous tone, then a restart, then stop
    chirp('{f_start: 40'd137438953472, f_end: 40'd137438953472, f_inc: 40'sd0,
            length: 32'd0, amp: 24'd8388607}, 40);
    chirp('{f_start: 40'd1099511627, f_end: 40'd1099511627, f_inc: 40'sd0,
            length: 32'd0, amp: 24'd100000}, 20);
    chk("tone active", active);
    @(negedge clk); stop = 1; @(negedge clk); stop = 0;
    smp_stb = 1; @(negedge clk); smp_stb = 0; repeat (40) @(negedge clk);
    chk("stopped", !active && dac_out == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
