// tb_bbq_trigger: self-checking test of the trigger generator. Millisecond,
// turn and sample strobes run on fixed, mutually unaligned periods. For each
// scenario the expected trigger clocks are derived here from the event lists:
// every period-th source event, then (millisecond source) the next turn tick,
// then the next sample strobe, trigger one clock later; excitation after the
// exc_delay-th following sample strobe on every exc_every-th acquisition.
// Scenarios: software start on the millisecond clock with delayed excitation,
// start-of-cycle start on the turn clock, stop, and an immediate excitation.
module tb_bbq_trigger;
  import bbq_pkg::*;

  localparam int T = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  trig_cfg_t cfg = '0;
  logic cmd_start = 0, cmd_arm = 0, cmd_stop = 0, soc = 0;
  logic ms_tick = 0, turn_tick = 0, smp_stb = 0;
  logic acq_trig, exc_trig, running, armed;

  bbq_trigger dut (.clk, .rst_n, .cfg, .cmd_start, .cmd_arm, .cmd_stop, .soc,
                   .ms_tick, .turn_tick, .smp_stb, .acq_trig, .exc_trig, .running, .armed);

  int checks = 0, failures = 0;
  bit ms_a [T], turn_a [T], smp_a [T];
  bit exp_acq [T], exp_exc [T];

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  function automatic int next_ev(input int from, input bit turn);
    for (int c = from; c < T; c++) if (turn ? turn_a[c] : smp_a[c]) return c;
    return T;
  endfunction

  // expected triggers for a run starting (running) in the clock after 'st'
  // and stopped at clock 'sp' (no events at or after sp count)
  task automatic expect_run(input int st, input int sp);
    int nev, nacq, s, d;
    nev = 0; nacq = 0;
    for (int c = 0; c < T; c++) begin exp_acq[c] = 0; exp_exc[c] = 0; end
    for (int c = st + 1; c < sp; c++) begin
      if (cfg.src_turn ? turn_a[c] : ms_a[c]) begin
        if (nev % (cfg.period == 0 ? 1 : int'(cfg.period)) == 0) begin
          s = cfg.src_turn ? next_ev(c + 1, 0) : next_ev(next_ev(c + 1, 1) + 1, 0);
          if (s < sp && s + 1 < T) begin
            exp_acq[s + 1] = 1;
            nacq++;
            if (cfg.exc_every != 0 && nacq % int'(cfg.exc_every) == 0) begin
              d = s;
              for (int k = 0; k < int'(cfg.exc_delay); k++) d = next_ev(d + 1, 0);
              if (d + 1 < T) exp_exc[d + 1] = 1;
            end
          end
        end
        nev++;
      end
    end
  endtask

  // drive the recorded strobes and compare
  task automatic play(input int start_at, input bit arm, input int soc_at, input int stop_at);
    int nacq;
    nacq = 0;
    for (int c = 0; c < T; c++) begin
      @(negedge clk);
      chk($sformatf("acq_trig at %0d exp %0d", c, exp_acq[c]), acq_trig == exp_acq[c]);
      chk($sformatf("exc_trig at %0d exp %0d", c, exp_exc[c]), exc_trig == exp_exc[c]);
      nacq += int'(acq_trig);
      ms_tick = ms_a[c]; turn_tick = turn_a[c]; smp_stb = smp_a[c];
      cmd_start = !arm && (c == start_at);
      cmd_arm = arm && (c == start_at);
      soc = (c == soc_at);
      cmd_stop = (c == stop_at);
      if (arm && c > start_at && c <= soc_at) chk("armed", armed && !running);
    end
    @(negedge clk);
    cmd_stop = 1; @(negedge clk); cmd_stop = 0;
    chk($sformatf("some triggers (%0d)", nacq), nacq > 2);
  endtask

  initial begin
    for (int c = 0; c < T; c++) begin
      ms_a[c] = (c % 97 == 50);
      turn_a[c] = (c % 23 == 7);
      smp_a[c] = (c % 5 == 3);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // software start, millisecond source, every 2nd ms, excitation on every
    // 2nd acquisition 3 samples later
    cfg = '{src_turn: 1'b0, period: 16'd2, exc_every: 8'd2, exc_delay: 16'd3};
    expect_run(100, T);
    play(100, 0, -1, -1);
    // armed start on start-of-cycle, turn source every 3rd turn, immediate
    // excitation on each acquisition, stopped at 2500
    cfg = '{src_turn: 1'b1, period: 16'd3, exc_every: 8'd1, exc_delay: 16'd0};
    expect_run(1200, 2500);
    play(40, 1, 1200, 2500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
