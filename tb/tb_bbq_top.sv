// tb_bbq_top: end-to-end test of the processing chain at a reduced buffer
// size (LMAX = 6, frames of up to 64 samples).
//
// A behavioural codec model on the serial port supplies a horizontal and a
// vertical tone plus, on H, a quarter of the DAC word it received (the
// synthesiser output looped back as in a transfer-function measurement);
// every parallel sample out of the serial port is checked against the word
// sent. Every frame the chain produces is read back through the host
// port and compared bin by bin with a reference computed here from the
// samples actually driven: FIR (loaded coefficients), every 2nd sample kept,
// window, zero padding, DFT / N. Three phases exercise the mechanisms of the
// design and each is counted (a mechanism that never happened is a failure):
//   1. turn-clock triggers, software start, 64-sample Hann frames with 25 %
//      overlap, chirp excitation on every 2nd frame;
//   2. millisecond-clock triggers started by a start-of-cycle pulse after
//      arming, 32-sample Blackman-Harris frames (zero padded to 64);
//   3. triggers faster than two buffers can take (overrun), host slow;
//   4. internal loop back of two steady synthesiser tones into the filters.
module tb_bbq_top;
  import bbq_pkg::*;

  localparam int  LMAX   = 6;
  localparam int  NTAPS  = 32;
  localparam int  BITC   = 2;      // clocks per codec bit clock: 128 per sample
  localparam int  DEC    = 2;
  localparam int  MAXS   = 40000;  // codec samples recorded
  localparam real PI     = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               codec_sclk, codec_lrck, codec_sdout, codec_sdin;
  logic signed [23:0] m_h = 0, m_v = 0, m_dac_h, m_dac_v;
  int                 m_frames;
  logic               ms_tick = 0, turn_tick = 0, soc = 0;
  logic               cfg_loopback = 0;
  logic [7:0]         cfg_decim = DEC;
  logic               coef_we = 0;
  logic [4:0]         coef_addr = 0;
  logic signed [17:0] coef_data = 0;
  logic [4:0]         cfg_log2n = 6;
  win_e               cfg_wsel = WIN_HANN;
  trig_cfg_t          cfg_trig = '0;
  dfs_cfg_t           cfg_dfs_h = '0, cfg_dfs_v = '0;
  logic               cmd_start = 0, cmd_arm = 0, cmd_stop = 0;
  logic [1:0]         ready, host_release = 0;
  logic               host_buf = 0, host_plane = 0;
  logic [LMAX-1:0]    host_bin = 0;
  logic signed [31:0] host_re, host_im;
  logic [4:0]         host_log2n;
  logic [15:0]        frames, overruns;
  logic [1:0]         frame_overflow, exc_active;
  logic               running, armed, acq_trig, exc_trig;

  bbq_top #(.LMAX(LMAX), .NTAPS(NTAPS), .CODEC_BIT_CLKS(BITC)) dut (.*);

  bbq_codec_model codec (.sclk(codec_sclk), .lrck(codec_lrck), .sdout(codec_sdout),
                         .sdin(codec_sdin), .h(m_h), .v(m_v), .dac_h(m_dac_h),
                         .dac_v(m_dac_v), .frames(m_frames));

  int checks = 0, failures = 0;
  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  // ---------------- stimulus: codec, turn and millisecond clocks ----------
  int  coef [NTAPS];
  int  xh [MAXS], xv [MAXS];
  int  nsmp = 0;                  // codec samples driven so far
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    turn_tick <= (cyc % 768) == 17;
    ms_tick   <= (cyc % 2133) == 500;
  end

  // codec words: the sample of frame j is prepared once the model has taken
  // the one of frame j-1
  int sent_h [MAXS], sent_v [MAXS];
  function automatic void next_word(input int j);
    if (j < MAXS) begin
      sent_h[j] = int'($rtoi(3.0e6 * $sin(2.0 * PI * 0.1875 * j))) + int'(m_dac_h) / 4;
      sent_v[j] = int'($rtoi(2.0e6 * $sin(2.0 * PI * 0.3125 * j + 0.3)));
      m_h = 24'(sent_h[j]);
      m_v = 24'(sent_v[j]);
    end
  endfunction
  initial begin
    next_word(0);
    forever begin
      @(m_frames);
      next_word(m_frames);
    end
  end

  // ---------------- reference model ----------------------------------------
  function automatic int fir_ref(input int s, input bit v);
    longint acc;
    acc = 0;
    for (int t = 0; t < NTAPS; t++)
      if (s - t >= 0) acc += longint'(coef[t]) * longint'(v ? xv[s - t] : xh[s - t]);
    acc = (acc + 256) >>> 9;
    if (acc > 64'sh7FFF_FFFF) acc = 64'sh7FFF_FFFF;
    if (acc < -64'sh8000_0000) acc = -64'sh8000_0000;
    return int'(acc);
  endfunction

  function automatic real wref(input win_e w, input int n, input int nn);
    real x;
    x = 2.0 * PI * real'(n) / real'(nn);
    case (w)
      WIN_HANN:    return 0.5 - 0.5 * $cos(x);
      WIN_BHARRIS: return 0.35875 - 0.48829 * $cos(x) + 0.14128 * $cos(2 * x) - 0.01168 * $cos(3 * x);
      default:     return 1.0;
    endcase
  endfunction

  // frame bookkeeping: codec sample index of the trigger for each buffer
  int   trig_smp;
  int   n_loopback_smp = 0;                       // index of the strobe before acq_trig
  int   frame_first [2];
  int   frame_ln [2];
  win_e frame_w [2];
  always @(posedge clk) begin
    // what the filters are given for each codec sample
    if (rst_n && dut.adc_stb && nsmp < MAXS) begin
      chk($sformatf("serial port sample %0d", nsmp),
          dut.adc_h == 24'(sent_h[nsmp]) && dut.adc_v == 24'(sent_v[nsmp]));
      xh[nsmp] = int'(dut.in_h);
      xv[nsmp] = int'(dut.in_v);
      if (cfg_loopback) n_loopback_smp++;
      nsmp = nsmp + 1;
    end
    if (acq_trig) trig_smp = nsmp - 1;
    for (int b = 0; b < 2; b++)
      if (dut.fr_start[b]) begin
        // first kept sample at or after the trigger strobe (kept: s % DEC == DEC-1)
        frame_first[b] = trig_smp + ((DEC - 1 - trig_smp % DEC) + DEC) % DEC;
        frame_ln[b]    = int'(cfg_log2n);
        frame_w[b]     = cfg_wsel;
      end
  end

  // ---------------- mechanism counters --------------------------------------
  int n_overlap = 0, n_overrun = 0, n_pad = 0, n_chirp = 0, n_turn_src = 0;
  int n_ms_src = 0, n_soc = 0, n_frames_checked = 0, n_decim = 0, n_win_switch = 0;
  int n_dac_nonzero = 0, n_loopback = 0;
  win_e last_w = WIN_HANN;
  always @(posedge clk) if (rst_n) begin
    if (acq_trig && (dut.u_buf.st[0] == 3'd1 || dut.u_buf.st[1] == 3'd1)) n_overlap++;
    if (dut.u_fir_h.out_stb) n_decim++;
    if (exc_trig) n_chirp++;
    if (m_dac_h != 0) n_dac_nonzero++;
    if (acq_trig && cfg_trig.src_turn) n_turn_src++;
    if (acq_trig && !cfg_trig.src_turn) n_ms_src++;
    if (soc && armed) n_soc++;
  end

  // ---------------- host: read and check each finished frame ----------------
  int release_delay = 0;
  task automatic check_buffer(input int b);
    int   nn, npad, first;
    real  xr [64], xi [64];
    real  w, er, ei, ang;
    nn = 1 << frame_ln[b];
    npad = frame_ln[b] % 2 ? 2 * nn : nn;
    if (npad != nn) n_pad++;
    if (cfg_loopback) n_loopback++;
    if (frame_w[b] != last_w) n_win_switch++;
    last_w = frame_w[b];
    first = frame_first[b];
    for (int m = 0; m < npad; m++) begin
      if (m < nn) begin
        w = wref(frame_w[b], m, nn);
        xr[m] = w * real'(fir_ref(first + DEC * m, 0));
        xi[m] = w * real'(fir_ref(first + DEC * m, 1));
      end else begin
        xr[m] = 0; xi[m] = 0;
      end
    end
    chk("host_log2n", int'(host_log2n) == (npad == nn ? frame_ln[b] : frame_ln[b] + 1) || host_buf != 1'(b));
    host_buf = 1'(b);
    for (int p = 0; p < 2; p++)
      for (int k = 0; k <= npad / 2; k++) begin
        er = 0; ei = 0;
        for (int m = 0; m < npad; m++) begin
          ang = -2.0 * PI * real'(k) * real'(m) / real'(npad);
          er += (p == 0 ? xr[m] : xi[m]) * $cos(ang);
          ei += (p == 0 ? xr[m] : xi[m]) * $sin(ang);
        end
        er /= npad; ei /= npad;
        host_plane = 1'(p); host_bin = LMAX'(k);
        @(negedge clk);
        chk($sformatf("buf %0d plane %0d bin %0d: (%0d, %0d) expected (%0.0f, %0.0f)",
                      b, p, k, host_re, host_im, er, ei),
            real'(host_re) - er < 100.0 && er - real'(host_re) < 100.0 &&
            real'(host_im) - ei < 100.0 && ei - real'(host_im) < 100.0);
      end
    n_frames_checked++;
    repeat (release_delay) @(negedge clk);
    host_release = 2'(1 << b);
    @(negedge clk);
    host_release = 0;
  endtask

  bit host_on = 0;
  initial begin
    forever begin
      @(negedge clk);
      if (host_on) begin
        if (ready[0]) check_buffer(0);
        else if (ready[1]) check_buffer(1);
      end
    end
  end

  // ---------------- test sequence -------------------------------------------
  initial begin
    // a short low-pass: 8 taps of a triangle, the rest zero
    for (int t = 0; t < NTAPS; t++) coef[t] = t < 8 ? (t < 4 ? t + 1 : 8 - t) * 6000 : 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NTAPS; t++) begin
      @(negedge clk); coef_we = 1; coef_addr = 5'(t); coef_data = 18'(coef[t]);
    end
    @(negedge clk); coef_we = 0;
    cfg_dfs_h = '{f_start: 40'd54975581389, f_end: 40'd274877906944, f_inc: 40'sd4000000000,
                  length: 32'd60, amp: 24'd2000000};
    cfg_dfs_v = '0;
    host_on = 1;

    // phase 1: turn source, 16 turns = 48 kept samples per trigger, N = 64
    cfg_log2n = 6; cfg_wsel = WIN_HANN;
    cfg_trig = '{src_turn: 1'b1, period: 16'd16, exc_every: 8'd2, exc_delay: 16'd5};
    @(negedge clk); cmd_start = 1; @(negedge clk); cmd_start = 0;
    wait (n_frames_checked >= 4);
    @(negedge clk); cmd_stop = 1; @(negedge clk); cmd_stop = 0;
    wait (!dut.u_buf.fft_busy && dut.u_buf.st[0] != 3'd1 && dut.u_buf.st[1] != 3'd1 &&
          ready == 2'b00 && dut.u_buf.st[0] != 3'd2 && dut.u_buf.st[1] != 3'd2);

    // phase 2: ms source every 3 ms, armed until start of cycle, N = 32 padded
    cfg_log2n = 5; cfg_wsel = WIN_BHARRIS;
    cfg_trig = '{src_turn: 1'b0, period: 16'd3, exc_every: 8'd0, exc_delay: 16'd0};
    @(negedge clk); cmd_arm = 1; @(negedge clk); cmd_arm = 0;
    repeat (10700) @(negedge clk);
    chk("no trigger while armed", frames == 16'd4 || frames == 16'd5);
    @(negedge clk); soc = 1; @(negedge clk); soc = 0;
    wait (n_frames_checked >= 8);

    // phase 3: a trigger every ms, slow host: overruns
    release_delay = 6400;
    cfg_trig.period = 16'd1;
    wait (n_frames_checked >= 11);
    @(negedge clk); cmd_stop = 1; @(negedge clk); cmd_stop = 0;
    n_overrun = int'(overruns);
    wait (!dut.u_buf.fft_busy && dut.u_buf.st[0] != 3'd1 && dut.u_buf.st[1] != 3'd1 &&
          ready == 2'b00 && dut.u_buf.st[0] != 3'd2 && dut.u_buf.st[1] != 3'd2);

    // phase 4: internal loop back of two steady synthesiser tones, 64-sample
    // rectangular frames
    release_delay = 0;
    cfg_loopback = 1;
    cfg_log2n = 6; cfg_wsel = WIN_RECT;
    cfg_dfs_h = '{f_start: 40'd137438953472, f_end: 40'd137438953472, f_inc: 40'sd0,
                  length: 32'd0, amp: 24'd4000000};
    cfg_dfs_v = '{f_start: 40'd302365697638, f_end: 40'd302365697638, f_inc: 40'sd0,
                  length: 32'd0, amp: 24'd3000000};
    cfg_trig = '{src_turn: 1'b1, period: 16'd20, exc_every: 8'd1, exc_delay: 16'd0};
    @(negedge clk); cmd_start = 1; @(negedge clk); cmd_start = 0;
    wait (exc_trig);
    cfg_trig.exc_every = 8'd0;       // keep the tones running, do not restart them
    wait (n_frames_checked >= 14);
    @(negedge clk); cmd_stop = 1; @(negedge clk); cmd_stop = 0;

    $display("mechanisms: decimated=%0d overlap=%0d overrun=%0d pad=%0d chirp=%0d dac=%0d turn=%0d ms=%0d soc=%0d winswitch=%0d loopback=%0d frames=%0d",
             n_decim, n_overlap, n_overrun, n_pad, n_chirp, n_dac_nonzero, n_turn_src, n_ms_src,
             n_soc, n_win_switch, n_loopback, n_frames_checked);
    chk("loop back happened", n_loopback > 0 && n_loopback_smp > 0);
    chk("decimation happened", n_decim > 0 && n_decim <= nsmp / DEC + 1);
    chk("overlapping frames happened", n_overlap > 0);
    chk("overrun happened", n_overrun > 0);
    chk("zero padding happened", n_pad > 0);
    chk("chirp triggered", n_chirp > 0 && n_dac_nonzero > 0);
    chk("turn-clock trigger happened", n_turn_src > 0);
    chk("ms-clock trigger happened", n_ms_src > 0);
    chk("start-of-cycle start happened", n_soc > 0);
    chk("window switch happened", n_win_switch > 0);
    chk("no framer overflow", frame_overflow == 2'b00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
