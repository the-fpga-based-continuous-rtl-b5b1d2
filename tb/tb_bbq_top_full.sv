// tb_bbq_top_full: one complete operation of the chain at its full size
// (top parameters at their defaults: 2^18-word buffers, a codec sample every
// 256 clocks through the serial port and a behavioural codec). A single trigger
// acquires a 2^18-sample frame (decimation 1, rectangular window, identity
// FIR), the FFT runs, and the host reads selected bins.
//
// The horizontal input is a strong cosine (amplitude 2^22 codec LSBs) at bin
// 1000 plus a weak one of 2 LSBs at bin 30000, about 126 dB lower; the
// vertical input is a sine at bin 77777. Each checked bin is compared with a
// DFT of the samples actually driven, through the same FIR scaling, so the
// weak line must come out at its value (about 256) next to the strong one
// (about 2^29). Also reports the clocks spent acquiring and transforming.
module tb_bbq_top_full;
  import bbq_pkg::*;

  localparam int  L     = 18;
  localparam int  N     = 1 << L;
  localparam real PI    = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               codec_sclk, codec_lrck, codec_sdout, codec_sdin;
  logic signed [23:0] m_h = 0, m_v = 0, m_dac_h, m_dac_v;
  int                 m_frames;
  logic               ms_tick = 0, turn_tick = 0, soc = 0;
  logic               cfg_loopback = 0;
  logic [7:0]         cfg_decim = 1;
  logic               coef_we = 0;
  logic [4:0]         coef_addr = 0;
  logic signed [17:0] coef_data = 0;
  logic [4:0]         cfg_log2n = 5'(L);
  win_e               cfg_wsel = WIN_RECT;
  trig_cfg_t          cfg_trig = '0;
  dfs_cfg_t           cfg_dfs_h = '0, cfg_dfs_v = '0;
  logic               cmd_start = 0, cmd_arm = 0, cmd_stop = 0;
  logic [1:0]         ready, host_release = 0;
  logic               host_buf = 0, host_plane = 0;
  logic [L-1:0]       host_bin = 0;
  logic signed [31:0] host_re, host_im;
  logic [4:0]         host_log2n;
  logic [15:0]        frames, overruns;
  logic [1:0]         frame_overflow, exc_active;
  logic               running, armed, acq_trig, exc_trig;

  bbq_top dut (.*);

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
    else $display("ok   %s", what);
  endtask

  int xh [N + 200], xv [N + 200];
  int nsmp = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) turn_tick <= (cyc % 1000) == 123;

  // the codec word of frame j is prepared once the model has taken frame j-1
  function automatic void next_word(input int j);
    if (j < N + 200) begin
      xh[j] = int'($rtoi($floor(4194304.0 * $cos(2.0 * PI * 1000.0 * j / N) + 0.5)))
            + int'($rtoi($floor(2.0 * $cos(2.0 * PI * 30000.0 * j / N) + 0.5)));
      xv[j] = int'($rtoi($floor(3000000.0 * $sin(2.0 * PI * 77777.0 * j / N) + 0.5)));
      m_h = 24'(xh[j]);
      m_v = 24'(xv[j]);
    end
  endfunction
  initial begin
    next_word(0);
    forever begin
      @(m_frames);
      next_word(m_frames);
    end
  end
  always @(posedge clk) if (rst_n && dut.adc_stb) nsmp = nsmp + 1;

  // the frame under test is the first one; the period (65535 turns) is
  // shorter than the acquisition, so a second trigger follows into buffer 1
  int trig_smp = -1;
  always @(posedge clk) if (acq_trig && trig_smp < 0) trig_smp = nsmp - 1;

  // identity FIR: tap 0 = 2^17 - 1, output = round(x * (2^17-1) / 2^9)
  function automatic real fir_ref(input int x);
    return real'((longint'(x) * 131071 + 256) >>> 9);
  endfunction

  task automatic check_bin(input int p, input int k, input real tol);
    real er, ei, ang;
    er = 0; ei = 0;
    for (int m = 0; m < N; m++) begin
      ang = -2.0 * PI * real'((longint'(k) * m) % N) / real'(N);
      er += fir_ref(p == 0 ? xh[trig_smp + m] : xv[trig_smp + m]) * $cos(ang);
      ei += fir_ref(p == 0 ? xh[trig_smp + m] : xv[trig_smp + m]) * $sin(ang);
    end
    er /= N; ei /= N;
    host_plane = 1'(p); host_bin = L'(k);
    @(negedge clk);
    chk($sformatf("plane %s bin %0d: (%0d, %0d) expected (%0.1f, %0.1f)", p == 0 ? "H" : "V",
                  k, host_re, host_im, er, ei),
        real'(host_re) - er < tol && er - real'(host_re) < tol &&
        real'(host_im) - ei < tol && ei - real'(host_im) < tol);
  endtask

  longint t_trig, t_full, t_ready;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 32; t++) begin
      @(negedge clk); coef_we = 1; coef_addr = 5'(t); coef_data = t == 0 ? 18'sd131071 : 18'sd0;
    end
    @(negedge clk); coef_we = 0;
    cfg_trig = '{src_turn: 1'b1, period: 16'hFFFF, exc_every: 8'd0, exc_delay: 16'd0};
    @(negedge clk); cmd_start = 1; @(negedge clk); cmd_start = 0;
    wait (acq_trig); t_trig = cyc;
    wait (dut.u_buf.st[0] == 3'd2 || dut.u_buf.st[0] == 3'd3); t_full = cyc;
    wait (ready[0]); t_ready = cyc;
    @(negedge clk);
    $display("acquisition %0d clocks, FFT and separation %0d clocks", t_full - t_trig, t_ready - t_full);
    chk("frame size", host_log2n == 5'(L));
    chk("one frame", frames == 16'd1 && overruns == 16'd0 && frame_overflow == 2'b00);
    chk("FFT within 40 clocks per butterfly", t_ready - t_full < longint'(L / 2) * (N / 4) * 40 + (N / 2) * 8);
    host_buf = 0;
    check_bin(0, 1000, 256.0);     // strong line
    check_bin(0, 30000, 16.0);     // weak line, ~126 dB below
    check_bin(0, 0, 16.0);
    check_bin(0, 12345, 16.0);     // empty bins
    check_bin(0, N / 2, 16.0);
    check_bin(1, 77777, 256.0);
    check_bin(1, 1000, 16.0);
    check_bin(1, 0, 16.0);
    check_bin(1, 100001, 16.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (150000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
