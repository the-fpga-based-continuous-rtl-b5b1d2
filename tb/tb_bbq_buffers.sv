// tb_bbq_buffers: self-checking test of the double frame buffer. The test
// stands in for the two framers and the FFT. It checks that triggers go to
// the buffers alternately and are counted as overruns when the buffer in
// turn is busy, that framer writes land only in a buffer being acquired,
// that the FFT is started on the older full buffer with that frame's size
// and reaches its memory, that READY follows the FFT and FREE the host's
// release, and that the host read port undoes the digit-reversed order
// (H[k] at digit_rev(k), V[k] at digit_rev(N-k), real bins 0 and N/2).
module tb_bbq_buffers;
  import bbq_pkg::*;

  localparam int LMAX = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               acq_trig = 0;
  logic [1:0]         fr_start, fr_done = 0, fr_we = 0;
  logic [4:0]         fr_log2n [2];
  logic [LMAX-1:0]    fr_addr [2];
  cplx_t              fr_wdata [2];
  logic               fft_start, fft_done = 0, fft_we = 0;
  logic [4:0]         fft_log2n;
  logic [LMAX-1:0]    fft_waddr = 0, fft_raddr = 0;
  cplx_t              fft_wdata = '0, fft_rdata;
  logic [1:0]         ready, host_release = 0;
  logic               host_buf = 0, host_plane = 0;
  logic [LMAX-1:0]    host_bin = 0;
  logic signed [31:0] host_re, host_im;
  logic [4:0]         host_log2n;
  logic [15:0]        frames, overruns;

  bbq_buffers #(.LMAX(LMAX)) dut (.*);

  int checks = 0, failures = 0;

  // FFT start requests are remembered until the stand-in FFT takes them
  bit         start_seen = 0;
  logic [4:0] start_ln;
  bit         take_start = 0;
  always @(posedge clk) begin
    if (fft_start) begin
      start_seen <= 1;
      start_ln   <= fft_log2n;
    end else if (take_start) start_seen <= 0;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  function automatic cplx_t pat(input int b, input int a);
    cplx_t v;
    v.re = 32'(b * 1000 + a);
    v.im = -32'(b * 1000 + a);
    return v;
  endfunction

  // fill buffer b as a framer would, with an address pattern
  task automatic fill(input int b, input int ln);
    for (int a = 0; a < (1 << ln); a++) begin
      @(negedge clk);
      fr_we[b] = 1; fr_addr[b] = LMAX'(a); fr_wdata[b] = pat(b, a);
    end
    @(negedge clk);
    fr_we[b] = 0; fr_log2n[b] = 5'(ln); fr_done[b] = 1;
    @(negedge clk);
    fr_done[b] = 0;
  endtask

  task automatic trig(input int exp_buf);
    @(negedge clk); acq_trig = 1;
    @(negedge clk); acq_trig = 0;
    chk($sformatf("start for buffer %0d", exp_buf),
        exp_buf < 0 ? fr_start == 2'b00 : fr_start == 2'(1 << exp_buf));
  endtask

  // act as the FFT: check size and memory contents of the buffer, then finish
  task automatic fft(input int exp_buf, input int ln);
    while (!start_seen) @(negedge clk);
    chk($sformatf("fft size %0d", start_ln), start_ln == 5'(ln));
    take_start = 1; @(negedge clk); take_start = 0;
    for (int a = 0; a < (1 << ln); a += 5) begin
      fft_raddr = LMAX'(a);
      @(negedge clk); @(negedge clk);
      chk($sformatf("fft reads buffer %0d addr %0d", exp_buf, a), fft_rdata == pat(exp_buf, a));
    end
    // write an address pattern as the "spectrum"
    for (int a = 0; a < (1 << ln); a++) begin
      fft_we = 1; fft_waddr = LMAX'(a); fft_wdata = pat(7, a);
      @(negedge clk);
    end
    fft_we = 0;
    fft_done = 1; @(negedge clk); fft_done = 0;
    @(negedge clk);
    chk("ready", ready[exp_buf]);
  endtask

  task automatic host_check(input int b, input int ln);
    int n, a;
    n = 1 << ln;
    host_buf = 1'(b);
    for (int p = 0; p < 2; p++) begin
      for (int k = 0; k <= n / 2; k++) begin
        host_plane = 1'(p); host_bin = LMAX'(k);
        @(negedge clk);
        if (k == 0 || k == n / 2) begin
          a = int'(digit_rev(32'(k), 5'(ln)));
          chk($sformatf("real bin %0d plane %0d", k, p),
              host_re == (p == 0 ? pat(7, a).re : pat(7, a).im) && host_im == 0);
        end else begin
          a = int'(digit_rev(32'(p == 0 ? k : n - k), 5'(ln)));
          chk($sformatf("bin %0d plane %0d: %0d exp %0d", k, p, host_re, pat(7, a).re),
              host_re == pat(7, a).re && host_im == pat(7, a).im);
        end
      end
    end
    chk("host_log2n", host_log2n == 5'(ln));
  endtask

  initial begin
    fr_log2n[0] = 0; fr_log2n[1] = 0;
    fr_addr[0] = 0; fr_addr[1] = 0;
    fr_wdata[0] = '0; fr_wdata[1] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    trig(0);
    // a write for buffer 1 before it is acquiring must be ignored
    @(negedge clk); fr_we[1] = 1; fr_addr[1] = 0; fr_wdata[1] = pat(9, 9);
    @(negedge clk); fr_we[1] = 0;
    trig(1);
    trig(-1);                          // both busy: overrun
    chk("overrun counted", overruns == 16'd1);
    fill(0, 4);
    fill(1, 6);
    fft(0, 4);
    fft(1, 6);
    chk("two frames", frames == 16'd2);
    host_check(0, 4);
    host_check(1, 6);
    trig(-1);                          // buffer 0 still READY: overrun
    chk("overrun while ready", overruns == 16'd2);
    @(negedge clk); host_release = 2'b01; @(negedge clk); host_release = 2'b00;
    chk("released", !ready[0] && ready[1]);
    trig(0);
    fill(0, 2);
    fft(0, 2);
    host_check(0, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
