// tb_bbq_framer: self-checking test of the framer (H + jV combination,
// on-the-fly window, zero padding). Frames of 16 and 32 samples (the second
// one padded to 64) are recorded from the framer's buffer writes and
// compared with w(n) * h(n) + j w(n) * v(n), w computed here in double
// precision for every one of the eight windows. Also checks the write
// count, frame_log2n, that a start while busy is ignored, the overflow flag
// for samples that come too fast, and that each coefficient is ready within
// 36 clocks of the previous write.
module tb_bbq_framer;
  import bbq_pkg::*;

  localparam int LMAX = 8;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               start = 0, smp_stb = 0;
  logic [4:0]         cfg_log2n = 4;
  win_e               cfg_wsel = WIN_RECT;
  logic signed [31:0] smp_h = 0, smp_v = 0;
  logic               mem_we, busy, done, overflow;
  logic [LMAX-1:0]    mem_addr;
  cplx_t              mem_wdata;
  logic [4:0]         frame_log2n;

  bbq_framer #(.LMAX(LMAX)) dut (
    .clk, .rst_n, .start, .cfg_log2n, .cfg_wsel, .smp_stb, .smp_h, .smp_v,
    .mem_we, .mem_addr, .mem_wdata, .busy, .done, .frame_log2n, .overflow
  );

  cplx_t mem [1 << LMAX];
  bit    written [1 << LMAX];
  int    nwrites;
  always @(posedge clk) if (mem_we) begin
    mem[mem_addr] <= mem_wdata;
    written[mem_addr] <= 1'b1;
    nwrites <= nwrites + 1;
  end

  int checks = 0, failures = 0;
  int hv [64], vv [64];

  function automatic real wref(input win_e w, input int n, input int nn);
    real a0, a1, a2, a3, x;
    x = 2.0 * PI * real'(n) / real'(nn);
    case (w)
      WIN_HANN:     begin a0 = 0.5;       a1 = 0.5;       a2 = 0.0;       a3 = 0.0; end
      WIN_HAMMING:  begin a0 = 0.54;      a1 = 0.46;      a2 = 0.0;       a3 = 0.0; end
      WIN_BLACKMAN: begin a0 = 0.42;      a1 = 0.5;       a2 = 0.08;      a3 = 0.0; end
      WIN_BHARRIS:  begin a0 = 0.35875;   a1 = 0.48829;   a2 = 0.14128;   a3 = 0.01168; end
      WIN_NUTTALL:  begin a0 = 0.355768;  a1 = 0.487396;  a2 = 0.144232;  a3 = 0.012604; end
      WIN_BNUTTALL: begin a0 = 0.3635819; a1 = 0.4891775; a2 = 0.1365995; a3 = 0.0106411; end
      default:      begin a0 = 1.0;       a1 = 0.0;       a2 = 0.0;       a3 = 0.0; end
    endcase
    if (w == WIN_TRIANG) begin
      x = 2.0 * real'(n) / real'(nn) - 1.0;
      return 1.0 - (x < 0 ? -x : x);
    end
    return a0 - a1 * $cos(x) + a2 * $cos(2 * x) - a3 * $cos(3 * x);
  endfunction

  function automatic real fabs(input real x);
    return x < 0.0 ? -x : x;
  endfunction

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  task automatic frame(input int ln, input win_e w, input int gap);
    int nn, npad, last_we, maxwait;
    real e;
    nn = 1 << ln;
    npad = ln[0] ? 2 * nn : nn;
    for (int i = 0; i < 64; i++) begin
      hv[i] = int'($urandom_range(0, 32'h7FFF_FFFF)) - 32'sh4000_0000;
      vv[i] = int'($urandom_range(0, 32'h7FFF_FFFF)) - 32'sh4000_0000;
    end
    for (int i = 0; i < (1 << LMAX); i++) written[i] = 0;
    nwrites = 0;
    @(negedge clk);
    cfg_log2n = 5'(ln); cfg_wsel = w; start = 1;
    @(negedge clk);
    start = 0;
    cfg_log2n = 5'd2;               // a change now must not affect this frame
    @(negedge clk);
    start = 1;                      // ignored: already busy
    @(negedge clk);
    start = 0;
    maxwait = 0;
    for (int i = 0; i < nn; i++) begin
      repeat (gap) @(negedge clk);
      smp_stb = 1; smp_h = hv[i]; smp_v = vv[i];
      last_we = 0;
      @(negedge clk);
      smp_stb = 0;
      while (!mem_we) begin @(negedge clk); last_we++; end
      if (last_we > maxwait) maxwait = last_we;
    end
    while (!done) @(negedge clk);
    @(negedge clk);
    chk($sformatf("write count %0d != %0d", nwrites, npad), nwrites == npad);
    chk("frame_log2n", frame_log2n == 5'(ln + ln % 2));
    chk("no overflow", !overflow);
    chk($sformatf("coefficient latency %0d", maxwait), gap >= 36 ? maxwait == 0 : maxwait <= 36);
    for (int i = 0; i < npad; i++) begin
      if (i < nn) begin
        e = wref(w, i, nn);
        chk($sformatf("win %0d n %0d re %0d exp %0f", w, i, mem[i].re, e * hv[i]),
            written[i] && fabs(real'(mem[i].re) - e * real'(hv[i])) < 64.0);
        chk($sformatf("win %0d n %0d im", w, i),
            fabs(real'(mem[i].im) - e * real'(vv[i])) < 64.0);
      end else begin
        chk($sformatf("pad %0d", i), written[i] && mem[i] == '0);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 8; w++) frame(4, win_e'(w), 40);
    frame(5, WIN_HANN, 40);
    frame(3, WIN_BHARRIS, 5);        // samples faster than the window: held, still correct
    // overflow: three samples back to back
    @(negedge clk);
    cfg_log2n = 4; start = 1;
    @(negedge clk); start = 0;
    repeat (3) begin smp_stb = 1; @(negedge clk); end
    smp_stb = 0;
    @(negedge clk);
    chk("overflow flagged", overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
