// tb_bbq_fft_r4: self-checking test of the radix-4 FFT with H/V separation.
// Loads a frame buffer with random real h and v sequences packed as h + jv,
// runs the FFT for N = 16, 64 and 256, and compares every stored H and V bin
// with a double-precision DFT computed here:
//   stored at digit_rev(k):   H[k] = DFT(h)[k] / N   for 0 < k < N/2
//   stored at digit_rev(N-k): V[k] = DFT(v)[k] / N
//   stored at digit_rev(0), digit_rev(N/2): {DFT(h)[k]/N, DFT(v)[k]/N}.
// Also checks that a run takes no more than 40 clocks per butterfly plus
// 8 per separation step.
module tb_bbq_fft_r4;
  import bbq_pkg::*;

  localparam int LMAX = 8;
  localparam int NMAX = 1 << LMAX;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            start = 0, busy, done;
  logic [4:0]      log2n = 0;
  logic            f_we, t_we = 0;
  logic [LMAX-1:0] f_waddr, f_raddr, t_addr = 0;
  cplx_t           f_wdata, t_wdata = '0, rdata;

  bbq_fft_r4 #(.LMAX(LMAX)) dut (
    .clk, .rst_n, .start, .log2n, .busy, .done,
    .mem_we (f_we), .mem_waddr (f_waddr), .mem_wdata (f_wdata),
    .mem_raddr (f_raddr), .mem_rdata (rdata)
  );

  bbq_ram #(.AW(LMAX)) ram (
    .clk,
    .we    (busy ? f_we : t_we),
    .waddr (busy ? f_waddr : t_addr),
    .wdata (busy ? f_wdata : t_wdata),
    .raddr (busy ? f_raddr : t_addr),
    .rdata
  );

  int checks = 0, failures = 0;
  real hs [NMAX], vs [NMAX];
  int  hv [NMAX], vv [NMAX];

  task automatic check_close(input string what, input int k, input real got, input real exp_v);
    checks++;
    if ((got - exp_v > 40.0) || (exp_v - got > 40.0)) begin
      failures++;
      if (failures < 10) $display("FAIL %s bin %0d: got %0.1f expected %0.1f", what, k, got, exp_v);
    end
  endtask

  task automatic run(input int ln);
    int n;
    int cyc;
    real hr, hi, vr, vi, ang;
    n = 1 << ln;
    for (int i = 0; i < n; i++) begin
      hv[i] = int'($urandom_range(0, 32'h3FFF_FFFF)) - 32'sh2000_0000;
      vv[i] = int'($urandom_range(0, 32'h3FFF_FFFF)) - 32'sh2000_0000;
    end
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      t_we = 1; t_addr = LMAX'(i); t_wdata.re = hv[i]; t_wdata.im = vv[i];
    end
    @(negedge clk); t_we = 0;
    log2n = 5'(ln); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc > (ln / 2) * (n / 4) * 40 + (n / 2) * 8) begin
      failures++;
      $display("FAIL N=%0d took %0d clocks", n, cyc);
    end
    @(negedge clk);
    for (int k = 0; k <= n / 2; k++) begin
      // reference DFT of h and v
      hr = 0; hi = 0; vr = 0; vi = 0;
      for (int i = 0; i < n; i++) begin
        ang = -2.0 * 3.14159265358979323846 * real'(k) * real'(i) / real'(n);
        hr += real'(hv[i]) * $cos(ang); hi += real'(hv[i]) * $sin(ang);
        vr += real'(vv[i]) * $cos(ang); vi += real'(vv[i]) * $sin(ang);
      end
      if (k == 0 || k == n / 2) begin
        t_addr = LMAX'(digit_rev(32'(k), 5'(ln)));
        @(negedge clk); @(negedge clk);
        check_close("H0", k, real'(rdata.re), hr / n);
        check_close("V0", k, real'(rdata.im), vr / n);
      end else begin
        t_addr = LMAX'(digit_rev(32'(k), 5'(ln)));
        @(negedge clk); @(negedge clk);
        check_close("Hre", k, real'(rdata.re), hr / n);
        check_close("Him", k, real'(rdata.im), hi / n);
        t_addr = LMAX'(digit_rev(32'(n - k), 5'(ln)));
        @(negedge clk); @(negedge clk);
        check_close("Vre", k, real'(rdata.re), vr / n);
        check_close("Vim", k, real'(rdata.im), vi / n);
      end
    end
    $display("N=%0d done in %0d clocks", n, cyc);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(2);
    run(4);
    run(6);
    run(8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
