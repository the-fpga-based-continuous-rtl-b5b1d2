// tb_bbq_fir_decim: self-checking test of the FIR low-pass filter and
// decimator. Checks the reset coefficients (32-tap moving average), then
// loads random coefficients and compares every output with
//   y = sat32(round(sum_t c[t] x[n-t] / 2^9))
// computed here, for decimation factors 1, 4 and 16, and checks that an
// output appears exactly NTAPS+2 clocks after the input that completes a
// decimation period, and only then.
module tb_bbq_fir_decim;
  localparam int NTAPS = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               in_stb = 0, coef_we = 0;
  logic signed [23:0] in_data = 0;
  logic [7:0]         decim = 1;
  logic [4:0]         coef_addr = 0;
  logic signed [17:0] coef_data = 0;
  logic               out_stb;
  logic signed [31:0] out_data;

  bbq_fir_decim dut (.clk, .rst_n, .in_stb, .in_data, .decim, .coef_we, .coef_addr,
                     .coef_data, .out_stb, .out_data);

  int checks = 0, failures = 0;
  int coef [NTAPS];
  int hist [$];
  longint expq [$];
  int outs = 0;

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  function automatic longint ref_out();
    longint acc;
    acc = 0;
    for (int t = 0; t < NTAPS; t++)
      if (t < hist.size()) acc += longint'(coef[t]) * longint'(hist[hist.size() - 1 - t]);
    acc = (acc + 256) >>> 9;
    if (acc > 64'sh7FFF_FFFF) acc = 64'sh7FFF_FFFF;
    if (acc < -64'sh8000_0000) acc = -64'sh8000_0000;
    return acc;
  endfunction

  task automatic feed(input int nsamp, input int d, input bit full_scale);
    int ph;
    ph = 0;
    decim = 8'(d);
    for (int i = 0; i < nsamp; i++) begin
      @(negedge clk);
      in_stb = 1;
      in_data = full_scale ? 24'sh7FFFFF : 24'($urandom);
      hist.push_back(int'(in_data));
      ph++;
      if (ph >= d) begin
        ph = 0;
        expq.push_back(ref_out());
        @(negedge clk); in_stb = 0;
        // output exactly NTAPS+2 clocks after the strobe
        repeat (NTAPS) begin
          @(negedge clk);
          chk("early output", !out_stb);
        end
        @(negedge clk);
        chk("output on time", out_stb);
        if (out_stb) begin
          chk($sformatf("out %0d exp %0d", out_data, expq[0]), longint'(out_data) == expq[0]);
          void'(expq.pop_front());
        end
        repeat (4) @(negedge clk);
      end else begin
        @(negedge clk); in_stb = 0;
        repeat (NTAPS + 6) begin
          @(negedge clk);
          chk("output between decimation points", !out_stb);
        end
      end
    end
  endtask

  initial begin
    for (int t = 0; t < NTAPS; t++) coef[t] = 4096;
    repeat (3) @(negedge clk);
    rst_n = 1;
    feed(40, 2, 0);
    feed(40, 1, 1);     // full-scale DC: unity gain saturates at the top code
    for (int t = 0; t < NTAPS; t++) begin
      coef[t] = int'($urandom_range(0, 131071)) - 65536;
      @(negedge clk);
      coef_we = 1; coef_addr = 5'(t); coef_data = 18'(coef[t]);
    end
    @(negedge clk); coef_we = 0;
    feed(40, 1, 0);
    feed(64, 4, 0);
    feed(96, 16, 0);
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
