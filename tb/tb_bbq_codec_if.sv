// tb_bbq_codec_if: self-checking test of the serial codec port against the
// behavioural codec model. Random 24-bit ADC words are supplied to the model
// frame by frame; every adc_stb must deliver the pair sent in the matching
// frame. Random DAC words are presented at each frame boundary; the model
// must have received that pair by the next adc_stb. Also checks the frame
// period (64 bit clocks), the bit-clock period and the word-clock duty.
module tb_bbq_codec_if;
  localparam int BIT_CLKS = 4;
  localparam int NFR      = 200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               sclk, lrck, sdout, sdin, adc_stb;
  logic signed [23:0] adc_h, adc_v, dac_h = '0, dac_v = '0;
  logic signed [23:0] mh = '0, mv = '0, rx_h, rx_v;
  int                 mframes;

  bbq_codec_if #(.BIT_CLKS(BIT_CLKS)) dut (
    .clk, .rst_n, .codec_sclk(sclk), .codec_lrck(lrck), .codec_sdout(sdout),
    .codec_sdin(sdin), .adc_stb, .adc_h, .adc_v, .dac_h, .dac_v);

  bbq_codec_model model (.sclk, .lrck, .sdout, .sdin, .h(mh), .v(mv),
                         .dac_h(rx_h), .dac_v(rx_v), .frames(mframes));

  int checks = 0, failures = 0;
  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  logic signed [23:0] sent_h [NFR+2], sent_v [NFR+2];
  logic signed [23:0] dq_h [NFR+2], dq_v [NFR+2];

  // supply the next ADC pair as soon as the model has taken the previous one
  initial begin
    sent_h[0] = 24'($urandom); sent_v[0] = 24'($urandom);
    mh = sent_h[0]; mv = sent_v[0];
    forever begin
      @(mframes);
      if (mframes <= NFR) begin
        sent_h[mframes] = 24'($urandom); sent_v[mframes] = 24'($urandom);
        mh = sent_h[mframes]; mv = sent_v[mframes];
      end
    end
  end

  int nstb = 0;
  longint t_last = 0, t_now;
  always @(posedge clk) if (rst_n && adc_stb) begin
    t_now = longint'($time);
    chk($sformatf("frame %0d ADC H %h expected %h", nstb, adc_h, sent_h[nstb]), adc_h == sent_h[nstb]);
    chk($sformatf("frame %0d ADC V %h expected %h", nstb, adc_v, sent_v[nstb]), adc_v == sent_v[nstb]);
    if (nstb > 0) begin
      chk($sformatf("frame %0d DAC H %h expected %h", nstb, rx_h, dq_h[nstb-1]), rx_h == dq_h[nstb-1]);
      chk($sformatf("frame %0d DAC V %h expected %h", nstb, rx_v, dq_v[nstb-1]), rx_v == dq_v[nstb-1]);
      chk($sformatf("frame period %0d", t_now - t_last), t_now - t_last == 64 * BIT_CLKS * 10);
    end
    // the pair presented now is latched at this edge
    dq_h[nstb] = dac_h; dq_v[nstb] = dac_v;
    t_last = t_now;
    nstb++;
  end

  // new DAC words right after each latch
  always @(negedge clk) if (rst_n && nstb > 0 && $past(adc_stb)) begin
    dac_h <= 24'($urandom); dac_v <= 24'($urandom);
  end

  // bit clock period and word clock duty
  longint t_rise = -1, t_lr = -1;
  int     nrise = 0;
  always @(posedge sclk) begin
    if (t_rise >= 0)
      chk("bit clock period", longint'($time) - t_rise == BIT_CLKS * 10);
    t_rise = longint'($time);
    nrise++;
  end
  // word clock: measured only once the first frame is complete
  always @(lrck) if (nstb >= 1) begin
    if (t_lr >= 0) chk("word clock half period", longint'($time) - t_lr == 32 * BIT_CLKS * 10);
    t_lr = longint'($time);
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (nstb == NFR);
    repeat (2) @(negedge clk);
    chk("bit clocks seen", nrise >= 64 * (NFR - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64 * BIT_CLKS * 10 * (NFR + 20));
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
