// bbq_codec_model: behavioural model of the serial side of a 24-bit stereo
// audio codec in slave mode, for simulation only. It follows the bit and
// word clocks it receives (I2S: MSB one bit clock after the word-clock edge,
// left slot while lrck is low), sends the ADC words h (left) and v (right)
// that are present when a frame starts, and collects the DAC words it
// receives into dac_h/dac_v. 'frames' counts frames started; a testbench
// updates h/v after each increment to supply the next sample.
module bbq_codec_model #(
  parameter int W = 24
) (
  input  logic                sclk,
  input  logic                lrck,
  input  logic                sdout,     // from the FPGA (DAC data)
  output logic                sdin,      // to the FPGA (ADC data)
  input  logic signed [W-1:0] h,
  input  logic signed [W-1:0] v,
  output logic signed [W-1:0] dac_h,
  output logic signed [W-1:0] dac_v,
  output int                  frames
);
  logic         last_lr = 1'b1;
  int           p = 0;
  logic [W-1:0] txh = '0, txv = '0, rx = '0;

  initial begin
    sdin = 1'b0;
    dac_h = '0;
    dac_v = '0;
    frames = 0;
  end

  always @(posedge sclk) begin
    #1;
    if (lrck != last_lr) p = 0;
    else p = p + 1;
    last_lr = lrck;
    if (p == 0 && !lrck) begin
      txh = h;
      txv = v;
      frames = frames + 1;
    end
    if (p >= 1 && p <= W) begin
      rx = {rx[W-2:0], sdout};
      if (p == W) begin
        if (!lrck) dac_h = rx;
        else       dac_v = rx;
      end
    end
    // next bit on the data line
    if (p + 1 >= 1 && p + 1 <= W) sdin = lrck ? txv[W - 1 - p] : txh[W - 1 - p];
    else sdin = 1'b0;
  end
endmodule
