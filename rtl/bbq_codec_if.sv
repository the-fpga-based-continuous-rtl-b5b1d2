// bbq_codec_if: serial audio port between the FPGA and the 24-bit stereo
// codec that digitises the two planes and plays the excitation.
//
// The FPGA is the clock master. It drives the bit clock codec_sclk (one
// period every BIT_CLKS system clocks) and the word clock codec_lrck (low:
// left slot = horizontal plane, high: right slot = vertical plane), 32 bit
// clocks per slot, so one stereo sample takes 64*BIT_CLKS clocks (256 with
// the default; with the system clock also used as the codec master clock
// this is the usual 256 x Fs ratio). Data follow the I2S convention: MSB
// first, one bit clock after the word-clock edge, W = 24 data bits, the
// rest of the slot zero; the FPGA changes codec_sdout while codec_sclk falls
// and samples codec_sdin where it rises.
//
// Parallel side: adc_stb pulses for one clock at the end of every frame,
// with adc_h/adc_v holding the two samples just received. dac_h/dac_v are
// taken at the same frame boundary and sent during the next frame.
//
// The design description says only that the codec (a 24-bit audio codec
// sampling at up to 198 kHz) is controlled by the FPGA. The serial format,
// the master role and the slot layout are this design's choices, and the
// codec's register (control) port is not part of this block.
module bbq_codec_if #(
  parameter int unsigned BIT_CLKS = 4,    // system clocks per bit clock, even, >= 2
  parameter int unsigned W        = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                codec_sclk,
  output logic                codec_lrck,
  output logic                codec_sdout,
  input  logic                codec_sdin,
  output logic                adc_stb,
  output logic signed [W-1:0] adc_h,
  output logic signed [W-1:0] adc_v,
  input  logic signed [W-1:0] dac_h,
  input  logic signed [W-1:0] dac_v
);

  localparam int unsigned FRAME = 64 * BIT_CLKS;
  localparam int unsigned CW    = $clog2(FRAME);
  localparam int unsigned HALF  = BIT_CLKS / 2;

  logic [CW-1:0]  cnt;
  logic [5:0]     bitn;      // bit clock subbit the frame
  logic [4:0]     pos;       // bit clock subbit the slot
  logic           slot;      // 0: left (H), 1: right (V)
  logic [31:0]    subbit;
  logic [W-1:0]   tx_h, tx_v, rx_sh, rx_h;
  logic           data_pos;  // this bit clock carries a data bit

  always_comb begin
    bitn     = 6'(32'(cnt) / BIT_CLKS);
    subbit   = 32'(cnt) % BIT_CLKS;
    pos      = bitn[4:0];
    slot     = bitn[5];
    data_pos = (pos >= 5'd1) && (32'(pos) <= W);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      codec_sclk  <= 1'b0;
      codec_lrck  <= 1'b0;
      codec_sdout <= 1'b0;
      tx_h        <= '0;
      tx_v        <= '0;
      rx_sh       <= '0;
      rx_h        <= '0;
      adc_stb     <= 1'b0;
      adc_h       <= '0;
      adc_v       <= '0;
    end else begin
      adc_stb <= 1'b0;
      cnt     <= (32'(cnt) == FRAME - 1) ? '0 : cnt + 1'b1;
      // bit clock low in the first half of each bit period
      codec_sclk <= (subbit >= HALF);
      if (subbit == 0) begin
        codec_lrck  <= slot;
        codec_sdout <= data_pos ? (slot ? tx_v[W - 32'(pos)] : tx_h[W - 32'(pos)]) : 1'b0;
      end
      // capture where the bit clock rises
      if (subbit == HALF && data_pos) begin
        rx_sh <= {rx_sh[W-2:0], codec_sdin};
        if (32'(pos) == W && !slot) rx_h <= {rx_sh[W-2:0], codec_sdin};
      end
      if (32'(cnt) == FRAME - 1) begin
        adc_stb <= 1'b1;
        adc_h   <= rx_h;
        adc_v   <= rx_sh;
        tx_h    <= dac_h;
        tx_v    <= dac_v;
      end
    end
  end

endmodule
