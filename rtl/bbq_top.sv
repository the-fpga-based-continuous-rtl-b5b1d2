// bbq_top: digital processing chain of the base-band tune (BBQ) measurement
// system, from codec samples to horizontal and vertical spectra, plus the
// synchronised chirp excitation.
//
//   codec serial port --> bbq_codec_if --> adc_h/adc_v --> bbq_fir_decim (x2) --> H + jV --> bbq_framer (x2, window)
//     --> bbq_buffers (two frame buffers) <--> bbq_fft_r4 (FFT + H/V split)
//     --> host read port
//   ms/turn/start-of-cycle --> bbq_trigger --> acquisition trigger (framers)
//                                          --> excitation trigger (bbq_dfs x2)
//   bbq_dfs (H, V) --> dac_h/dac_v --> bbq_codec_if --> codec serial port
//
// The chain, its order, the 32-tap filter, the eight windows, the 2^18
// maximum length, the two buffers, the radix-4 FFT with H/V separation, the
// ms/turn trigger sources and the two 40-bit synthesisers follow the design
// description. The codec is reached through a serial audio port (the FPGA
// is clock master, I2S format, one stereo sample every 64*CODEC_BIT_CLKS
// clocks; format and rate are this design's choices, see bbq_codec_if). The
// codec's register port, the analogue front end and the VME host interface
// are outside this module: host configuration, commands and spectrum reads
// are plain ports. With
// cfg_loopback set, the filters take the synthesiser words instead of the
// codec samples (the internal loop back used to measure the noise floor of
// the digital chain alone). Configuration inputs may change at any time;
// each block samples them at the start of its next frame, chirp or
// decimation period. One clock domain; asynchronous active-low reset.
module bbq_top
  import bbq_pkg::*;
#(
  parameter int unsigned LMAX  = 18,   // largest acquisition: 2^18 samples
  parameter int unsigned NTAPS = 32,   // low-pass filter taps
  parameter int unsigned CODEC_BIT_CLKS = 4  // clocks per codec bit clock (256 per sample)
) (
  input  logic               clk,
  input  logic               rst_n,
  // codec serial audio port
  output logic               codec_sclk,
  output logic               codec_lrck,
  output logic               codec_sdout,    // DAC data to the codec
  input  logic               codec_sdin,     // ADC data from the codec
  // machine timing
  input  logic               ms_tick,
  input  logic               turn_tick,
  input  logic               soc,
  // host configuration
  input  logic               cfg_loopback,   // 1: filters take the synthesiser output
  input  logic [7:0]         cfg_decim,
  input  logic               coef_we,
  input  logic [$clog2(NTAPS)-1:0] coef_addr,
  input  logic signed [17:0] coef_data,
  input  logic [4:0]         cfg_log2n,
  input  win_e               cfg_wsel,
  input  trig_cfg_t          cfg_trig,
  input  dfs_cfg_t           cfg_dfs_h,
  input  dfs_cfg_t           cfg_dfs_v,
  input  logic               cmd_start,
  input  logic               cmd_arm,
  input  logic               cmd_stop,
  // host spectrum access and status
  output logic [1:0]         ready,
  input  logic [1:0]         host_release,
  input  logic               host_buf,
  input  logic               host_plane,
  input  logic [LMAX-1:0]    host_bin,
  output logic signed [31:0] host_re,
  output logic signed [31:0] host_im,
  output logic [4:0]         host_log2n,
  output logic [15:0]        frames,
  output logic [15:0]        overruns,
  output logic [1:0]         frame_overflow,
  output logic               running,
  output logic               armed,
  output logic               acq_trig,
  output logic               exc_trig,
  output logic [1:0]         exc_active
);

  // codec interface
  logic               adc_stb;
  logic signed [23:0] adc_h, adc_v, dac_h, dac_v;

  bbq_codec_if #(.BIT_CLKS(CODEC_BIT_CLKS)) u_codec (
    .clk (clk), .rst_n (rst_n), .codec_sclk (codec_sclk), .codec_lrck (codec_lrck),
    .codec_sdout (codec_sdout), .codec_sdin (codec_sdin), .adc_stb (adc_stb),
    .adc_h (adc_h), .adc_v (adc_v), .dac_h (dac_h), .dac_v (dac_v)
  );

  // low-pass filter and decimation; in loopback the synthesiser output
  // replaces the codec input, sample for sample
  logic               f_stb_h, f_stb_v;
  logic signed [31:0] f_h, f_v;
  logic signed [23:0] in_h, in_v;

  assign in_h = cfg_loopback ? dac_h : adc_h;
  assign in_v = cfg_loopback ? dac_v : adc_v;

  bbq_fir_decim #(.NTAPS(NTAPS)) u_fir_h (
    .clk (clk), .rst_n (rst_n), .in_stb (adc_stb), .in_data (in_h), .decim (cfg_decim),
    .coef_we (coef_we), .coef_addr (coef_addr), .coef_data (coef_data),
    .out_stb (f_stb_h), .out_data (f_h)
  );
  bbq_fir_decim #(.NTAPS(NTAPS)) u_fir_v (
    .clk (clk), .rst_n (rst_n), .in_stb (adc_stb), .in_data (in_v), .decim (cfg_decim),
    .coef_we (coef_we), .coef_addr (coef_addr), .coef_data (coef_data),
    .out_stb (f_stb_v), .out_data (f_v)
  );

  // triggering
  bbq_trigger u_trig (
    .clk (clk), .rst_n (rst_n), .cfg (cfg_trig),
    .cmd_start (cmd_start), .cmd_arm (cmd_arm), .cmd_stop (cmd_stop), .soc (soc),
    .ms_tick (ms_tick), .turn_tick (turn_tick), .smp_stb (adc_stb),
    .acq_trig (acq_trig), .exc_trig (exc_trig), .running (running), .armed (armed)
  );

  // framers, one per buffer
  logic [1:0]      fr_start, fr_done, fr_we, unused_fr_busy;
  logic [4:0]      fr_log2n [2];
  logic [LMAX-1:0] fr_addr [2];
  cplx_t           fr_wdata [2];

  for (genvar b = 0; b < 2; b++) begin : g_framer
    bbq_framer #(.LMAX(LMAX)) u_framer (
      .clk (clk), .rst_n (rst_n), .start (fr_start[b]),
      .cfg_log2n (cfg_log2n), .cfg_wsel (cfg_wsel),
      .smp_stb (f_stb_h && f_stb_v), .smp_h (f_h), .smp_v (f_v),
      .mem_we (fr_we[b]), .mem_addr (fr_addr[b]), .mem_wdata (fr_wdata[b]),
      .busy (unused_fr_busy[b]), .done (fr_done[b]), .frame_log2n (fr_log2n[b]),
      .overflow (frame_overflow[b])
    );
  end

  // buffers and FFT
  logic            fft_start, fft_done, fft_we, unused_fft_busy;
  logic [4:0]      fft_log2n;
  logic [LMAX-1:0] fft_waddr, fft_raddr;
  cplx_t           fft_wdata, fft_rdata;

  bbq_buffers #(.LMAX(LMAX)) u_buf (
    .clk (clk), .rst_n (rst_n), .acq_trig (acq_trig),
    .fr_start (fr_start), .fr_done (fr_done), .fr_log2n (fr_log2n),
    .fr_we (fr_we), .fr_addr (fr_addr), .fr_wdata (fr_wdata),
    .fft_start (fft_start), .fft_log2n (fft_log2n), .fft_done (fft_done),
    .fft_we (fft_we), .fft_waddr (fft_waddr), .fft_wdata (fft_wdata),
    .fft_raddr (fft_raddr), .fft_rdata (fft_rdata),
    .ready (ready), .host_release (host_release), .host_buf (host_buf),
    .host_plane (host_plane), .host_bin (host_bin), .host_re (host_re),
    .host_im (host_im), .host_log2n (host_log2n), .frames (frames), .overruns (overruns)
  );

  bbq_fft_r4 #(.LMAX(LMAX)) u_fft (
    .clk (clk), .rst_n (rst_n), .start (fft_start), .log2n (fft_log2n),
    .busy (unused_fft_busy), .done (fft_done),
    .mem_we (fft_we), .mem_waddr (fft_waddr), .mem_wdata (fft_wdata),
    .mem_raddr (fft_raddr), .mem_rdata (fft_rdata)
  );

  // chirp excitation, one synthesiser per plane
  bbq_dfs u_dfs_h (
    .clk (clk), .rst_n (rst_n), .cfg (cfg_dfs_h), .trig (exc_trig), .stop (cmd_stop),
    .smp_stb (adc_stb), .dac_out (dac_h), .active (exc_active[0])
  );
  bbq_dfs u_dfs_v (
    .clk (clk), .rst_n (rst_n), .cfg (cfg_dfs_v), .trig (exc_trig), .stop (cmd_stop),
    .smp_stb (adc_stb), .dac_out (dac_v), .active (exc_active[1])
  );

endmodule
