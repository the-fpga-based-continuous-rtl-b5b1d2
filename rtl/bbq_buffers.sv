// bbq_buffers: the two frame buffers and the logic that passes each of them
// from acquisition to FFT to the host.
//
// Each buffer is 2^LMAX complex words and is used first as the FFT input and
// then, in place, for the spectra. Acquisition triggers go to the buffers
// alternately, so while one buffer is being filled the other can be
// transformed and read; a trigger can therefore start a new frame before the
// previous one ends, which gives up to 50 % overlap between frames (the FFT
// is much faster than the acquisition). This follows the design
// description. The ownership protocol below is this design's choice:
//
//   FREE --trigger--> ACQ --framer done--> FULL --FFT start--> FFT
//        --FFT done--> READY --host release--> FREE
//
// A trigger that finds the buffer in turn not FREE is dropped and counted in
// 'overruns' (the alternation is kept). When both buffers are FULL the FFT
// takes the older one first.
//
// Host read: host_buf, host_plane (0 = H, 1 = V) and host_bin k (0 .. N/2)
// select a spectral value; host_re/host_im follow one clock later. The
// address is digit reversed to undo the FFT output order; bins 0 and N/2 are
// real and come from the re (H) or im (V) part of a shared word. Reading a
// buffer that is not READY returns whatever it holds.
module bbq_buffers
  import bbq_pkg::*;
#(
  parameter int unsigned LMAX = 18
) (
  input  logic               clk,
  input  logic               rst_n,
  // acquisition trigger and framer side
  input  logic               acq_trig,
  output logic [1:0]         fr_start,
  input  logic [1:0]         fr_done,
  input  logic [4:0]         fr_log2n [2],
  input  logic [1:0]         fr_we,
  input  logic [LMAX-1:0]    fr_addr [2],
  input  cplx_t              fr_wdata [2],
  // FFT side
  output logic               fft_start,
  output logic [4:0]         fft_log2n,
  input  logic               fft_done,
  input  logic               fft_we,
  input  logic [LMAX-1:0]    fft_waddr,
  input  cplx_t              fft_wdata,
  input  logic [LMAX-1:0]    fft_raddr,
  output cplx_t              fft_rdata,
  // host side
  output logic [1:0]         ready,
  input  logic [1:0]         host_release,
  input  logic               host_buf,
  input  logic               host_plane,
  input  logic [LMAX-1:0]    host_bin,
  output logic signed [31:0] host_re,
  output logic signed [31:0] host_im,
  output logic [4:0]         host_log2n,
  output logic [15:0]        frames,
  output logic [15:0]        overruns
);

  typedef enum logic [2:0] {B_FREE, B_ACQ, B_FULL, B_FFT, B_READY} bstate_e;
  bstate_e    st [2];
  logic [4:0] blog2n [2];
  logic       nxt;       // buffer for the next trigger
  logic       fft_buf;   // buffer owned by the FFT
  logic       older;     // buffer that became FULL first

  // memories and their port multiplexers
  logic            we   [2];
  logic [LMAX-1:0] wa   [2];
  cplx_t           wd   [2];
  logic [LMAX-1:0] ra   [2];
  cplx_t           rd   [2];
  logic [LMAX-1:0] host_addr;
  logic            host_mid;   // bin 0 or N/2: real-valued pair word
  logic            host_sel_q, host_plane_q, host_mid_q;

  always_comb begin
    logic [31:0] n;
    n         = 32'd1 << blog2n[host_buf];
    host_mid  = (host_bin == '0) || (32'(host_bin) == (n >> 1));
    if (host_plane && !host_mid)
      host_addr = LMAX'(digit_rev(n - 32'(host_bin), blog2n[host_buf]));
    else
      host_addr = LMAX'(digit_rev(32'(host_bin), blog2n[host_buf]));
  end

  for (genvar b = 0; b < 2; b++) begin : g_buf
    always_comb begin
      if (st[b] == B_FFT) begin
        we[b] = fft_we;
        wa[b] = fft_waddr;
        wd[b] = fft_wdata;
        ra[b] = fft_raddr;
      end else begin
        we[b] = fr_we[b] && (st[b] == B_ACQ);
        wa[b] = fr_addr[b];
        wd[b] = fr_wdata[b];
        ra[b] = host_addr;
      end
    end
    bbq_ram #(.AW(LMAX)) u_ram (
      .clk   (clk),
      .we    (we[b]),
      .waddr (wa[b]),
      .wdata (wd[b]),
      .raddr (ra[b]),
      .rdata (rd[b])
    );
    assign ready[b] = (st[b] == B_READY);
  end

  assign fft_rdata  = rd[fft_buf];
  assign host_log2n = blog2n[host_buf];

  always_comb begin
    cplx_t h;
    h = rd[host_sel_q];
    if (host_mid_q) begin
      host_re = host_plane_q ? h.im : h.re;
      host_im = '0;
    end else begin
      host_re = h.re;
      host_im = h.im;
    end
  end

  logic fft_busy;
  assign fft_busy = (st[0] == B_FFT) || (st[1] == B_FFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st[0]        <= B_FREE;
      st[1]        <= B_FREE;
      blog2n[0]    <= 5'd2;
      blog2n[1]    <= 5'd2;
      nxt          <= 1'b0;
      fft_buf      <= 1'b0;
      older        <= 1'b0;
      fr_start     <= '0;
      fft_start    <= 1'b0;
      fft_log2n    <= 5'd2;
      host_sel_q   <= 1'b0;
      host_plane_q <= 1'b0;
      host_mid_q   <= 1'b0;
      frames       <= '0;
      overruns     <= '0;
    end else begin
      fr_start     <= '0;
      fft_start    <= 1'b0;
      host_sel_q   <= host_buf;
      host_plane_q <= host_plane;
      host_mid_q   <= host_mid;
      // trigger dispatch
      if (acq_trig) begin
        if (st[nxt] == B_FREE) begin
          st[nxt]       <= B_ACQ;
          fr_start[nxt] <= 1'b1;
          nxt           <= ~nxt;
        end else begin
          overruns <= overruns + 16'd1;
        end
      end
      for (int b = 0; b < 2; b++) begin
        if (st[b] == B_ACQ && fr_done[b]) begin
          st[b]     <= B_FULL;
          blog2n[b] <= fr_log2n[b];
          if (st[1-b] != B_FULL) older <= 1'(b);
        end
        if (st[b] == B_READY && host_release[b]) st[b] <= B_FREE;
      end
      // FFT scheduling
      if (fft_busy) begin
        if (fft_done) begin
          st[fft_buf] <= B_READY;
          frames      <= frames + 16'd1;
        end
      end else if (!fft_start) begin
        if (st[older] == B_FULL) begin
          fft_buf   <= older;
          st[older] <= B_FFT;
          fft_start <= 1'b1;
          fft_log2n <= blog2n[older];
        end else if (st[~older] == B_FULL) begin
          fft_buf    <= ~older;
          st[~older] <= B_FFT;
          fft_start  <= 1'b1;
          fft_log2n  <= blog2n[~older];
        end
      end
    end
  end

endmodule
