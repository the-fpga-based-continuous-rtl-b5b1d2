// bbq_fft_r4: in-place radix-4 FFT of 32-bit fixed-point complex data held in
// a frame buffer, followed by the separation of the two real spectra.
//
// FFT: decimation in frequency over M = log2n/2 stages. Butterfly b of stage
// s works on the four words i0 + {0,1,2,3}*q of its group (span 4^(M-s),
// q = span/4, j = b mod q), with
//   a = x0+x2, b = x0-x2, c = x1+x3, d = x1-x3
//   y0 = a+c, y1 = (b-jd) W^j, y2 = (a-c) W^2j, y3 = (b+jd) W^3j,
//   W = exp(-2 pi i / span).
// Each stage divides by 4 (rounded) before the twiddle product, so the result
// is X[k]/N and cannot grow past the 32-bit word (a component is saturated
// in the rare case that complex rotation pushes it over). The twiddles are
// produced by three CORDIC units per butterfly, so no twiddle table is
// stored. The output is left in base-4 digit-reversed order: X[k] sits at
// bbq_pkg::digit_rev(k).
//
// Separation: the frame holds h + jv with h, v real, so
//   H[k] = (X[k] + conj X[N-k]) / 2,  V[k] = (X[k] - conj X[N-k]) / 2j.
// For k = 1 .. N/2-1 the pass reads X[k] and X[N-k] and writes H[k] in place
// of X[k] and V[k] in place of X[N-k]. At k = 0 and k = N/2 both spectra are
// real and the word already holds {re: H[k], im: V[k]}. All bins carry the
// same scale: H[k] = DFT(h)[k] / N, V[k] = DFT(v)[k] / N.
//
// Timing: 'start' with log2n (even, 2 .. LMAX); 'done' pulses in the clock
// after the last write has reached the memory.
// A butterfly takes 4 reads, the CORDIC latency (31 clocks, overlapping the
// reads), one compute clock and 4 writes: about 37 clocks; a separation step
// takes 6. The radix, the 32-bit fixed point and the separation by sums and
// differences follow the design description; the stage scaling, the CORDIC
// twiddles and the memory schedule are this design's choices.
module bbq_fft_r4
  import bbq_pkg::*;
#(
  parameter int unsigned LMAX = 18
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [4:0]      log2n,
  output logic            busy,
  output logic            done,
  output logic            mem_we,
  output logic [LMAX-1:0] mem_waddr,
  output cplx_t           mem_wdata,
  output logic [LMAX-1:0] mem_raddr,
  input  cplx_t           mem_rdata
);

  typedef enum logic [3:0] {S_IDLE, S_RD, S_WAIT, S_CALC, S_WR, S_SRD, S_SCALC, S_SWR, S_DONE} state_e;
  state_e state;

  logic [4:0]      ln;          // latched log2n
  logic [4:0]      stage;
  logic [LMAX-1:0] bidx;        // butterfly index, then separation index k
  logic [2:0]      rcnt;
  logic [1:0]      wcnt;
  logic            rvalid, rvalid2;  // read issued / read data on mem_rdata
  logic [1:0]      ridx, ridx2;
  cplx_t           x [4];
  cplx_t           y [4];
  logic            tw_ok;

  // addressing of the current butterfly
  logic [4:0]      lspan, lq;
  logic [31:0]     q, jj, gg, i0;
  always_comb begin
    lspan = ln - 5'(2 * stage);
    lq    = lspan - 5'd2;
    q     = 32'd1 << lq;
    jj    = 32'(bidx) & (q - 1);
    gg    = 32'(bidx) >> lq;
    i0    = (gg << lspan) | jj;
  end

  // twiddle generation
  logic [31:0]        tw_ph [3];
  logic signed [31:0] tw_c [3], tw_s [3];
  logic [2:0]         tw_done;
  logic [2:0]         unused_busy;
  logic               tw_start;
  for (genvar k = 0; k < 3; k++) begin : g_tw
    assign tw_ph[k] = 32'((64'(k + 1) * 64'(jj)) << (32 - int'(lspan)));
    bbq_cordic u_cordic (
      .clk   (clk),
      .rst_n (rst_n),
      .start (tw_start),
      .phase (tw_ph[k]),
      .busy  (unused_busy[k]),
      .done  (tw_done[k]),
      .cos_o (tw_c[k]),
      .sin_o (tw_s[k])
    );
  end

  // separation addresses
  logic [31:0] nsz, ka, kb;
  always_comb begin
    nsz = 32'd1 << ln;
    ka  = digit_rev(32'(bidx), ln);
    kb  = digit_rev(nsz - 32'(bidx), ln);
  end

  // butterfly arithmetic
  function automatic logic signed [35:0] rnd4(input logic signed [35:0] v);
    return (v + 36'sd2) >>> 2;
  endfunction

  function automatic cplx_t twmul(input logic signed [35:0] re, input logic signed [35:0] im,
                                  input logic signed [31:0] c, input logic signed [31:0] s);
    // (re + j im)(c - j s)
    logic signed [71:0] pr, pi;
    cplx_t r;
    pr = 72'(re) * 72'(c) + 72'(im) * 72'(s) + 72'sd536870912;
    pi = 72'(im) * 72'(c) - 72'(re) * 72'(s) + 72'sd536870912;
    r.re = sat32(pr >>> 30);
    r.im = sat32(pi >>> 30);
    return r;
  endfunction

  logic signed [35:0] ar, ai, br, bi, cr, ci, dr, di;
  logic signed [35:0] y0r, y0i, t1r, t1i, t2r, t2i, t3r, t3i;
  cplx_t              by [4];
  cplx_t              sh, sv;
  always_comb begin
    ar = 36'(x[0].re) + 36'(x[2].re);  ai = 36'(x[0].im) + 36'(x[2].im);
    br = 36'(x[0].re) - 36'(x[2].re);  bi = 36'(x[0].im) - 36'(x[2].im);
    cr = 36'(x[1].re) + 36'(x[3].re);  ci = 36'(x[1].im) + 36'(x[3].im);
    dr = 36'(x[1].re) - 36'(x[3].re);  di = 36'(x[1].im) - 36'(x[3].im);
    y0r = rnd4(ar + cr);  y0i = rnd4(ai + ci);
    t1r = rnd4(br + di);  t1i = rnd4(bi - dr);   // b - jd
    t2r = rnd4(ar - cr);  t2i = rnd4(ai - ci);   // a - c
    t3r = rnd4(br - di);  t3i = rnd4(bi + dr);   // b + jd
    by[0].re = sat32(72'(y0r));
    by[0].im = sat32(72'(y0i));
    by[1] = twmul(t1r, t1i, tw_c[0], tw_s[0]);
    by[2] = twmul(t2r, t2i, tw_c[1], tw_s[1]);
    by[3] = twmul(t3r, t3i, tw_c[2], tw_s[2]);
    // separation: x[0] = X[k], x[1] = X[N-k]
    sh.re = 32'((36'(x[0].re) + 36'(x[1].re) + 36'sd1) >>> 1);
    sh.im = 32'((36'(x[0].im) - 36'(x[1].im) + 36'sd1) >>> 1);
    sv.re = 32'((36'(x[0].im) + 36'(x[1].im) + 36'sd1) >>> 1);
    sv.im = 32'((36'(x[1].re) - 36'(x[0].re) + 36'sd1) >>> 1);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      ln        <= 5'd2;
      stage     <= '0;
      bidx      <= '0;
      rcnt      <= '0;
      wcnt      <= '0;
      rvalid    <= 1'b0;
      rvalid2   <= 1'b0;
      ridx      <= '0;
      ridx2     <= '0;
      tw_ok     <= 1'b0;
      tw_start  <= 1'b0;
      done      <= 1'b0;
      mem_we    <= 1'b0;
      mem_waddr <= '0;
      mem_wdata <= '0;
      mem_raddr <= '0;
      for (int i = 0; i < 4; i++) begin
        x[i] <= '0;
        y[i] <= '0;
      end
    end else begin
      done     <= 1'b0;
      mem_we   <= 1'b0;
      tw_start <= 1'b0;
      rvalid   <= 1'b0;
      rvalid2  <= rvalid;
      ridx2    <= ridx;
      if (rvalid2) x[ridx2] <= mem_rdata;
      if (tw_done[0]) tw_ok <= 1'b1;
      case (state)
        S_IDLE: begin
          if (start) begin
            ln       <= log2n;
            stage    <= '0;
            bidx     <= '0;
            rcnt     <= '0;
            tw_ok    <= 1'b0;
            tw_start <= 1'b1;
            state    <= S_RD;
          end
        end
        S_RD: begin
          if (rcnt < 3'd4) begin
            mem_raddr <= LMAX'(i0 + 32'(rcnt) * q);
            rvalid    <= 1'b1;
            ridx      <= rcnt[1:0];
            rcnt      <= rcnt + 3'd1;
          end else begin
            state <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (tw_ok && !rvalid && !rvalid2) state <= S_CALC;
        end
        S_CALC: begin
          for (int i = 0; i < 4; i++) y[i] <= by[i];
          wcnt  <= '0;
          state <= S_WR;
        end
        S_WR: begin
          mem_we    <= 1'b1;
          mem_waddr <= LMAX'(i0 + 32'(wcnt) * q);
          mem_wdata <= y[wcnt];
          wcnt      <= wcnt + 2'd1;
          if (wcnt == 2'd3) begin
            rcnt  <= '0;
            tw_ok <= 1'b0;
            if (32'(bidx) == (nsz >> 2) - 1) begin
              bidx <= '0;
              if (stage == (ln >> 1) - 5'd1) begin
                // all stages done: separate the two spectra (k = 1 .. N/2-1)
                bidx  <= LMAX'(1);
                state <= S_SRD;
              end else begin
                stage    <= stage + 5'd1;
                tw_start <= 1'b1;
                state    <= S_RD;
              end
            end else begin
              bidx     <= bidx + 1'b1;
              tw_start <= 1'b1;
              state    <= S_RD;
            end
          end
        end
        S_SRD: begin
          if (rcnt < 3'd2) begin
            mem_raddr <= LMAX'(rcnt[0] ? kb : ka);
            rvalid    <= 1'b1;
            ridx      <= rcnt[1:0];
            rcnt      <= rcnt + 3'd1;
          end else if (!rvalid && !rvalid2) begin
            state <= S_SCALC;
          end
        end
        S_SCALC: begin
          y[0]  <= sh;
          y[1]  <= sv;
          wcnt  <= '0;
          state <= S_SWR;
        end
        S_SWR: begin
          mem_we    <= 1'b1;
          mem_waddr <= LMAX'(wcnt[0] ? kb : ka);
          mem_wdata <= y[{1'b0, wcnt[0]}];
          wcnt      <= wcnt + 2'd1;
          if (wcnt[0]) begin
            rcnt <= '0;
            if (32'(bidx) >= (nsz >> 1) - 1) begin
              state <= S_DONE;
            end else begin
              bidx  <= bidx + 1'b1;
              state <= S_SRD;
            end
          end
        end
        S_DONE: begin
          // the last write has reached the memory
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
