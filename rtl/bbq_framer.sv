// bbq_framer: frame builder with apodisation for one frame buffer.
//
// It joins the filtered horizontal and vertical samples into one complex
// sample H + jV, multiplies both parts by the window coefficient of the
// current sample index, and writes the result into its buffer at addresses
// 0 .. N-1 (N = 2^log2n, any power of two up to 2^LMAX). When log2n is odd,
// N is not a power of four, so the framer then writes zeros to addresses
// N .. 2N-1 and the FFT runs on 2N points. This follows the design
// description; the handshake and the one-sample input holding register are
// this design's choices.
//
// Operation: 'start' (an acquisition trigger) is taken only when idle; it
// latches log2n and the window. The window coefficient of the next index is
// computed (bbq_window_gen, 32 clocks) while waiting for the next sample, so
// a sample is written in the clock after it arrives when samples are at
// least ~34 clocks apart. A sample that arrives while the previous one still
// waits for its coefficient sets 'overflow' (sticky until the next start).
// 'done' pulses once the last word, padding included, is written; frame_log2n
// then gives the FFT size (log2n rounded up to even).
module bbq_framer
  import bbq_pkg::*;
#(
  parameter int unsigned LMAX = 18
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [4:0]         cfg_log2n,
  input  win_e               cfg_wsel,
  input  logic               smp_stb,
  input  logic signed [31:0] smp_h,
  input  logic signed [31:0] smp_v,
  output logic               mem_we,
  output logic [LMAX-1:0]    mem_addr,
  output cplx_t              mem_wdata,
  output logic               busy,
  output logic               done,
  output logic [4:0]         frame_log2n,
  output logic               overflow
);

  typedef enum logic [1:0] {S_IDLE, S_ACQ, S_PAD} state_e;
  state_e state;

  logic [4:0]         log2n_q;
  win_e               wsel_q;
  logic [LMAX:0]      n;          // next sample index / pad address
  logic [LMAX:0]      n_last;     // N-1
  logic               w_ok, pend;
  logic signed [31:0] ph, pv;
  logic               wg_start, wg_done;
  logic signed [31:0] w;

  assign busy = (state != S_IDLE);

  bbq_window_gen u_win (
    .clk   (clk),
    .rst_n (rst_n),
    .start (wg_start),
    .n     (32'(n)),
    .log2n (log2n_q),
    .wsel  (wsel_q),
    .done  (wg_done),
    .w     (w)
  );

  function automatic logic signed [31:0] apod(input logic signed [31:0] x,
                                              input logic signed [31:0] c);
    logic signed [63:0] p;
    p = 64'(x) * 64'(c) + 64'sd536870912;   // round
    return sat32(72'(p >>> 30));
  endfunction

  logic take;
  assign take = (state == S_ACQ) && w_ok && (pend || smp_stb);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      log2n_q     <= 5'd2;
      wsel_q      <= WIN_RECT;
      n           <= '0;
      n_last      <= '0;
      w_ok        <= 1'b0;
      pend        <= 1'b0;
      ph          <= '0;
      pv          <= '0;
      wg_start    <= 1'b0;
      mem_we      <= 1'b0;
      mem_addr    <= '0;
      mem_wdata   <= '0;
      done        <= 1'b0;
      frame_log2n <= 5'd2;
      overflow    <= 1'b0;
    end else begin
      wg_start <= 1'b0;
      mem_we   <= 1'b0;
      done     <= 1'b0;
      if (wg_done) w_ok <= 1'b1;
      case (state)
        S_IDLE: begin
          if (start) begin
            log2n_q     <= cfg_log2n;
            wsel_q      <= cfg_wsel;
            frame_log2n <= cfg_log2n + 5'(cfg_log2n[0]);
            n           <= '0;
            n_last      <= (LMAX+1)'((1 << cfg_log2n) - 1);
            w_ok        <= 1'b0;
            pend        <= 1'b0;
            overflow    <= 1'b0;
            wg_start    <= 1'b1;
            state       <= S_ACQ;
          end
        end
        S_ACQ: begin
          if (smp_stb && !take) begin
            if (pend) overflow <= 1'b1;
            pend <= 1'b1;
            ph   <= smp_h;
            pv   <= smp_v;
          end
          if (take) begin
            mem_we       <= 1'b1;
            mem_addr     <= LMAX'(n);
            mem_wdata.re <= apod(pend ? ph : smp_h, w);
            mem_wdata.im <= apod(pend ? pv : smp_v, w);
            // a sample arriving with the held one is kept for the next index
            pend         <= pend && smp_stb;
            if (pend && smp_stb) begin
              ph <= smp_h;
              pv <= smp_v;
            end
            w_ok <= 1'b0;
            n    <= n + 1'b1;
            if (n == n_last) begin
              if (log2n_q[0]) begin
                state <= S_PAD;
              end else begin
                done  <= 1'b1;
                state <= S_IDLE;
              end
            end else begin
              wg_start <= 1'b1;
            end
          end
        end
        S_PAD: begin
          mem_we    <= 1'b1;
          mem_addr  <= LMAX'(n);
          mem_wdata <= '0;
          n         <= n + 1'b1;
          if (n == {n_last[LMAX-1:0], 1'b1}) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
