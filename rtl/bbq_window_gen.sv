// bbq_window_gen: computes one coefficient of the selected window function
// for sample index n of an acquisition of 2^log2n samples.
//
// Seven of the eight windows are cosine sums
//   w(n) = a0 - a1 cos(2 pi n/N) + a2 cos(4 pi n/N) - a3 cos(6 pi n/N)
// (periodic form); the three cosines come from three CORDIC units running in
// parallel, so nothing but the coefficients a0..a3 is stored. The eighth is
// the triangular window 1 - |2n/N - 1|, computed directly. The design
// description states that eight windows are pre-programmed and computed on
// the fly while acquiring; which eight, and the CORDIC method, are this
// design's choices (see bbq_pkg::win_e).
//
// Timing: 'start' loads n, log2n and wsel; 'done' pulses 32 clocks later with
// w (signed Q2.30, 2^30 = 1.0), which holds until the next start.
module bbq_window_gen
  import bbq_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [31:0]        n,
  input  logic [4:0]         log2n,
  input  win_e               wsel,
  output logic               done,
  output logic signed [31:0] w
);

  logic [31:0]        ph [3];
  logic signed [31:0] c  [3];
  logic [2:0]         cdone;
  logic               unused_busy [3];
  logic signed [31:0] unused_sin [3];
  win_e               wsel_q;
  logic [31:0]        n_q;
  logic [4:0]         log2n_q;

  // phase of cos(2 pi k n / N) as a fraction of a turn: k*n*2^(32-log2n)
  for (genvar k = 0; k < 3; k++) begin : g_cos
    assign ph[k] = 32'((64'(k + 1) * 64'(n)) << (32 - int'(log2n)));
    bbq_cordic u_cordic (
      .clk   (clk),
      .rst_n (rst_n),
      .start (start),
      .phase (ph[k]),
      .busy  (unused_busy[k]),
      .done  (cdone[k]),
      .cos_o (c[k]),
      .sin_o (unused_sin[k])
    );
  end

  logic signed [63:0] t1, t2, t3, tri_in;
  logic signed [31:0] w_next;

  always_comb begin
    t1 = (64'(win_coef(wsel_q, 2'd1)) * 64'(c[0])) >>> 30;
    t2 = (64'(win_coef(wsel_q, 2'd2)) * 64'(c[1])) >>> 30;
    t3 = (64'(win_coef(wsel_q, 2'd3)) * 64'(c[2])) >>> 30;
    // 2n/N in Q2.30
    tri_in = signed'(64'(n_q) << (31 - int'(log2n_q))) - 64'(Q30_ONE);
    if (wsel_q == WIN_TRIANG)
      w_next = Q30_ONE - 32'(tri_in < 0 ? -tri_in : tri_in);
    else
      w_next = 32'(64'(win_coef(wsel_q, 2'd0)) - t1 + t2 - t3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsel_q  <= WIN_RECT;
      n_q     <= '0;
      log2n_q <= '0;
      done    <= 1'b0;
      w       <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        wsel_q  <= wsel;
        n_q     <= n;
        log2n_q <= log2n;
      end
      if (cdone[0]) begin
        done <= 1'b1;
        w    <= w_next;
      end
    end
  end

endmodule
