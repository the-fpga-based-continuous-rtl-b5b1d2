// bbq_dfs: digital frequency synthesiser producing the chirp excitation for
// one plane.
//
// A 40-bit phase accumulator advances by the current frequency word at every
// codec sample; the sine of its top 32 bits (CORDIC, Q2.30) is scaled by the
// amplitude and sent to the DAC. On an excitation trigger the phase is
// cleared and the frequency loaded with cfg.f_start; each sample then adds
// cfg.f_inc to the frequency until it reaches cfg.f_end, where it stays.
// The chirp ends after cfg.length samples (0 = endless tone, used as test
// tone); the output is then zero. A new trigger restarts the chirp, and the
// configuration is read at the trigger, so it can change on the fly between
// chirps. The 40-bit phase and the parameter set (length, amplitude, start
// and end frequency, increment) follow the design description; the update
// per sample, the sweep clamp and the CORDIC are this design's choices.
//
// Timing: dac_out changes 33 clocks after each smp_stb; the sample strobe
// must therefore be at least 34 clocks apart.
module bbq_dfs
  import bbq_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  dfs_cfg_t           cfg,
  input  logic               trig,
  input  logic               stop,
  input  logic               smp_stb,
  output logic signed [23:0] dac_out,
  output logic               active
);

  logic [39:0]        phase, freq;
  logic [31:0]        ph_q;      // phase of the sample being computed
  logic [31:0]        cnt;
  dfs_cfg_t           c;
  logic               cs_start, cs_done, unused_busy;
  logic signed [31:0] s, unused_cos;

  bbq_cordic u_cordic (
    .clk   (clk),
    .rst_n (rst_n),
    .start (cs_start),
    .phase (ph_q),
    .busy  (unused_busy),
    .done  (cs_done),
    .cos_o (unused_cos),
    .sin_o (s)
  );

  logic [40:0]        fsum;
  logic               past_end;
  logic signed [63:0] scaled;
  always_comb begin
    fsum     = 41'(signed'({1'b0, freq}) + 41'(c.f_inc));
    past_end = c.f_inc[39] ? (fsum[39:0] < c.f_end || fsum[40])
                           : (fsum[39:0] > c.f_end || fsum[40]);
    scaled   = (64'(s) * 64'(signed'({1'b0, c.amp})) + 64'sd536870912) >>> 30;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= '0;
      ph_q     <= '0;
      freq     <= '0;
      cnt      <= '0;
      c        <= '0;
      active   <= 1'b0;
      cs_start <= 1'b0;
      dac_out  <= '0;
    end else begin
      cs_start <= 1'b0;
      if (stop) begin
        active  <= 1'b0;
        dac_out <= '0;
      end else if (trig) begin
        c      <= cfg;
        phase  <= '0;
        freq   <= cfg.f_start;
        cnt    <= '0;
        active <= 1'b1;
      end else if (smp_stb && active) begin
        cs_start <= 1'b1;              // sine of the phase before the update
        ph_q     <= phase[39:8];
        phase    <= phase + freq;
        freq     <= past_end ? c.f_end : fsum[39:0];
        cnt      <= cnt + 32'd1;
        if (c.length != 32'd0 && cnt == c.length - 32'd1) active <= 1'b0;
      end else if (smp_stb) begin
        dac_out <= '0;
      end
      if (cs_done) dac_out <= 24'(scaled);
    end
  end

endmodule
