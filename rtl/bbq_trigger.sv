// bbq_trigger: acquisition and excitation trigger generator.
//
// Acquisition triggers are derived from either the machine millisecond clock
// or the turn clock (cfg.src_turn), one every cfg.period source events (the
// first on the first event after the start). A trigger from the millisecond
// clock is held until the next turn-clock tick, and every trigger is then
// held until the next codec sample strobe, so acquisition and excitation
// both start on a sample that is linked to a turn and do not jitter against
// each other. Generation starts at once on a software command (cmd_start),
// or, after cmd_arm, on the next start-of-cycle pulse (soc); cmd_stop halts
// it. An excitation trigger follows every cfg.exc_every-th acquisition
// trigger (0 = never), cfg.exc_delay samples later (0 = same clock).
// Source selection, realignment and the two start modes follow the design
// description; the period/exc_every/exc_delay set stands for its "several
// other parameters" and is this design's choice.
//
// All inputs are single-clock pulses synchronous to clk. acq_trig and
// exc_trig are single-clock pulses in the clock after a smp_stb: acq_trig
// after the first sample strobe that follows the (turn-linked) trigger
// condition, exc_trig after the exc_delay-th strobe that follows acq_trig.
module bbq_trigger
  import bbq_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  trig_cfg_t cfg,
  input  logic      cmd_start,
  input  logic      cmd_arm,
  input  logic      cmd_stop,
  input  logic      soc,
  input  logic      ms_tick,
  input  logic      turn_tick,
  input  logic      smp_stb,
  output logic      acq_trig,
  output logic      exc_trig,
  output logic      running,
  output logic      armed
);

  logic [15:0] evcnt;
  logic        pend_turn, pend_smp;
  logic [7:0]  acqcnt;
  logic        exc_pend;
  logic [15:0] exc_cnt;
  logic        src_ev;

  assign src_ev = cfg.src_turn ? turn_tick : ms_tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      armed     <= 1'b0;
      evcnt     <= '0;
      pend_turn <= 1'b0;
      pend_smp  <= 1'b0;
      acqcnt    <= '0;
      exc_pend  <= 1'b0;
      exc_cnt   <= '0;
      acq_trig  <= 1'b0;
      exc_trig  <= 1'b0;
    end else begin
      acq_trig <= 1'b0;
      exc_trig <= 1'b0;
      // excitation delay, counted in samples (a reload below takes priority)
      if (exc_pend && smp_stb) begin
        if (exc_cnt == 16'd1) begin
          exc_pend <= 1'b0;
          exc_trig <= 1'b1;
        end
        exc_cnt <= exc_cnt - 16'd1;
      end
      if (cmd_stop) begin
        running   <= 1'b0;
        armed     <= 1'b0;
        pend_turn <= 1'b0;
        pend_smp  <= 1'b0;
        exc_pend  <= 1'b0;
      end else if (cmd_start || (armed && soc)) begin
        running <= 1'b1;
        armed   <= 1'b0;
        evcnt   <= '0;
        acqcnt  <= '0;
      end else if (cmd_arm && !running) begin
        armed <= 1'b1;
      end else if (running) begin
        // source event divider
        if (src_ev) begin
          if (evcnt == 16'd0) begin
            evcnt <= (cfg.period == 16'd0) ? 16'd0 : cfg.period - 16'd1;
            if (cfg.src_turn) pend_smp  <= 1'b1;
            else              pend_turn <= 1'b1;
          end else begin
            evcnt <= evcnt - 16'd1;
          end
        end
        // link to the turn clock
        if (pend_turn && turn_tick) begin
          pend_turn <= 1'b0;
          pend_smp  <= 1'b1;
        end
        // realign to the sampling clock
        if (pend_smp && smp_stb) begin
          pend_smp <= 1'b0;
          acq_trig <= 1'b1;
          if (cfg.exc_every != 8'd0) begin
            if (acqcnt + 8'd1 >= cfg.exc_every) begin
              acqcnt <= '0;
              if (cfg.exc_delay == 16'd0) exc_trig <= 1'b1;
              else begin
                exc_pend <= 1'b1;
                exc_cnt  <= cfg.exc_delay;
              end
            end else begin
              acqcnt <= acqcnt + 8'd1;
            end
          end
        end
      end
    end
  end

endmodule
