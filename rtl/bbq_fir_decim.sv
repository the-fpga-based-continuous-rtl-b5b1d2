// bbq_fir_decim: low-pass FIR filter and programmable decimator for one plane.
//
// The codec delivers samples at up to 16 times the revolution frequency. This
// block filters them with a NTAPS-tap FIR (32 taps, as in the design
// description) and keeps every DECIM-th filtered value, DECIM programmable on
// the fly because the oversampling factor is not fixed. Only the samples that
// are kept are filtered: one multiply-accumulate per clock over a circular
// delay line, so an output takes NTAPS+2 clocks and the input strobe must be
// at least NTAPS+2 clocks apart (the system clock is far faster than the
// sample rate).
//
// Coefficients are signed Q1.(CW-1) and writable at any time through
// coef_we/coef_addr/coef_data. After reset they hold a moving average
// (2^(CW-1)/NTAPS each, unity DC gain); the real filter shape is loaded by
// the host. The output is the accumulator rescaled so that a full-scale
// IW-bit input maps to a full-scale OW-bit output, rounded and saturated.
// Coefficient format, defaults and output scaling are this design's choices.
//
// Timing: out_stb pulses one cycle with out_data, NTAPS+2 clocks after the
// in_stb that completed a decimation period.
module bbq_fir_decim
  import bbq_pkg::*;
#(
  parameter int unsigned NTAPS = 32,
  parameter int unsigned IW    = 24,
  parameter int unsigned CW    = 18,
  parameter int unsigned OW    = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_stb,
  input  logic signed [IW-1:0]     in_data,
  input  logic [7:0]               decim,      // 0 and 1 both mean no decimation
  input  logic                     coef_we,
  input  logic [$clog2(NTAPS)-1:0] coef_addr,
  input  logic signed [CW-1:0]     coef_data,
  output logic                     out_stb,
  output logic signed [OW-1:0]     out_data
);

  localparam int unsigned AW    = $clog2(NTAPS);
  localparam int unsigned ACCW  = IW + CW + AW + 1;
  localparam int unsigned SHIFT = CW - 1 - (OW - IW);

  logic signed [IW-1:0] dline [NTAPS];
  logic signed [CW-1:0] coef  [NTAPS];
  logic [AW-1:0]        wptr, rptr, tap;
  logic [7:0]           dcnt;
  logic                 mac, last;
  logic signed [ACCW-1:0] acc;
  logic signed [IW+CW-1:0] prod;

  localparam logic signed [ACCW-1:0] RND = ACCW'(1) <<< (SHIFT - 1);
  logic signed [ACCW-1:0] acc_sh;

  assign prod   = dline[rptr] * coef[tap];
  assign acc_sh = (acc + RND) >>> SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS; i++) begin
        dline[i] <= '0;
        coef[i]  <= CW'((1 << (CW - 1)) / NTAPS);
      end
      wptr     <= '0;
      rptr     <= '0;
      tap      <= '0;
      dcnt     <= '0;
      mac      <= 1'b0;
      last     <= 1'b0;
      acc      <= '0;
      out_stb  <= 1'b0;
      out_data <= '0;
    end else begin
      out_stb <= 1'b0;
      if (coef_we) coef[coef_addr] <= coef_data;
      if (in_stb) begin
        dline[wptr] <= in_data;
        wptr        <= wptr + 1'b1;
        if (dcnt + 8'd1 >= decim) begin
          dcnt <= '0;
          mac  <= 1'b1;
          rptr <= wptr;       // newest sample pairs with tap 0
          tap  <= '0;
          acc  <= '0;
        end else begin
          dcnt <= dcnt + 8'd1;
        end
      end else if (mac) begin
        acc  <= acc + ACCW'(prod);
        rptr <= rptr - 1'b1;
        tap  <= tap + 1'b1;
        if (32'(tap) == NTAPS - 1) begin
          mac  <= 1'b0;
          last <= 1'b1;
        end
      end
      if (last) begin
        last     <= 1'b0;
        out_stb  <= 1'b1;
        out_data <= OW'(sat32(72'(acc_sh)));
      end
    end
  end

endmodule
