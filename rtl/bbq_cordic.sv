// bbq_cordic: iterative CORDIC sine/cosine generator, one micro-rotation per
// clock. It serves the window generator, the FFT twiddle factors and the
// frequency synthesiser, so that no large sine table is needed.
//
// The 32-bit phase is a fraction of a turn (2^32 = 360 degrees). Phases in
// the left half plane are rotated by half a turn first and the result negated,
// which keeps the residual angle within the CORDIC convergence range. The
// rotation starts from x = K*2^30 (K = prod 1/sqrt(1+2^-2i)), so the outputs
// come out gain-corrected in Q2.30: cos_o = round(2^30 cos(phase)) within a
// few LSBs.
//
// Timing: 'start' for one cycle loads the phase; 'done' pulses ITER+1 cycles
// later with cos_o/sin_o valid, and they hold until the next start. A start
// while busy restarts the rotation. The algorithm is this design's choice;
// the description only says that coefficients and chirps are computed in the
// FPGA.
module bbq_cordic #(
  parameter int unsigned ITER = 30
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [31:0]        phase,
  output logic               busy,
  output logic               done,
  output logic signed [31:0] cos_o,
  output logic signed [31:0] sin_o
);

  // atan(2^-i) in turns * 2^32.
  function automatic logic [31:0] atan_turn(input logic [4:0] i);
    case (i)
      5'd0:  return 32'd536870912;
      5'd1:  return 32'd316933406;
      5'd2:  return 32'd167458907;
      5'd3:  return 32'd85004756;
      5'd4:  return 32'd42667331;
      5'd5:  return 32'd21354465;
      5'd6:  return 32'd10679838;
      5'd7:  return 32'd5340245;
      5'd8:  return 32'd2670163;
      5'd9:  return 32'd1335087;
      5'd10: return 32'd667544;
      5'd11: return 32'd333772;
      5'd12: return 32'd166886;
      5'd13: return 32'd83443;
      5'd14: return 32'd41722;
      5'd15: return 32'd20861;
      5'd16: return 32'd10430;
      5'd17: return 32'd5215;
      5'd18: return 32'd2608;
      5'd19: return 32'd1304;
      5'd20: return 32'd652;
      5'd21: return 32'd326;
      5'd22: return 32'd163;
      5'd23: return 32'd81;
      5'd24: return 32'd41;
      5'd25: return 32'd20;
      5'd26: return 32'd10;
      5'd27: return 32'd5;
      5'd28: return 32'd3;
      5'd29: return 32'd1;
      5'd30: return 32'd1;
      default: return 32'd0;
    endcase
  endfunction

  localparam logic signed [33:0] K_Q30 = 34'sd652032874;

  logic signed [33:0] x, y, nx, ny;
  logic signed [31:0] z, nz;
  logic [4:0]         it;
  logic               neg;

  // one micro-rotation
  always_comb begin
    if (z >= 0) begin
      nx = x - (y >>> it);
      ny = y + (x >>> it);
      nz = z - signed'(atan_turn(it));
    end else begin
      nx = x + (y >>> it);
      ny = y - (x >>> it);
      nz = z + signed'(atan_turn(it));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      x     <= '0;
      y     <= '0;
      z     <= '0;
      it    <= '0;
      neg   <= 1'b0;
      cos_o <= '0;
      sin_o <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        it   <= '0;
        x    <= K_Q30;
        y    <= '0;
        if (phase[31] ^ phase[30]) begin
          z   <= signed'(phase ^ 32'h8000_0000);
          neg <= 1'b1;
        end else begin
          z   <= signed'(phase);
          neg <= 1'b0;
        end
      end else if (busy) begin
        x  <= nx;
        y  <= ny;
        z  <= nz;
        it <= it + 5'd1;
        if (32'(it) == ITER - 1) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          cos_o <= neg ? -nx[31:0] : nx[31:0];
          sin_o <= neg ? -ny[31:0] : ny[31:0];
        end
      end
    end
  end

endmodule
