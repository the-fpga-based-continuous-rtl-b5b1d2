// bbq_pkg: types, constants and helper functions shared by the base-band tune
// (BBQ) processing chain: complex 32-bit samples, the window-function
// encoding, the trigger and chirp configuration records, and the base-4
// digit reversal used to address the output of the in-place radix-4 FFT.
// Widths of the data path (32-bit fixed point) follow the design description;
// the record layouts and the window list are this implementation's choice.
package bbq_pkg;

  // Complex sample / spectrum word, as stored in the frame buffers.
  typedef struct packed {
    logic signed [31:0] re;
    logic signed [31:0] im;
  } cplx_t;

  // The eight pre-programmed window functions.
  typedef enum logic [2:0] {
    WIN_RECT     = 3'd0,
    WIN_TRIANG   = 3'd1,
    WIN_HANN     = 3'd2,
    WIN_HAMMING  = 3'd3,
    WIN_BLACKMAN = 3'd4,
    WIN_BHARRIS  = 3'd5,   // 4-term Blackman-Harris
    WIN_NUTTALL  = 3'd6,
    WIN_BNUTTALL = 3'd7    // Blackman-Nuttall
  } win_e;

  // Trigger generator configuration.
  typedef struct packed {
    logic        src_turn;   // 0: millisecond clock, 1: turn clock
    logic [15:0] period;     // source events per acquisition trigger (0 read as 1)
    logic [7:0]  exc_every;  // excitation on every k-th acquisition, 0 = never
    logic [15:0] exc_delay;  // excitation delay after acquisition trigger, samples
  } trig_cfg_t;

  // Chirp (digital frequency synthesiser) configuration. Frequencies are
  // 40-bit phase increments per sample: f = inc / 2^40 * f_sample.
  typedef struct packed {
    logic [39:0]        f_start;
    logic [39:0]        f_end;
    logic signed [39:0] f_inc;    // added to the frequency every sample
    logic [31:0]        length;   // chirp length in samples, 0 = continuous tone
    logic [23:0]        amp;      // peak output amplitude, DAC LSBs
  } dfs_cfg_t;

  localparam logic signed [31:0] Q30_ONE = 32'sd1073741824;

  // Cosine-sum window coefficients a0..a3 in Q2.30:
  // w(n) = a0 - a1 cos(2 pi n/N) + a2 cos(4 pi n/N) - a3 cos(6 pi n/N).
  function automatic logic signed [31:0] win_coef(input win_e w, input logic [1:0] k);
    logic signed [31:0] a [4];
    case (w)
      WIN_HANN:     a = '{32'sd536870912, 32'sd536870912, 32'sd0,         32'sd0};
      WIN_HAMMING:  a = '{32'sd579820585, 32'sd493921239, 32'sd0,         32'sd0};
      WIN_BLACKMAN: a = '{32'sd450971566, 32'sd536870912, 32'sd85899346,  32'sd0};
      WIN_BHARRIS:  a = '{32'sd385204879, 32'sd524297395, 32'sd151698245, 32'sd12541305};
      WIN_NUTTALL:  a = '{32'sd382002981, 32'sd523337470, 32'sd154867931, 32'sd13533442};
      WIN_BNUTTALL: a = '{32'sd390393092, 32'sd525250341, 32'sd146672596, 32'sd11425794};
      default:      a = '{Q30_ONE,        32'sd0,         32'sd0,         32'sd0};
    endcase
    return a[k];
  endfunction

  // Saturate a wide signed value to 32 bits.
  function automatic logic signed [31:0] sat32(input logic signed [71:0] v);
    if (v > 72'sh0_0000_0000_7FFF_FFFF)       return 32'sh7FFF_FFFF;
    else if (v < -72'sh0_0000_0000_8000_0000) return 32'sh8000_0000;
    else                                      return v[31:0];
  endfunction

  // Reverse the base-4 digits of the low log2n bits of k (log2n even).
  function automatic logic [31:0] digit_rev(input logic [31:0] k, input logic [4:0] log2n);
    logic [31:0] r;
    r = '0;
    for (int d = 0; d < 16; d++) begin
      if (2 * d + 2 <= int'(log2n)) begin
        r[int'(log2n) - 2 - 2 * d +: 2] = k[2 * d +: 2];
      end
    end
    return r;
  endfunction

endpackage
