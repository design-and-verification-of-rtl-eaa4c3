// radar_pkg: widths, sizes and shared types of the FMCW range-Doppler chain.
//
// Sample words follow the FFT convention used throughout the chain: a 32-bit
// word holding a signed 16-bit real part in bits [15:0] and a signed 16-bit
// imaginary part in bits [31:16]. Magnitudes are unsigned 32-bit squared
// magnitudes. A detected peak is stored as {magnitude, range index, Doppler
// index} = 32 + 10 + 6 = 48 bits, the field order the peak FIFO uses.
// The 10/6-bit index widths follow from the 1024 range bins and 64 chirps;
// the packing order is the one the peak FIFO word is laid out in.
package radar_pkg;

  // Frame geometry of the main configuration.
  localparam int unsigned DEF_RANGE_BINS = 1024;  // range FFT length = samples per chirp
  localparam int unsigned DEF_NUM_CHIRPS = 64;    // Doppler FFT length = chirps per frame

  localparam int unsigned SAMPLE_W = 16;      // real / imaginary component width
  localparam int unsigned CPLX_W   = 2 * SAMPLE_W;
  localparam int unsigned MAG_W    = 32;      // squared magnitude width
  localparam int unsigned RANGE_W  = $clog2(DEF_RANGE_BINS);
  localparam int unsigned DOPP_W   = $clog2(DEF_NUM_CHIRPS);
  localparam int unsigned PEAK_W   = MAG_W + RANGE_W + DOPP_W;

  // FFT core configuration word (16 bits); bit 0 = forward transform.
  localparam logic [15:0] FFT_CONFIG_WORD = 16'h0001;

  // One detected target as stored in the peak FIFO.
  typedef struct packed {
    logic [MAG_W-1:0]   mag;
    logic [RANGE_W-1:0] range_idx;
    logic [DOPP_W-1:0]  doppler_idx;
  } peak_t;

  // Real and imaginary parts of a packed complex sample.
  function automatic logic signed [SAMPLE_W-1:0] cplx_re(input logic [CPLX_W-1:0] w);
    return w[SAMPLE_W-1:0];
  endfunction

  function automatic logic signed [SAMPLE_W-1:0] cplx_im(input logic [CPLX_W-1:0] w);
    return w[CPLX_W-1:SAMPLE_W];
  endfunction

endpackage
