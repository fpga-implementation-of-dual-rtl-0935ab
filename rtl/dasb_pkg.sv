// dasb_pkg: widths, types and shared helpers of the dual-microphone
// delay-and-sum beamformer.
//
// Number formats used throughout:
//   input / output samples   16-bit two's complement, Q1.15
//   FFT/IFFT data            24-bit two's complement, Q1.23 (the shared
//                            transform core works at 24-bit accuracy)
//   filter coefficients      18-bit two's complement, Q2.16
// A frame is 512 samples with 50% overlap (hop of 256), as in the
// reference design; the bit widths other than the 24-bit transform data
// are this implementation's choice.
package dasb_pkg;

  localparam int unsigned SAMPLE_W = 16;
  localparam int unsigned DATA_W   = 24;
  localparam int unsigned DATA_FRAC = 23;
  localparam int unsigned COEF_W   = 18;
  localparam int unsigned COEF_FRAC = 16;


  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [DATA_W-1:0]   data_t;
  typedef logic signed [COEF_W-1:0]   coef_t;

  typedef struct packed {
    data_t re;
    data_t im;
  } cplx_t;

  typedef struct packed {
    coef_t re;
    coef_t im;
  } cplx_coef_t;

  // The three uses of the shared FFT/IFFT core within one frame period.
  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,
    PH_FFT1 = 2'd1,   // forward transform of channel 1
    PH_FFT2 = 2'd2,   // forward transform of channel 2
    PH_IFFT = 2'd3    // inverse transform of the summed spectrum
  } phase_t;

  // Saturate a wide signed value to DATA_W bits.
  function automatic data_t sat_data(input logic signed [63:0] v);
    if (v > 64'sd8388607)       return data_t'(24'sh7FFFFF);
    else if (v < -64'sd8388608) return data_t'(24'sh800000);
    else                        return data_t'(v);
  endfunction

  // Saturate a wide signed value to SAMPLE_W bits.
  function automatic sample_t sat_sample(input logic signed [63:0] v);
    if (v > 64'sd32767)       return sample_t'(16'sh7FFF);
    else if (v < -64'sd32768) return sample_t'(16'sh8000);
    else                      return sample_t'(v);
  endfunction

  // Arithmetic shift right by sh with round-half-up.
  function automatic logic signed [63:0] rshift_round(input logic signed [63:0] v,
                                                      input int unsigned sh);
    if (sh == 0) return v;
    return (v + (64'sd1 <<< (sh - 1))) >>> sh;
  endfunction

endpackage
