// Shared types and constants of the ECG heart-rate estimator.
//
// The sample rate (512 Hz), the 25 MHz system clock, the 4096-point
// radix-4 FFT with 16-bit real and imaginary parts and the 12-bit ADC
// word follow the design description; the Q1.14 twiddle format and the
// complex struct are this implementation's choices.
package hr_pkg;

  localparam int unsigned CLK_HZ_DEF = 25_000_000;  // system clock
  localparam int unsigned FS_DEF     = 512;         // ECG sample rate in Hz
  localparam int unsigned ADC_W      = 12;          // LTC1282 resolution
  localparam int unsigned DW         = 16;          // FFT real / imaginary width
  localparam int unsigned TW_FRAC    = 14;          // twiddle fraction bits (1.0 = 16384)
  localparam int unsigned TW_LOG2N   = 12;          // twiddle table spans a 4096-point circle

  // One FFT data word: 16-bit real part in the upper half, imaginary in the lower.
  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // Saturate a wide signed value to DW bits.
  function automatic logic signed [DW-1:0] sat_dw(input logic signed [39:0] v);
    if (v > 40'sd32767)       return 16'sh7fff;
    else if (v < -40'sd32768) return 16'sh8000;
    else                      return v[DW-1:0];
  endfunction

endpackage
