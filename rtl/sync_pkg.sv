// sync_pkg: constants and constant functions shared by the blind frequency/phase
// synchronization core.
//
// The default configuration follows the main configuration used in the design
// description: 6-bit input samples, a maximum burst length (MBL) of 512 symbols and an FFT of
// twice that length, with BPSK and QPSK selectable at run time.  Angles are
// carried everywhere as unsigned phase words: a W-bit word p stands for the
// angle 2*pi*p/2^W, so wrap-around modulo 2*pi is free.  The helper functions
// below are evaluated at elaboration time only (they build ROM contents).
package sync_pkg;

  localparam int DEF_BW        = 6;    // input bit width per I/Q component
  localparam int DEF_MBL       = 512;  // maximum burst length in symbols
  localparam int DEF_LOG2M_MAX = 2;    // largest modulation index M = 4 (QPSK)

  localparam real PI = 3.14159265358979323846;

  // atan(2^-i) expressed in units of 2*pi/2^zw, rounded.
  function automatic longint atan_units(input int i, input int zw);
    real a;
    a = $atan(1.0 / (2.0 ** i)) / (2.0 * PI) * (2.0 ** zw);
    return longint'($rtoi($floor(a + 0.5)));
  endfunction

  // round(amp * sin(2*pi*idx/2^pw)) for a table of 2^pw phase steps.
  function automatic longint sin_units(input longint idx, input int pw, input real amp);
    real s;
    s = $sin(2.0 * PI * real'(idx) / (2.0 ** pw)) * amp;
    return longint'($rtoi($floor(s + 0.5)));
  endfunction

endpackage
