// Shared types and constants of the DCORDIC direct digital frequency synthesizer.
//
// abs_sign_e is the two-bit sign state that travels down an ABS column, one
// digit per clock: MSD02 (the MSD was 0 or 2 and the sign is still open), MSD1
// (the MSD was 1 and the sign is still open), PLUS and MINUS (decided). The
// encoding follows the MSD-first absolute value algorithm for carry-save numbers.
//
// alpha_q() gives the rotation angle alpha_i = atan(2^-i)/pi in the normalized
// angle format (pi radians = 1.0), rounded to a given number of fractional
// bits, as the table quantization of the design prescribes. inv_gain_q() gives
// the prescaling constant 1/K_n = prod 1/sqrt(1+2^-2i), rounded. Both are
// evaluated at elaboration; no ROM table exists in the hardware, the bits are
// wired into the carry-save cells and the initial vector.
package dcordic_pkg;

  typedef enum logic [1:0] {
    MSD02 = 2'b00,
    MSD1  = 2'b01,
    PLUS  = 2'b10,
    MINUS = 2'b11
  } abs_sign_e;

  localparam real PI = 3.14159265358979323846;

  // round(atan(2^-i)/pi * 2^frac)
  function automatic longint unsigned alpha_q(int i, int frac);
    real v;
    v = $atan(2.0 ** (-i)) / PI;
    return longint'($floor(v * (2.0 ** frac) + 0.5));
  endfunction

  // round(prod_{i<n} 1/sqrt(1+2^-2i) * 2^frac)
  function automatic longint unsigned inv_gain_q(int n, int frac);
    real k;
    k = 1.0;
    for (int i = 0; i < n; i++) k = k / $sqrt(1.0 + 2.0 ** (-2 * i));
    return longint'($floor(k * (2.0 ** frac) + 0.5));
  endfunction

endpackage
