// rsa_pkg: types and constants shared by the Montgomery RSA blocks.
//
// IO_W is the width of the chip's data pins: operands are clocked in and
// results clocked out 32 bits per cycle. mont_phase_e names the phases of the
// square-and-multiply exponentiator (rsa_mont); each phase lasts n+2 clocks.
package rsa_pkg;
  localparam int unsigned IO_W = 32;

  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,  // waiting for start, result held on m_out
    PH_PRE   = 3'd1,  // P0 = mont(K, c), R0 = mont(K, 1): into Montgomery form
    PH_LOOP  = 3'd2,  // P = mont(P, P); R = mont(R, P) kept if exponent bit is 1
    PH_POST  = 3'd3,  // M1 + M2 = mont(1, R): back to ordinary form
    PH_FINAL = 3'd4   // M = M1 + M2, bit-serial on a BRFA
  } mont_phase_e;
endpackage
