// rsa_pkg: sizes shared by the blinded RSA datapath.
//
// KEY_BITS is the width of the modulus, of the operands of every modular
// operation and of the main adder (512 bits, the adder width given for the
// design). RNG_CYCLES is the fixed generation time of the 32-bit random
// number generator used for blinding: 40 clock cycles whatever the seed.
// Both numbers follow the design description; the phase encoding below is
// this implementation's own choice.
package rsa_pkg;
  parameter int unsigned KEY_BITS   = 512;
  parameter int unsigned RNG_CYCLES = 40;

  // Phases of the blinded RSA controller (rsa_blinded_top).
  typedef enum logic [3:0] {
    PH_IDLE,      // waiting for start
    PH_RNG,       // drawing a random number r
    PH_INV,       // extended Euclid: gcd(r, N) and r^-1 mod N
    PH_BLIND_EXP, // r^e mod N
    PH_BLIND_MUL, // base * r^e mod N
    PH_EXP,       // (base * r^e)^d mod N  = base^d * r mod N
    PH_UNBLIND,   // multiply by r^-1 mod N
    PH_DONE
  } phase_t;
endpackage
