// Shared types and constants of the 54x54-bit Booth / Wallace-tree multiplier.
//
// booth_t  : one radix-4 digit in neg/two/one form plus its correction bit
//            (crt). The partial product of a digit is
//            ((one & X) | (two & 2X)) XOR neg, and crt is added at the digit's
//            least significant weight to finish the two's complement.
// dr_t     : a dual-rail bit. {r1,r0} = 2'b00 is the spacer (no data yet),
//            2'b01 is a valid 0 and 2'b10 a valid 1; 2'b11 never occurs.
// kgp_t    : the one-hot carry status of a bit or of a block of bits in the
//            dual-rail carry-lookahead adder: kill, generate or propagate.
//            All three low is the spacer.
package mult_pkg;

  // Operand width of the multiplier (54 bits: the IEEE 754 double mantissa).
  localparam int unsigned N_BITS  = 54;
  // Number of radix-4 digits of an unsigned 54-bit multiplier: one more
  // than 54/2 so that the top digit sees padded zeros.
  localparam int unsigned N_DIGITS = 28;
  // Product width.
  localparam int unsigned P_BITS  = 2 * N_BITS;

  typedef struct packed {
    logic neg;
    logic two;
    logic one;
    logic crt;
  } booth_t;

  typedef struct packed {
    logic r1;
    logic r0;
  } dr_t;

  typedef struct packed {
    logic k;
    logic g;
    logic p;
  } kgp_t;

  // Which radix-4 recoder drives the partial-product generators.
  typedef enum logic {
    RECODE_PARALLEL = 1'b0,  // each digit from y[2i+1], y[2i], y[2i-1]
    RECODE_SERIAL   = 1'b1   // each digit from y[2i+1], y[2i] and a carry
  } recode_e;


  // Encode a single-rail bit as a dual-rail code; 'valid' low gives the spacer.
  function automatic dr_t dr_enc(input logic bit_i, input logic valid);
    dr_t d;
    d.r1 = valid & bit_i;
    d.r0 = valid & ~bit_i;
    return d;
  endfunction

endpackage
