// Shared types for the scalable bit-serial multiplier.
//
// mode_e selects between the two operating modes of the datapath: a radix-2
// Montgomery multiplication (one partial product plus one multiple of the
// modulus per cycle) and an ordinary multiplication (two partial products per
// cycle). ctrl_t is the bundle of per-cycle control strobes that the
// controller drives into the datapath. The encodings are this design's own
// choice.
package mm_pkg;

  typedef enum logic {
    MODE_MONT = 1'b0,  // A*B*2^-(n+d) mod M, result in [0, 2M)
    MODE_MUL  = 1'b1   // A*B, 2n-bit product
  } mode_e;

  typedef struct packed {
    logic clr;         // clear RS, RC and the 2-bit adder carry
    logic iter;        // one partial-product cycle: load RS/RC, shift B
    logic lo_en;       // 2-bit adder result is a product bit pair
    logic conv;        // one conversion cycle through the d-bit adder
    logic conv_first;  // first conversion cycle (selects the initial carry)
    logic conv_last;   // last conversion cycle
  } ctrl_t;

endpackage
