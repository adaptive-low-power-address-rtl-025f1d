// sol_pkg: types shared by the self-organizing-list address bus coders.
//
// list_policy_e selects how a self-organizing list reorders itself after each
// symbol: move-to-front (the symbol goes to index 0 and everything in between
// moves down one place) or transpose (the symbol swaps places with the one just
// ahead of it). lsb_scheme_e selects the coder used on the least significant
// bits of a multiplexed (instruction + data) address bus: Delta with
// transition signaling, or INC-XOR. Both coder pairs are stateful and must see
// the same sequence of valid transfers on both ends of the bus.
package sol_pkg;

  typedef enum logic {
    POLICY_MTF = 1'b0,  // move-to-front
    POLICY_TR  = 1'b1   // transpose
  } list_policy_e;

  typedef enum logic {
    LSB_DELTA_TS = 1'b0,  // (addr - (prev + stride)) sent with transition signaling
    LSB_INC_XOR  = 1'b1   // addr XOR (prev + stride)
  } lsb_scheme_e;

endpackage
