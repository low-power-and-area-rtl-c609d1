// csla_pkg: shared types and the square-root group table of the carry-select adders.
//
// A square-root carry-select adder of WIDTH bits starts with a 2-bit ripple-carry adder
// (bits [1:0], fed by the adder's carry-in) and continues with carry-select groups whose
// size grows towards the top.  The group sizes below are the published ones for the five
// sizes the design was evaluated at:
//   4 bit : 2 | 2
//   8 bit : 2 | 2 4
//  16 bit : 2 | 2 3 4 5
//  32 bit : 2 | 2 3 4 6 7 8            (no 5-bit group; the sizes add up to 32)
//  64 bit : 2 | 2 3 4 5 6 7 8 8 9 10
// Functions here are evaluated at elaboration only; no hardware comes from this package.
package csla_pkg;

  // How a ripple-carry adder gets its carry into bit 0.
  //   CIN_PORT : from the cin port, bit 0 is a full adder
  //   CIN_ZERO : constant 0, bit 0 is a half adder
  //   CIN_ONE  : constant 1, bit 0 is a full adder with its carry input tied to 1
  typedef enum logic [1:0] {
    CIN_PORT = 2'd0,
    CIN_ZERO = 2'd1,
    CIN_ONE  = 2'd2
  } cin_mode_e;

  // Width of the ripple-carry adder at the bottom of every square-root adder.
  localparam int unsigned RCA_BITS = 2;

  // Number of carry-select groups above the bottom RCA.
  function automatic int unsigned num_groups(int unsigned width);
    case (width)
      4:       return 1;
      8:       return 2;
      16:      return 4;
      32:      return 6;
      64:      return 10;
      default: return 0;
    endcase
  endfunction

  // Size of carry-select group k (k = 0 is the lowest group, next to the RCA).
  function automatic int unsigned group_size(int unsigned width, int unsigned k);
    case (width)
      4:       return 2;
      8:       return (k == 0) ? 2 : 4;
      16:      return k + 2;
      32:      return (k < 3) ? k + 2 : k + 3;
      64:      return (k < 7) ? k + 2 : k + 1;
      default: return 0;
    endcase
  endfunction

  // Bit position of the least significant bit of group k.
  function automatic int unsigned group_lsb(int unsigned width, int unsigned k);
    int unsigned lsb = RCA_BITS;
    for (int unsigned j = 0; j < k; j++) lsb += group_size(width, j);
    return lsb;
  endfunction

  // True when the group table covers exactly WIDTH bits.
  function automatic bit width_supported(int unsigned width);
    int unsigned n = num_groups(width);
    return (n != 0) && (group_lsb(width, n) == width);
  endfunction

endpackage
