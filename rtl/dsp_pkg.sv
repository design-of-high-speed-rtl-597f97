// dsp_pkg: types and constant functions shared by the adder, multiplier
// and filter modules.
//
// csla_group_w(n) gives the group width of an n-bit square-root carry
// select adder: the operand is cut into about sqrt(n) groups, so each
// group is ceil(sqrt(n)) bits wide (4 for 16 bits, 8 for 64 bits).
// booth_sel_e names the five partial-product choices of radix-4 modified
// Booth recoding: 0, +N, +2N, -N and -2N of the multiplicand N.
package dsp_pkg;

  typedef enum logic [2:0] {
    BOOTH_ZERO = 3'd0,
    BOOTH_P1   = 3'd1,
    BOOTH_P2   = 3'd2,
    BOOTH_M1   = 3'd3,
    BOOTH_M2   = 3'd4
  } booth_sel_e;

  // Smallest g with g*g >= n.
  function automatic int csla_group_w(input int n);
    int g;
    g = 1;
    while (g * g < n) g++;
    return g;
  endfunction

  // Radix-4 Booth recoding of one overlapping triple {b[2j+1], b[2j], b[2j-1]}.
  function automatic booth_sel_e booth_recode(input logic [2:0] trip);
    case (trip)
      3'b001, 3'b010: return BOOTH_P1;
      3'b011:         return BOOTH_P2;
      3'b100:         return BOOTH_M2;
      3'b101, 3'b110: return BOOTH_M1;
      default:        return BOOTH_ZERO;
    endcase
  endfunction

endpackage
