// tb_traffic_pkg: synthetic traffic patterns for the network testbenches.
//
// A node's b-bit address s is mapped to a destination d:
//   bit-complement  d_i = ~s_i
//   bit-reverse     d_i = s_(b-1-i)
//   shuffle         d_i = s_((i-1) mod b)      (rotate left by one)
//   transpose       d_i = s_((i+b/2) mod b)    (swap the two halves)
//   uniform-random  any node, drawn with $urandom
package tb_traffic_pkg;

  typedef enum int {
    TP_BITCOMP = 0,
    TP_BITREV  = 1,
    TP_SHUFFLE = 2,
    TP_TRANSPOSE = 3,
    TP_RANDOM  = 4
  } pattern_e;

  function automatic int pattern_dest(int p, int s, int b, int nn);
    int d;
    d = 0;
    case (p)
      TP_BITCOMP:   d = (~s) & ((1 << b) - 1);
      TP_BITREV:    for (int i = 0; i < b; i++) d |= ((s >> (b - 1 - i)) & 1) << i;
      TP_SHUFFLE:   for (int i = 0; i < b; i++) d |= ((s >> ((i - 1 + b) % b)) & 1) << i;
      TP_TRANSPOSE: for (int i = 0; i < b; i++) d |= ((s >> ((i + b / 2) % b)) & 1) << i;
      default:      d = int'($urandom_range(nn - 1, 0));
    endcase
    return d;
  endfunction

endpackage
