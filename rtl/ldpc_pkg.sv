// ldpc_pkg: types, sizes and code construction shared by the parallel LDPC decoder.
//
// Sizes follow the decoder described for a 1024-bit rate-1/2 soft-decision code: N = 1024
// variable nodes, M = 512 check nodes (256 of row weight 6, 256 of row weight 7), messages of a
// sign bit and a 3-bit magnitude, a scan width of W = 16 samples and a depth of D = 64, so that
// one packet is loaded, decoded (D iterations) and unloaded every D clock cycles.
//
// Message convention: a message is sign-magnitude. The sign bit is the hard decision it implies
// (1 = bit one, i.e. a negative log-likelihood ratio), the magnitude its reliability 0..7.
//
// The parity-check matrix H is not published with the decoder; this package defines one with the
// published degree profile (columns of weight 3, 6, 7 and 8 averaging 3.25, rows of weight 6 and
// 7). It is built from closed-form permutations so that it can be evaluated at elaboration time:
//   * variable v belongs to scan group g = v mod W at chain position k = v / W;
//   * column weight: k = 0 -> 8, k = 1,2 -> 7, k = 3 -> 6, otherwise 3 (so every scan group has
//     the same node weights: 1 x 8, 2 x 7, 1 x 6, 60 x 3; 1024 columns, 3328 edges);
//   * edges 0..2 of every column form three layers; row c takes, from layer L (slots 2L, 2L+1),
//     the columns pi_L(2c) and pi_L(2c+1), with pi_0(x) = x, pi_1(x) = (545x + 326) mod 1024,
//     pi_2(x) = (393x + 565) mod 1024;
//   * the 256 extra edges (edge index 3..7 of columns 0..63) are numbered p: p < 192 is edge
//     3 + p/64 of column p mod 64, 192 <= p < 240 is edge 6 of column p-192, p >= 240 is edge 7
//     of column p-240; row 256 + r takes extra edge p = (191r + 199) mod 256 as its slot 6.
// No row holds a column twice; the matrix has a handful of length-4 cycles.
package ldpc_pkg;

  localparam int N      = 1024;   // code length (variable nodes)
  localparam int M      = 512;    // parity checks (check nodes)
  localparam int W      = 16;     // scan width: samples loaded per clock
  localparam int D      = 64;     // scan depth = decoder iterations per packet
  localparam int MAG_W  = 3;      // message magnitude bits
  localparam int LL_W   = 8;      // width of the check node's log-domain reliabilities
  localparam int TMAX   = 8;      // largest column weight
  localparam int KMAX   = 7;      // largest row weight
  localparam int MAG_MAX = (1 << MAG_W) - 1;

  typedef struct packed {
    logic             sign;   // 1 = bit one (negative LLR)
    logic [MAG_W-1:0] mag;    // reliability
  } msg_t;

  // Column weight of the variable node at scan-chain position k of its group.
  function automatic int col_weight(input int k);
    if (k == 0) return 8;
    if (k == 1 || k == 2) return 7;
    if (k == 3) return 6;
    return 3;
  endfunction

  // Row weight of check node c.
  function automatic int row_weight(input int c);
    return (c < M/2) ? 6 : 7;
  endfunction

  function automatic int layer_perm(input int layer, input int x);
    case (layer)
      0:       return x;
      1:       return (545 * x + 326) % N;
      default: return (393 * x + 565) % N;
    endcase
  endfunction

  // Column of the variable node wired to slot s of check node c.
  function automatic int edge_col(input int c, input int s);
    int p;
    if (s < 6) return layer_perm(s / 2, 2 * c + (s % 2));
    p = (191 * (c - M/2) + 199) % 256;
    if (p < 192) return p % 64;
    if (p < 240) return p - 192;
    return p - 240;
  endfunction

  // Which of that variable node's edges (0 .. weight-1) slot s of check node c is.
  function automatic int edge_idx(input int c, input int s);
    int p;
    if (s < 6) return s / 2;
    p = (191 * (c - M/2) + 199) % 256;
    if (p < 192) return 3 + p / 64;
    if (p < 240) return 6;
    return 7;
  endfunction

endpackage
