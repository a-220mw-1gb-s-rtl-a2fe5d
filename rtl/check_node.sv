// check_node: one parity check (row of H) of the soft-decision message-passing decoder.
//
// Purely combinational; the decoder evaluates every check node once per clock cycle.
// Parity update: the row parity is the XOR of the K incoming sign bits, and output i carries
// parity ^ sign_i, the bit the other K-1 variables imply for variable i.
// Reliability update: each 3-bit magnitude m is mapped to an 8-bit log-domain value
// f(m) = 2^(7-m) (a 3-to-8 decoder), the K values are summed, and for each output the own term is
// subtracted. The result is mapped back to a 3-bit magnitude by a leading-zeros count over 8 bits
// (a difference of 256 or more gives 0, eight leading zeros saturate at 7). Output i is thus about
// -log2(sum over j /= i of 2^-m_j): close to the smallest other magnitude, reduced when several
// are equally small.
// The split into a parity path and a reliability path, the 8-bit intermediate width, the adders
// and subtractors and the leading-zeros exponentiation follow the published check node; the exact
// logarithm map f(m) is this design's own choice.
// Ports: in_msg[K] / out_msg[K] are sign-magnitude messages; parity is 1 when the row check fails.
module check_node
  import ldpc_pkg::*;
#(
  parameter int K = 6                       // row weight (6 or 7 in this code)
) (
  input  msg_t in_msg  [K],
  output msg_t out_msg [K],
  output logic parity
);

  localparam int SUM_W = LL_W + $clog2(K + 1);

  logic [LL_W-1:0]  ll   [K];
  logic [SUM_W-1:0] total;

  // approximate log: magnitude m -> 2^(7-m)
  always_comb begin
    for (int i = 0; i < K; i++) ll[i] = LL_W'(1) << (LL_W - 1 - int'(in_msg[i].mag));
  end

  always_comb begin
    total  = '0;
    parity = 1'b0;
    for (int i = 0; i < K; i++) begin
      total  = total + SUM_W'(ll[i]);
      parity = parity ^ in_msg[i].sign;
    end
  end

  // approximate exp: leading-zeros count of (total - own term)
  always_comb begin
    logic [SUM_W-1:0] diff;
    int unsigned      lz;
    for (int i = 0; i < K; i++) begin
      diff = total - SUM_W'(ll[i]);
      lz   = 0;
      for (int b = LL_W - 1; b >= 0; b--) begin
        if (diff[b]) break;
        lz++;
      end
      out_msg[i].sign = parity ^ in_msg[i].sign;
      if (diff >= SUM_W'(1 << LL_W)) out_msg[i].mag = '0;
      else if (lz > MAG_MAX)        out_msg[i].mag = MAG_W'(MAG_MAX);
      else                          out_msg[i].mag = MAG_W'(lz);
    end
  end

endmodule
