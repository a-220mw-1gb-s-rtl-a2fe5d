// var_node: one variable node of the parallel decoder, with its scan-chain and message latches.
//
// The variable node holds all state of its column: the 4-bit received-value scan latch, the
// received value kept for the packet being decoded, the T outgoing message latches and the
// decoded-bit scan latch. Every clock cycle is one decoder iteration:
//   * the T incoming check messages and the held received value are converted from
//     sign-magnitude to two's complement and summed; the sign of the sum is the bit estimate;
//   * outgoing message i is the sum minus incoming message i, converted back to sign-magnitude
//     (magnitude saturated at 7) and latched for the check nodes;
//   * a zero sum or zero outgoing value takes the sign of the received value.
// On pkt_start the node starts a new packet: the held received value and all outgoing messages
// load the value in the received scan latch, and the decoded scan latch loads the bit estimate of
// the packet just finished. Otherwise the two scan latches shift (received in -> out every cycle,
// decoded in -> out). This follows the published variable node; the reset (asynchronous, active
// low, all latches cleared) is this design's own choice.
// Ports: rx_scan_in/out chain the 4-bit received samples, dec_scan_in/out the decoded bits,
// c2v_in[T] are the check messages, v2c_out[T] the registered variable messages.
module var_node
  import ldpc_pkg::*;
#(
  parameter int T = 3                       // column weight
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pkt_start,
  input  msg_t rx_scan_in,
  output msg_t rx_scan_out,
  input  logic dec_scan_in,
  output logic dec_scan_out,
  input  msg_t c2v_in  [T],
  output msg_t v2c_out [T]
);

  localparam int SUM_W = $clog2((T + 1) * MAG_MAX + 1) + 1;
  typedef logic signed [SUM_W-1:0] sum_t;

  msg_t rx_scan_q, rx_hold_q;
  logic dec_q;
  msg_t msg_q [T];

  function automatic sum_t to_tc(input msg_t m);
    return m.sign ? -sum_t'(m.mag) : sum_t'(m.mag);
  endfunction

  sum_t c2v_tc [T];
  sum_t total;
  logic decision;
  msg_t msg_d [T];

  always_comb begin
    total = to_tc(rx_hold_q);
    for (int i = 0; i < T; i++) begin
      c2v_tc[i] = to_tc(c2v_in[i]);
      total     = total + c2v_tc[i];
    end
    decision = (total == 0) ? rx_hold_q.sign : total[SUM_W-1];
  end

  always_comb begin
    sum_t ext;
    sum_t mag;
    for (int i = 0; i < T; i++) begin
      ext = total - c2v_tc[i];
      mag = ext[SUM_W-1] ? -ext : ext;
      msg_d[i].sign = (ext == 0) ? rx_hold_q.sign : ext[SUM_W-1];
      msg_d[i].mag  = (mag > sum_t'(MAG_MAX)) ? MAG_W'(MAG_MAX) : mag[MAG_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_scan_q <= '0;
      rx_hold_q <= '0;
      dec_q     <= 1'b0;
      for (int i = 0; i < T; i++) msg_q[i] <= '0;
    end else begin
      rx_scan_q <= rx_scan_in;
      if (pkt_start) begin
        rx_hold_q <= rx_scan_q;
        dec_q     <= decision;
        for (int i = 0; i < T; i++) msg_q[i] <= rx_scan_q;
      end else begin
        dec_q     <= dec_scan_in;
        for (int i = 0; i < T; i++) msg_q[i] <= msg_d[i];
      end
    end
  end

  assign rx_scan_out  = rx_scan_q;
  assign dec_scan_out = dec_q;
  assign v2c_out      = msg_q;

endmodule
