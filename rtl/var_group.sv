// var_group: one scan group ("vgrp" macro) of the decoder: D variable nodes on one scan chain.
//
// Group g holds the variable nodes g, g+W, g+2W, ..., g+(D-1)W; chain position k is variable
// g + kW. Received samples enter at position 0 and shift one position per clock, so after D
// cycles the sample presented first sits at position D-1. The decoded bits, loaded into every
// node on pkt_start, shift the same way and leave through one extra output register after
// position D-1: in the j-th cycle after pkt_start (j = 1..D) dec_out carries position D-j.
// Node weights come from ldpc_pkg::col_weight(k), so all groups are identical. The chain order
// and the extra output register follow the published scan-group drawing.
// Ports: rx_in is the group's 4-bit received-sample input, dec_out its decoded-bit output;
// c2v[k][i] / v2c[k][i] are the messages of edge i of position k (entries i >= weight are
// unused inputs and zero outputs).
module var_group
  import ldpc_pkg::*;
#(
  parameter int DEPTH = D
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pkt_start,
  input  msg_t rx_in,
  output logic dec_out,
  input  msg_t c2v [DEPTH][TMAX],
  output msg_t v2c [DEPTH][TMAX]
);

  msg_t rx_chain  [DEPTH+1];
  logic dec_chain [DEPTH+1];
  logic dec_out_q;

  assign rx_chain[0]  = rx_in;
  assign dec_chain[0] = 1'b0;

  for (genvar k = 0; k < DEPTH; k++) begin : g_node
    localparam int T = col_weight(k);
    msg_t c2v_k [T];
    msg_t v2c_k [T];
    for (genvar i = 0; i < TMAX; i++) begin : g_edge
      if (i < T) begin : g_used
        assign c2v_k[i]  = c2v[k][i];
        assign v2c[k][i] = v2c_k[i];
      end else begin : g_unused
        assign v2c[k][i] = '0;
      end
    end
    var_node #(.T(T)) u_node (
      .clk          (clk),
      .rst_n        (rst_n),
      .pkt_start    (pkt_start),
      .rx_scan_in   (rx_chain[k]),
      .rx_scan_out  (rx_chain[k+1]),
      .dec_scan_in  (dec_chain[k]),
      .dec_scan_out (dec_chain[k+1]),
      .c2v_in       (c2v_k),
      .v2c_out      (v2c_k)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dec_out_q <= 1'b0;
    else        dec_out_q <= dec_chain[DEPTH];
  end
  assign dec_out = dec_out_q;

endmodule
