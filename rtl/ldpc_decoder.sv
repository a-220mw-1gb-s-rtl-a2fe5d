// ldpc_decoder: fully parallel soft-decision decoder for a 1024-bit rate-1/2 LDPC code.
//
// The Tanner graph of the code is built directly in hardware: N = 1024 variable nodes, arranged
// as W = 16 scan groups of D = 64 nodes (var_group), and M = 512 combinational check nodes
// (check_node, 256 of weight 6 and 256 of weight 7), wired by the 3328 edges of the parity-check
// matrix defined in ldpc_pkg. Every clock cycle is one full iteration: the check nodes read the
// latched variable messages, and the variable nodes latch their new messages at the clock edge.
//
// Three packets are in flight: while one is decoded for D iterations, the next is shifted into
// the received scan chains (W samples per cycle) and the previous one shifted out of the decoded
// scan chains (W bits per cycle). With D = 64 cycles per 1024-bit packet, 16 bits leave per
// clock: 1.024 Gb/s at 64 MHz.
//
// Timing (slot = decoder_ctrl's counter, pkt_start when slot == 0):
//   * packet P is presented on rx_in during slots 0..D-1 of frame f; in slot s, rx_in[g] is the
//     received value of variable g + (D-1-s)W, sign-magnitude, sign 1 meaning bit one;
//   * it is decoded during frame f+1 (D iterations) and its decisions are latched at the clock
//     edge that ends slot 0 (pkt_start) of frame f+2;
//   * in slot s = 2..D-1 of frame f+2, and in slots 0 and 1 of frame f+3, dec_out[g] is the
//     decoded bit of variable g + ((D+1-s) mod D)W;
//   * pkt_error changes in slot 1 of frame f+2 and holds until slot 1 of frame f+3: it is 1 if
//     any parity check of P failed in P's last iteration.
// The architecture, sizes and message format follow the published decoder; the parity-check
// matrix, the counter-based control and the reset are this design's own.
module ldpc_decoder
  import ldpc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  msg_t                 rx_in   [W],     // received samples, one per scan group
  output logic [W-1:0]         dec_out,         // decoded bits, one per scan group
  output logic                 pkt_start,       // first cycle of a frame
  output logic [$clog2(D)-1:0] slot,            // cycle within the frame
  output logic                 pkt_error        // packet on dec_out failed a parity check
);

  // messages indexed [group][chain position][edge]
  msg_t c2v [W][D][TMAX];
  msg_t v2c [W][D][TMAX];

  logic [M-1:0] row_parity;

  decoder_ctrl #(.DEPTH(D)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .pkt_start (pkt_start),
    .slot      (slot)
  );

  for (genvar g = 0; g < W; g++) begin : g_vgrp
    var_group #(.DEPTH(D)) u_vgrp (
      .clk       (clk),
      .rst_n     (rst_n),
      .pkt_start (pkt_start),
      .rx_in     (rx_in[g]),
      .dec_out   (dec_out[g]),
      .c2v       (c2v[g]),
      .v2c       (v2c[g])
    );
  end

  // Message interconnect: slot s of check node c <-> edge edge_idx(c,s) of variable edge_col(c,s).
  for (genvar c = 0; c < M; c++) begin : g_check
    localparam int K = row_weight(c);
    msg_t in_k  [K];
    msg_t out_k [K];
    for (genvar s = 0; s < KMAX; s++) begin : g_slot
      if (s < K) begin : g_used
        localparam int V = edge_col(c, s);
        localparam int E = edge_idx(c, s);
        assign in_k[s]   = v2c[V % W][V / W][E];
        assign c2v[V % W][V / W][E] = out_k[s];
      end
    end
    check_node #(.K(K)) u_cn (
      .in_msg  (in_k),
      .out_msg (out_k),
      .parity  (row_parity[c])
    );
  end

  // Edges a variable node does not have are fed zero messages.
  for (genvar v = 0; v < N; v++) begin : g_pad
    for (genvar i = 0; i < TMAX; i++) begin : g_edge
      if (i >= col_weight(v / W)) begin : g_none
        assign c2v[v % W][v / W][i] = '0;
      end
    end
  end

  pkt_error_detect #(.ROWS(M)) u_perr (
    .clk        (clk),
    .rst_n      (rst_n),
    .pkt_start  (pkt_start),
    .row_parity (row_parity),
    .pkt_error  (pkt_error)
  );

endmodule
