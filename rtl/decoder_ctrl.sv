// decoder_ctrl: the decoder's control block: packet framing for the three-block pipeline.
//
// A modulo-D counter runs from reset. pkt_start is high in the cycle in which the counter is 0,
// i.e. once every D cycles, starting with the first cycle after reset. slot is the counter value:
// the index, within the packet, of the sample the input scan chains take in this cycle. The published design only names this block; the counter is
// this design's simplest realisation of the fixed D-cycle packet period.
module decoder_ctrl #(
  parameter int DEPTH = 64                  // scan depth = cycles (iterations) per packet
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     pkt_start,
  output logic [$clog2(DEPTH)-1:0] slot
);

  logic [$clog2(DEPTH)-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                       cnt_q <= '0;
    else if (cnt_q == ($clog2(DEPTH))'(DEPTH - 1))    cnt_q <= '0;
    else                                              cnt_q <= cnt_q + 1'b1;
  end

  assign pkt_start = (cnt_q == '0);
  assign slot      = cnt_q;

endmodule
