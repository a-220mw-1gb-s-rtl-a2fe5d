// pkt_error_detect: packet error flag of the decoder.
//
// ORs the parity results of all ROWS check nodes and registers the OR on pkt_start, i.e. in the
// cycle of the last iteration of a packet. pkt_error then stays valid for the D cycles in which
// that packet's decoded bits leave the output scan chains. A failed check in the last iteration
// marks the packet as in error; this approximates testing Hx = 0 on the decoded bits, as in the
// published design. The register and its timing are this design's own choice.
module pkt_error_detect #(
  parameter int ROWS = 512
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            pkt_start,
  input  logic [ROWS-1:0] row_parity,
  output logic            pkt_error
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         pkt_error <= 1'b0;
    else if (pkt_start) pkt_error <= |row_parity;
  end

endmodule
