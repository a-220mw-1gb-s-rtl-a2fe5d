// tb_var_node: self-checking test of var_node for column weights 3 and 8.
//
// Random check messages, received samples, decoded-scan inputs and pkt_start pulses are applied
// on the falling clock edge. A cycle model kept here in plain integers (LLR sum, sum minus own
// message, saturation to 7, ties resolved by the received sign) predicts every latch; after each
// rising edge the outgoing messages and both scan outputs are compared with it. Covers sums of
// zero (tie rule), saturation and packet starts, and counts each.
module tb_var_node;
  import ldpc_pkg::*;

  int checks = 0, failures = 0;
  int n_tie = 0, n_sat = 0, n_start = 0;

  logic clk = 1'b0, rst_n = 1'b0, pkt_start = 1'b0;
  msg_t rx_in;
  logic dec_in;
  msg_t c2v [8];
  msg_t rx_out3, rx_out8;
  logic dec_out3, dec_out8;
  msg_t v2c3 [3], v2c8 [8];

  var_node #(.T(3)) dut3 (.clk, .rst_n, .pkt_start, .rx_scan_in(rx_in), .rx_scan_out(rx_out3),
    .dec_scan_in(dec_in), .dec_scan_out(dec_out3), .c2v_in(c2v[0:2]), .v2c_out(v2c3));
  var_node #(.T(8)) dut8 (.clk, .rst_n, .pkt_start, .rx_scan_in(rx_in), .rx_scan_out(rx_out8),
    .dec_scan_in(dec_in), .dec_scan_out(dec_out8), .c2v_in(c2v), .v2c_out(v2c8));

  always #5 clk = ~clk;

  // model state, index 0 for T=3 and 1 for T=8
  int   m_rx_scan, m_rx_hold [2], m_msg [2][8];
  logic m_dec [2];

  function automatic int llr(input int sm);   // sign-magnitude 4-bit to integer
    return ((sm & 8) != 0) ? -(sm & 7) : (sm & 7);
  endfunction

  function automatic int to_sm(input int x, input int rxsm);
    int mag = (x < 0) ? -x : x;
    int sgn = (x < 0) ? 1 : (x > 0) ? 0 : ((rxsm >> 3) & 1);
    if (mag > 7) mag = 7;
    return sgn * 8 + mag;
  endfunction

  task automatic model_step();
    int t, sum;
    int nxt_msg [8];
    logic nxt_dec;
    for (int d = 0; d < 2; d++) begin
      t = (d == 0) ? 3 : 8;
      sum = llr(m_rx_hold[d]);
      for (int i = 0; i < t; i++) sum += llr(int'(c2v[i]));
      if (sum == 0) n_tie++;
      nxt_dec = (sum < 0) ? 1'b1 : (sum > 0) ? 1'b0 : m_rx_hold[d][3];
      for (int i = 0; i < t; i++) begin
        int e = sum - llr(int'(c2v[i]));
        if (e > 7 || e < -7) n_sat++;
        nxt_msg[i] = to_sm(e, m_rx_hold[d]);
      end
      if (pkt_start) begin
        m_rx_hold[d] = m_rx_scan;
        m_dec[d] = nxt_dec;
        for (int i = 0; i < t; i++) m_msg[d][i] = m_rx_scan;
      end else begin
        m_dec[d] = dec_in;
        for (int i = 0; i < t; i++) m_msg[d][i] = nxt_msg[i];
      end
    end
    m_rx_scan = int'(rx_in);
  endtask

  task automatic compare();
    checks++;
    if (int'(rx_out3) != m_rx_scan || int'(rx_out8) != m_rx_scan) begin
      failures++; $display("FAIL rx scan %0d %0d exp %0d", rx_out3, rx_out8, m_rx_scan);
    end
    checks++;
    if (dec_out3 !== m_dec[0] || dec_out8 !== m_dec[1]) begin
      failures++; $display("FAIL dec scan %b %b exp %b %b", dec_out3, dec_out8, m_dec[0], m_dec[1]);
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (int'(v2c3[i]) != m_msg[0][i]) begin
        failures++; $display("FAIL T=3 msg%0d got %h exp %h", i, v2c3[i], m_msg[0][i]);
      end
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (int'(v2c8[i]) != m_msg[1][i]) begin
        failures++; $display("FAIL T=8 msg%0d got %h exp %h", i, v2c8[i], m_msg[1][i]);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rx_in = '0; dec_in = 1'b0;
    for (int i = 0; i < 8; i++) c2v[i] = '0;
    m_rx_scan = 0; m_rx_hold = '{0, 0}; m_dec = '{1'b0, 1'b0};
    for (int d = 0; d < 2; d++) for (int i = 0; i < 8; i++) m_msg[d][i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      pkt_start = ($urandom_range(0, 7) == 0);
      if (pkt_start) n_start++;
      rx_in  = msg_t'($urandom_range(0, 15));
      dec_in = 1'(($urandom_range(0, 1)));
      // bias toward small magnitudes now and then so that sums of zero occur
      for (int i = 0; i < 8; i++)
        c2v[i] = (n % 3 == 0) ? msg_t'({1'($urandom_range(0, 1)), 3'($urandom_range(0, 1))})
                              : msg_t'($urandom_range(0, 15));
      @(posedge clk);
      model_step();
      #1 compare();
    end
    checks++;
    if (n_tie == 0 || n_sat == 0 || n_start == 0) begin
      failures++; $display("FAIL coverage tie=%0d sat=%0d start=%0d", n_tie, n_sat, n_start);
    end
    $display("coverage: zero sums %0d, saturations %0d, packet starts %0d", n_tie, n_sat, n_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
