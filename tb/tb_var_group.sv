// tb_var_group: self-checking test of one scan group (var_group) at its full depth of 64.
//
// The test drives a packet-start pulse every DEPTH cycles and a new random received sample each
// cycle. The check messages into chain position k are held at one random value p_k per frame
// and are the same on every edge of that node.
// With those inputs the expected values are simple closed forms computed here:
//   * in the cycle after a packet start every outgoing message of position k equals its received
//     sample (sample presented in slot DEPTH-1-k of the previous frame);
//   * one cycle later it is that sample's LLR plus (T_k - 1) * LLR(p_k), in sign-magnitude;
//   * the decoded bit is the sign of LLR(sample) + T_k * LLR(p_k) (received sign on zero) and
//     leaves dec_out in slot s of the frame after next for position (DEPTH + 1 - s) mod DEPTH.
// Unused edge outputs (index >= T_k) must be zero.
module tb_var_group;
  import ldpc_pkg::*;

  localparam int DP = 64;
  localparam int FR = 6;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, pkt_start = 1'b0;
  msg_t rx_in;
  logic dec_out;
  msg_t c2v [DP][TMAX];
  msg_t v2c [DP][TMAX];

  var_group #(.DEPTH(DP)) dut (.clk, .rst_n, .pkt_start, .rx_in, .dec_out, .c2v, .v2c);

  always #5 clk = ~clk;

  int rx  [FR][DP];   // rx[f][k]: sample of frame f that lands at position k
  int pat [FR][DP];

  function automatic int llr(input int sm);
    return ((sm & 8) != 0) ? -(sm & 7) : (sm & 7);
  endfunction
  function automatic int to_sm(input int x, input int rxsm);
    int mag = (x < 0) ? -x : x;
    int sgn = (x < 0) ? 1 : (x > 0) ? 0 : ((rxsm >> 3) & 1);
    if (mag > 7) mag = 7;
    return sgn * 8 + mag;
  endfunction

  initial begin
    repeat (FR * DP + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < FR; f++)
      for (int k = 0; k < DP; k++) begin
        rx[f][k]  = $urandom_range(0, 15);
        pat[f][k] = $urandom_range(0, 15);
      end
    rx_in = '0;
    for (int k = 0; k < DP; k++) for (int i = 0; i < TMAX; i++) c2v[k][i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FR; f++) begin
      for (int s = 0; s < DP; s++) begin
        @(negedge clk);
        // checks of what the previous edge produced
        if (f >= 1 && s == 1) begin         // messages just loaded with the received values
          for (int k = 0; k < DP; k++) for (int i = 0; i < TMAX; i++) begin
            checks++;
            if (int'(v2c[k][i]) != ((i < col_weight(k)) ? rx[f-1][k] : 0)) begin
              failures++; $display("FAIL load f=%0d k=%0d i=%0d got %h", f, k, i, v2c[k][i]);
            end
          end
        end
        if (f >= 1 && s == 2) begin         // first iteration
          for (int k = 0; k < DP; k++) for (int i = 0; i < TMAX; i++) begin
            automatic int t = col_weight(k);
            automatic int e = (i < t) ? to_sm(llr(rx[f-1][k]) + (t - 1) * llr(pat[f][k]), rx[f-1][k]) : 0;
            checks++;
            if (int'(v2c[k][i]) != e) begin
              failures++; $display("FAIL iter f=%0d k=%0d i=%0d got %h exp %h", f, k, i, v2c[k][i], e);
            end
          end
        end
        // decoded output: packet f-2 in slots 2..DP-1 of frame f, slots 0,1 of frame f+1
        begin
          int pf, pos, t, sum;
          logic exp_bit;
          pf  = (s >= 2) ? f - 2 : f - 3;
          pos = (DP + 1 - s) % DP;
          if (pf >= 0) begin
            t = col_weight(pos);
            sum = llr(rx[pf][pos]) + t * llr(pat[pf+2][pos]);
            exp_bit = (sum < 0) ? 1'b1 : (sum > 0) ? 1'b0 : rx[pf][pos][3];
            checks++;
            if (dec_out !== exp_bit) begin
              failures++; $display("FAIL dec f=%0d s=%0d pos=%0d got %b exp %b", f, s, pos, dec_out, exp_bit);
            end
          end
        end
        // inputs for this cycle
        pkt_start = (s == 0);
        rx_in = msg_t'(rx[f][DP-1-s]);
        if (s == 0)
          for (int k = 0; k < DP; k++) for (int i = 0; i < TMAX; i++) c2v[k][i] = msg_t'(pat[f][k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
