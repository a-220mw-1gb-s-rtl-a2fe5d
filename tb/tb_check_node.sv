// tb_check_node: self-checking test of check_node for row weights 6 and 7.
//
// Drives random and directed sign-magnitude messages and compares every output with a reference
// computed here: sign_i = XOR of the other signs, magnitude_i = 0 when the sum S of 2^(7-m_j)
// over the other inputs is 256 or more, else min(7, 7 - floor(log2 S)). Also checks the row
// parity. Purely combinational, so each vector is checked after a 1 ns settle.
module tb_check_node;
  import ldpc_pkg::*;

  int checks = 0, failures = 0;

  msg_t in6 [6], out6 [6];
  msg_t in7 [7], out7 [7];
  logic par6, par7;

  check_node #(.K(6)) dut6 (.in_msg(in6), .out_msg(out6), .parity(par6));
  check_node #(.K(7)) dut7 (.in_msg(in7), .out_msg(out7), .parity(par7));

  function automatic int ref_mag(input int s);
    int lg;
    if (s >= 256) return 0;
    if (s == 0) return 7;
    lg = 0;
    while ((s >> (lg + 1)) != 0) lg++;
    return (7 - lg > 7) ? 7 : 7 - lg;
  endfunction

  task automatic check_vec(input int k, input msg_t v [7]);
    int s; logic p, ps;
    msg_t got;
    p = 1'b0;
    for (int j = 0; j < k; j++) p ^= v[j].sign;
    checks++;
    if (((k == 6) ? par6 : par7) !== p) begin
      failures++; $display("FAIL k=%0d parity got %b exp %b", k, (k == 6) ? par6 : par7, p);
    end
    for (int i = 0; i < k; i++) begin
      s = 0; ps = 1'b0;
      for (int j = 0; j < k; j++) if (j != i) begin
        s += 1 << (7 - int'(v[j].mag));
        ps ^= v[j].sign;
      end
      got = (k == 6) ? out6[i] : out7[i];
      checks++;
      if (got.sign !== ps || int'(got.mag) != ref_mag(s)) begin
        failures++;
        $display("FAIL k=%0d out%0d got %b/%0d exp %b/%0d", k, i, got.sign, got.mag, ps, ref_mag(s));
      end
    end
  endtask

  task automatic apply(input msg_t v [7]);
    for (int j = 0; j < 6; j++) in6[j] = v[j];
    for (int j = 0; j < 7; j++) in7[j] = v[j];
    #1;
    check_vec(6, v);
    check_vec(7, v);
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_t v [7];
    // directed: all strong, one weak, one zero
    for (int j = 0; j < 7; j++) v[j] = '{sign: 1'b0, mag: 3'd7};
    apply(v);
    v[2] = '{sign: 1'b1, mag: 3'd1};
    apply(v);
    v[4] = '{sign: 1'b1, mag: 3'd0};
    apply(v);
    for (int j = 0; j < 7; j++) v[j] = '{sign: 1'b1, mag: 3'd3};
    apply(v);
    // random
    for (int n = 0; n < 3000; n++) begin
      for (int j = 0; j < 7; j++) v[j] = msg_t'($urandom_range(0, 15));
      apply(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
