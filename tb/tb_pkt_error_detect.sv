// tb_pkt_error_detect: self-checking test of the packet error flag with 512 row parities.
//
// Random parity vectors (mostly all-pass, sometimes a single failing row at a random position,
// sometimes many) are applied every cycle; pkt_error must take the OR of the vector present in
// a pkt_start cycle and hold it until the next one.
module tb_pkt_error_detect;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, pkt_start = 1'b0;
  logic [511:0] row_parity = '0;
  logic pkt_error;
  logic exp_err;
  int n_set = 0, n_clr = 0;

  pkt_error_detect dut (.clk, .rst_n, .pkt_start, .row_parity, .pkt_error);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_err = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (pkt_error !== exp_err) begin
        failures++; $display("FAIL cycle %0d got %b exp %b", n, pkt_error, exp_err);
      end
      pkt_start  = ($urandom_range(0, 3) == 0);
      row_parity = '0;
      case ($urandom_range(0, 3))
        0: row_parity[$urandom_range(0, 511)] = 1'b1;
        1: for (int w = 0; w < 16; w++) row_parity[w*32 +: 32] = $urandom;
        default: ;
      endcase
      @(posedge clk);
      if (pkt_start) begin
        exp_err = 1'b0;
        for (int r = 0; r < 512; r++) if (row_parity[r]) exp_err = 1'b1;
        if (exp_err) n_set++; else n_clr++;
      end
    end
    checks++;
    if (n_set == 0 || n_clr == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
