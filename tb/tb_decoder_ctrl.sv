// tb_decoder_ctrl: self-checking test of the packet-framing counter at its default depth (64).
//
// After reset pkt_start must be high in the first cycle and then exactly once every 64 cycles,
// and slot must count 0..63 in step with an independent cycle counter kept here. A second reset
// in mid-frame must restart the frame.
module tb_decoder_ctrl;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pkt_start;
  logic [5:0] slot;
  int cyc, starts;

  decoder_ctrl dut (.clk, .rst_n, .pkt_start, .slot);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    for (int c = 0; c < n; c++) begin
      checks++;
      if (int'(slot) != cyc % 64 || pkt_start !== (cyc % 64 == 0)) begin
        failures++; $display("FAIL cyc %0d slot %0d start %b", cyc, slot, pkt_start);
      end
      if (pkt_start) starts++;
      @(negedge clk);
      cyc++;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cyc = 0; starts = 0;
    run(64 * 5);
    checks++;
    if (starts != 5) begin failures++; $display("FAIL %0d packet starts in 320 cycles", starts); end
    run(23);
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    cyc = 0;
    run(130);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
