// tb_ebn0_sweep: packet and bit error rate of the full-size decoder over Eb/N0.
//
// Streams packets back to back through ldpc_decoder at its default size, several signal-to-noise
// points, BPSK over an additive Gaussian channel with code rate 1/2 (noise sigma^2 = 1/Eb/N0),
// quantised to 4-bit sign-magnitude at 2.5 steps per unit amplitude. The all-zero codeword is
// sent: the decoder treats both signs alike, so its error rates do not depend on the codeword.
// For each point the test prints channel and decoded bit errors, the packet error rate seen on
// the decoded bits, the rate flagged by pkt_error, and the switching activity of the latched
// message bits while the packet is decoded (toggles per bit per iteration). Checks: one packet
// (1024 bits on 16 outputs) leaves every 64 cycles; decoding lowers the bit error count at every
// point of 2 dB and above; the decoded error count does not rise from the lowest to the highest
// point; a flagged-clean packet at the highest point decodes without errors; and the switching
// activity is lower at the highest point than at the lowest.
module tb_ebn0_sweep;
  import ldpc_pkg::*;

  localparam int NPT  = 5;
  localparam int PPP  = 16;                  // packets per point
  localparam int NPKT = NPT * PPP;
  localparam real EBN0_DB [NPT] = '{1.0, 1.5, 2.0, 2.5, 3.0};

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  msg_t rx_in [W];
  logic [W-1:0] dec_out;
  logic pkt_start;
  logic [$clog2(D)-1:0] slot;
  logic pkt_error;

  ldpc_decoder dut (.clk, .rst_n, .rx_in, .dec_out, .pkt_start, .slot, .pkt_error);

  always #5 clk = ~clk;

  int   rx      [NPKT][N];
  int   ch_err  [NPKT];
  int   dec_err [NPKT];
  int   nbits   [NPKT];
  logic flag    [NPKT];
  int   starts_seen = 0, last_start = -1, cyc = 0;
  int   cur_frame = -1, cur_slot = 0;
  int   act [NPKT];                          // message-bit toggles while the packet is decoded

  // Switching activity of the latched variable-to-check messages, the wires that dominate the
  // dynamic power. A clock edge that ends slot s >= 1 of frame F is an iteration of packet F-1;
  // the edge ending slot 0 loads the next packet and is not counted.
  for (genvar g = 0; g < W; g++) begin : g_mon
    msg_t prev [D][TMAX];
    always @(posedge clk) begin
      #1;
      if (cur_slot >= 1 && cur_frame >= 1 && cur_frame <= NPKT) begin
        automatic int n = 0;
        for (int k = 0; k < D; k++)
          for (int i = 0; i < TMAX; i++)
            n += $countones(prev[k][i] ^ dut.g_vgrp[g].u_vgrp.v2c[k][i]);
        act[cur_frame - 1] += n;
      end
      for (int k = 0; k < D; k++)
        for (int i = 0; i < TMAX; i++) prev[k][i] = dut.g_vgrp[g].u_vgrp.v2c[k][i];
    end
  end

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 65535)) / 65536.0;
    return s - 6.0;
  endfunction

  initial begin
    repeat ((NPKT + 4) * D + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pf, pos, q;
    real sigma, y;
    for (int p = 0; p < NPKT; p++) begin
      sigma = $sqrt(1.0 / (10.0 ** (EBN0_DB[p / PPP] / 10.0)));
      ch_err[p] = 0; dec_err[p] = 0; nbits[p] = 0; act[p] = 0;
      for (int v = 0; v < N; v++) begin
        y = 1.0 + sigma * gauss();
        q = int'(y * 2.5);
        if (q > 7) q = 7;
        if (q < -7) q = -7;
        rx[p][v] = (q < 0) ? 8 - q : q;
        if (q < 0) ch_err[p]++;
      end
    end
    for (int g = 0; g < W; g++) rx_in[g] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int frame = 0; frame < NPKT + 3; frame++) begin
      for (int s = 0; s < D; s++) begin
        if (pkt_start) begin
          if (last_start >= 0) begin
            checks++;
            if (cyc - last_start != D) begin failures++; $display("FAIL packet period %0d", cyc - last_start); end
          end
          last_start = cyc;
          starts_seen++;
        end
        pf  = (s >= 2) ? frame - 2 : frame - 3;
        pos = (D + 1 - s) % D;
        if (pf >= 0 && pf < NPKT) begin
          for (int g = 0; g < W; g++) begin
            nbits[pf]++;
            if (dec_out[g] !== 1'b0) dec_err[pf]++;
          end
          if (s == 2) flag[pf] = pkt_error;
        end
        cur_frame = frame;
        cur_slot  = s;
        for (int g = 0; g < W; g++)
          rx_in[g] = (frame < NPKT) ? msg_t'(rx[frame][g + (D - 1 - s) * W]) : msg_t'(0);
        @(negedge clk);
        cyc++;
      end
    end

    begin
      int ce [NPT], de [NPT], pe [NPT], fe [NPT];
      real af [NPT];
      for (int i = 0; i < NPT; i++) begin ce[i] = 0; de[i] = 0; pe[i] = 0; fe[i] = 0; af[i] = 0.0; end
      for (int p = 0; p < NPKT; p++) begin
        checks++;
        if (nbits[p] != N) begin failures++; $display("FAIL packet %0d delivered %0d bits", p, nbits[p]); end
        ce[p / PPP] += ch_err[p];
        de[p / PPP] += dec_err[p];
        if (dec_err[p] != 0) pe[p / PPP]++;
        if (flag[p]) fe[p / PPP]++;
        // 3328 edges x 4 bits, 63 iterations per packet
        af[p / PPP] += 100.0 * real'(act[p]) / (3328.0 * 4.0 * real'(D - 1)) / real'(PPP);
        if (p / PPP == NPT - 1 && !flag[p]) begin
          checks++;
          if (dec_err[p] != 0) begin failures++; $display("FAIL packet %0d unflagged with %0d errors", p, dec_err[p]); end
        end
      end
      for (int i = 0; i < NPT; i++) begin
        $display("Eb/N0 %0.1f dB: %0d packets, channel bit errors %0d, decoded bit errors %0d, packet errors %0d, flagged %0d, message switching activity %0.2f%%",
                 EBN0_DB[i], PPP, ce[i], de[i], pe[i], fe[i], af[i]);
        if (EBN0_DB[i] >= 2.0) begin
          checks++;
          if (de[i] >= ce[i]) begin failures++; $display("FAIL no coding gain at %0.1f dB", EBN0_DB[i]); end
        end
      end
      checks++;
      if (de[NPT-1] > de[0]) begin failures++; $display("FAIL error count rises with Eb/N0"); end
      checks++;
      if (!(af[NPT-1] < af[0]) || af[NPT-1] == 0.0) begin
        failures++; $display("FAIL switching activity does not fall with Eb/N0");
      end
    end
    checks++;
    if (starts_seen < NPKT) begin failures++; $display("FAIL only %0d packet starts", starts_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
