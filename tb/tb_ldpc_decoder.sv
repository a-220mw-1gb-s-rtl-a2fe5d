// tb_ldpc_decoder: end-to-end test of the full-size decoder (1024 bits, 16 x 64 scan chains,
// 512 check nodes, 64 iterations per packet), with every parameter at its default.
//
// The test builds the parity-check matrix from the same edge definition the hardware uses,
// reduces it to row-echelon form to draw random codewords, and streams a sequence of packets
// back to back through the three-packet pipeline:
//   strong all-zero codeword, noiseless random codewords, random codewords with channel noise
//   at several signal-to-noise ratios (BPSK over a Gaussian channel, 4-bit sign-magnitude
//   quantisation), and random noise that is no codeword.
// A packet-level reference model written here (message passing on the edge list with
// integers) predicts every decoded bit and the packet error flag; the hardware must match it bit
// for bit, with the documented latency: packet f's samples enter in frame f, its bits leave in
// frame f+2. The test also checks that noiseless codewords decode to themselves, and counts the
// mechanisms of the design: packet starts, overlapping load/decode/unload, packets flagged and
// not flagged as in error, corrected bit errors, zero-sum ties resolved by the received sign,
// messages saturated in the check nodes, and the message switching activity per packet.
module tb_ldpc_decoder;
  import ldpc_pkg::*;

  localparam int NPKT = 10;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  msg_t rx_in [W];
  logic [W-1:0] dec_out;
  logic pkt_start;
  logic [$clog2(D)-1:0] slot;
  logic pkt_error;

  ldpc_decoder dut (.clk, .rst_n, .rx_in, .dec_out, .pkt_start, .slot, .pkt_error);

  always #5 clk = ~clk;

  // ---------------- code ----------------
  int e_col [M][KMAX];
  int e_idx [M][KMAX];
  logic [N-1:0] hrow [M];

  // ---------------- packets ----------------
  int   pkt_rx   [NPKT][N];    // received sign-magnitude values
  logic pkt_cw   [NPKT][N];    // transmitted codeword
  logic exp_bit  [NPKT][N];    // model decisions
  logic exp_err  [NPKT];
  int   pkt_kind [NPKT];       // 0 strong zero, 1 noiseless codeword, 2 noisy codeword, 3 noise

  // mechanism counters
  int n_start = 0, n_overlap = 0, n_err_flag = 0, n_ok_flag = 0;
  int n_tie = 0, n_cn_zero = 0, n_corrected = 0;
  int n_cw_ok = 0;

  function automatic int llr(input int sm);
    return ((sm & 8) != 0) ? -(sm & 7) : (sm & 7);
  endfunction

  function automatic int to_sm(input int x, input int rxsm);
    int mag = (x < 0) ? -x : x;
    int sgn = (x < 0) ? 1 : (x > 0) ? 0 : ((rxsm >> 3) & 1);
    if (mag > 7) mag = 7;
    return sgn * 8 + mag;
  endfunction

  // approximately standard normal sample
  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 65535)) / 65536.0;
    return s - 6.0;
  endfunction

  // ---------------- codeword generator (row-echelon form of H) ----------------
  logic [N-1:0] rref [M];
  int piv [M];
  int rank;

  task automatic build_code();
    logic [N-1:0] t;
    int r;
    for (int c = 0; c < M; c++) begin
      hrow[c] = '0;
      for (int s = 0; s < row_weight(c); s++) begin
        e_col[c][s] = edge_col(c, s);
        e_idx[c][s] = edge_idx(c, s);
        hrow[c][e_col[c][s]] = 1'b1;
      end
      rref[c] = hrow[c];
    end
    rank = 0;
    for (int col = 0; col < N && rank < M; col++) begin
      r = -1;
      for (int i = rank; i < M; i++) if (rref[i][col]) begin r = i; break; end
      if (r < 0) continue;
      t = rref[r]; rref[r] = rref[rank]; rref[rank] = t;
      for (int i = 0; i < M; i++) if (i != rank && rref[i][col]) rref[i] ^= rref[rank];
      piv[rank] = col;
      rank++;
    end
  endtask

  task automatic random_codeword(output logic cw [N]);
    logic [N-1:0] x, ispiv;
    ispiv = '0;
    for (int r = 0; r < rank; r++) ispiv[piv[r]] = 1'b1;
    for (int v = 0; v < N; v++) x[v] = ispiv[v] ? 1'b0 : 1'($urandom_range(0, 1));
    for (int r = 0; r < rank; r++) x[piv[r]] = ^(rref[r] & x);
    for (int v = 0; v < N; v++) cw[v] = x[v];
  endtask

  function automatic bit is_codeword(input logic cw [N]);
    logic [N-1:0] x;
    for (int v = 0; v < N; v++) x[v] = cw[v];
    for (int c = 0; c < M; c++) if (^(hrow[c] & x)) return 1'b0;
    return 1'b1;
  endfunction

  // ---------------- reference decoder ----------------
  int v2c [N][TMAX];
  int c2v [N][TMAX];
  int act_bits [NPKT];

  function automatic int ref_cn_mag(input int s);
    int lg = 0;
    if (s >= 256) return 0;
    if (s == 0) return 7;
    while ((s >> (lg + 1)) != 0) lg++;
    return 7 - lg;
  endfunction

  // check-node pass; returns 1 if any row parity fails
  function automatic bit model_checks();
    bit any = 1'b0;
    for (int c = 0; c < M; c++) begin
      int k = row_weight(c);
      bit par = 1'b0;
      for (int s = 0; s < k; s++) par ^= v2c[e_col[c][s]][e_idx[c][s]][3];
      any |= par;
      for (int s = 0; s < k; s++) begin
        int sum = 0, m;
        for (int j = 0; j < k; j++)
          if (j != s) sum += 1 << (7 - (v2c[e_col[c][j]][e_idx[c][j]] & 7));
        m = ref_cn_mag(sum);
        if (m == 0) n_cn_zero++;
        c2v[e_col[c][s]][e_idx[c][s]] =
          ((par ^ v2c[e_col[c][s]][e_idx[c][s]][3]) ? 8 : 0) + m;
      end
    end
    return any;
  endfunction

  task automatic model_packet(input int p);
    bit any;
    int t, sum, nv, changed;
    for (int v = 0; v < N; v++) for (int i = 0; i < TMAX; i++) v2c[v][i] = pkt_rx[p][v];
    changed = 0;
    for (int it = 0; it < D - 1; it++) begin
      void'(model_checks());
      for (int v = 0; v < N; v++) begin
        t = col_weight(v / W);
        sum = llr(pkt_rx[p][v]);
        for (int i = 0; i < t; i++) sum += llr(c2v[v][i]);
        for (int i = 0; i < t; i++) begin
          nv = to_sm(sum - llr(c2v[v][i]), pkt_rx[p][v]);
          changed += $countones(4'(nv ^ v2c[v][i]));
          v2c[v][i] = nv;
        end
      end
    end
    act_bits[p] = changed;
    any = model_checks();
    exp_err[p] = any;
    for (int v = 0; v < N; v++) begin
      t = col_weight(v / W);
      sum = llr(pkt_rx[p][v]);
      for (int i = 0; i < t; i++) sum += llr(c2v[v][i]);
      if (sum == 0) n_tie++;
      exp_bit[p][v] = (sum < 0) ? 1'b1 : (sum > 0) ? 1'b0 : pkt_rx[p][v][3];
    end
  endtask

  task automatic make_packet(input int p, input int kind, input real sigma);
    logic cw [N];
    pkt_kind[p] = kind;
    if (kind == 0) for (int v = 0; v < N; v++) cw[v] = 1'b0;
    else random_codeword(cw);
    pkt_cw[p] = cw;
    for (int v = 0; v < N; v++) begin
      if (kind == 0 || kind == 1) pkt_rx[p][v] = cw[v] ? 8 + 5 : 5;
      else if (kind == 3) pkt_rx[p][v] = $urandom_range(0, 15);
      else begin
        real y = (cw[v] ? -1.0 : 1.0) + sigma * gauss();
        int q = int'(y * 2.5);                 // LLR scale: 2.5 steps per unit amplitude
        if (q > 7) q = 7;
        if (q < -7) q = -7;
        pkt_rx[p][v] = (q < 0) ? 8 - q : q;
      end
    end
  endtask

  // ---------------- stimulus and checking ----------------
  initial begin
    repeat ((NPKT + 4) * D + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int frame, pf, pos, v, errs, rawerr;
    build_code();
    checks++;
    if (rank != M) $display("note: H has rank %0d", rank);
    make_packet(0, 0, 0.0);
    make_packet(1, 1, 0.0);
    make_packet(2, 2, 0.55);
    make_packet(3, 3, 0.0);
    make_packet(4, 2, 0.70);
    make_packet(5, 2, 0.80);
    make_packet(6, 1, 0.0);
    make_packet(7, 2, 0.90);
    make_packet(8, 3, 0.0);
    make_packet(9, 2, 0.60);
    for (int p = 0; p < NPKT; p++) begin
      checks++;
      if (pkt_kind[p] != 3 && !is_codeword(pkt_cw[p])) begin
        failures++; $display("FAIL packet %0d: generated word is not a codeword", p);
      end
      model_packet(p);
    end

    for (int g = 0; g < W; g++) rx_in[g] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (frame = 0; frame < NPKT + 3; frame++) begin
      for (int s = 0; s < D; s++) begin
        // outputs produced by the previous edge
        if (s == 0) begin
          checks++;
          if (pkt_start !== 1'b1) begin failures++; $display("FAIL no pkt_start at frame %0d", frame); end
          n_start++;
          if (frame >= 2 && frame < NPKT) n_overlap++;  // one packet loading, one decoding, one leaving
        end else begin
          checks++;
          if (pkt_start !== 1'b0 || int'(slot) != s) begin
            failures++; $display("FAIL framing frame %0d slot %0d", frame, slot);
          end
        end
        pf  = (s >= 2) ? frame - 2 : frame - 3;
        pos = (D + 1 - s) % D;
        if (pf >= 0 && pf < NPKT) begin
          for (int g = 0; g < W; g++) begin
            v = g + pos * W;
            checks++;
            if (dec_out[g] !== exp_bit[pf][v]) begin
              failures++;
              if (failures < 20) $display("FAIL packet %0d bit %0d got %b exp %b", pf, v, dec_out[g], exp_bit[pf][v]);
            end
          end
          if (s == 2) begin
            checks++;
            if (pkt_error !== exp_err[pf]) begin
              failures++; $display("FAIL packet %0d pkt_error got %b exp %b", pf, pkt_error, exp_err[pf]);
            end
            if (pkt_error) n_err_flag++; else n_ok_flag++;
          end
        end
        // inputs for this cycle: samples of packet 'frame'
        for (int g = 0; g < W; g++)
          rx_in[g] = (frame < NPKT) ? msg_t'(pkt_rx[frame][g + (D - 1 - s) * W]) : msg_t'(0);
        @(negedge clk);
      end
    end

    // packet-level results of the model (the hardware matched it bit for bit above)
    for (int p = 0; p < NPKT; p++) begin
      errs = 0; rawerr = 0;
      for (int vv = 0; vv < N; vv++) begin
        if (exp_bit[p][vv] != pkt_cw[p][vv]) errs++;
        if (((pkt_rx[p][vv] >> 3) & 1) != int'(pkt_cw[p][vv])) rawerr++;
      end
      if (pkt_kind[p] == 2) n_corrected += rawerr - errs;
      if (pkt_kind[p] <= 1) begin
        checks++;
        if (errs != 0 || exp_err[p]) begin failures++; $display("FAIL noiseless packet %0d not decoded", p); end
        else n_cw_ok++;
      end
      $display("packet %0d kind %0d: channel bit errors %0d, decoded bit errors %0d, pkt_error %b, message switching activity %0.2f%%",
               p, pkt_kind[p], rawerr, errs, exp_err[p],
               100.0 * real'(act_bits[p]) / (real'(D - 1) * 3328.0 * 4.0));
    end

    $display("mechanisms: packet starts %0d, overlapped frames %0d, flagged %0d, clean %0d, corrected bits %0d, zero-sum ties %0d, zero check magnitudes %0d, noiseless codewords recovered %0d",
             n_start, n_overlap, n_err_flag, n_ok_flag, n_corrected, n_tie, n_cn_zero, n_cw_ok);
    checks++;
    if (n_start == 0 || n_overlap == 0 || n_err_flag == 0 || n_ok_flag == 0 || n_corrected == 0 ||
        n_tie == 0 || n_cn_zero == 0 || n_cw_ok == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
