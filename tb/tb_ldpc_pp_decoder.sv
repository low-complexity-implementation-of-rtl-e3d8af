// tb_ldpc_pp_decoder: end-to-end test of the partially parallel MMS decoder
// at its default parameters (6 x 12 example code, 2 check-node units,
// 4 variable-node units, 10 iterations).
//
// The testbench finds all codewords of H by exhaustive search, sends random
// codewords over a BPSK/AWGN channel (bit 0 -> +1, bit 1 -> -1, Gaussian
// noise from a sum of 12 uniform numbers) at several noise levels, and feeds
// the 8-bit samples with 2/sigma^2 to the decoder, with random gaps in the
// sample stream. A reference model written here (real-valued LLR, rounding
// and clipping; then flooding MMS on per-edge arrays) gives the expected
// decisions, which are compared bit for bit. It also checks the latency of
// every codeword and counts, per mechanism, how often it happened:
// channel-bit errors corrected, LLR saturation, strong and weak messages,
// check-node sign flips, iterations, and busy input (refused samples).
module tb_ldpc_pp_decoder;
  import mms_pkg::*;

  localparam int M = 6, N = 12, MI = 10, NGC = 3, NGV = 3;
  localparam int W = 6, WL = 2, T = 6;
  localparam int FRAMES = 300;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, done;
  logic signed [7:0] y = '0;
  logic [7:0] scale = '0;
  logic [N-1:0] dec_bits;
  logic [3:0] iter;

  always #5 clk = ~clk;

  ldpc_pp_decoder dut (.*);

  // ---------------- mechanism counters ----------------
  int n_corrected = 0, n_channel_err = 0, n_clip = 0, n_strong = 0, n_weak = 0;
  int n_flip = 0, n_refused = 0, n_iters = 0, n_frames_ok = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- reference model ----------------
  function automatic int fval(msg_t m);
    case (m)
      2'b01: return W;
      2'b00: return WL;
      2'b10: return -WL;
      default: return -W;
    endcase
  endfunction

  function automatic msg_t gval(int v);
    if (v > T) return 2'b01;
    if (v >= 0) return 2'b00;
    if (v >= -T) return 2'b10;
    return 2'b11;
  endfunction

  function automatic int quant(int yi, int si);
    real v = (real'(yi) / 32.0) * (real'(si) / 16.0) / 0.5;
    int r = int'($floor(v + 0.5));
    if (r > 31) r = 31;
    if (r < -31) r = -31;
    return r;
  endfunction

  function automatic logic [N-1:0] ref_decode(int llr [N]);
    msg_t v2c [M][N], c2v [M][N];
    logic [N-1:0] d;
    for (int r = 0; r < M; r++)
      for (int c = 0; c < N; c++) if (H_EXAMPLE[r][c]) v2c[r][c] = gval(llr[c]);
    for (int it = 0; it < MI; it++) begin
      for (int r = 0; r < M; r++) begin
        for (int c = 0; c < N; c++) if (H_EXAMPLE[r][c]) begin
          bit s = 0, mg = 1;
          for (int c2 = 0; c2 < N; c2++) if (H_EXAMPLE[r][c2] && c2 != c) begin
            s ^= v2c[r][c2][1];
            mg &= v2c[r][c2][0];
          end
          c2v[r][c] = {s, mg};
          if (s != v2c[r][c][1]) n_flip++;
        end
      end
      for (int c = 0; c < N; c++) begin
        int tot = llr[c];
        for (int r = 0; r < M; r++) if (H_EXAMPLE[r][c]) tot += fval(c2v[r][c]);
        for (int r = 0; r < M; r++) if (H_EXAMPLE[r][c]) begin
          v2c[r][c] = gval(tot - fval(c2v[r][c]));
          if (v2c[r][c][0]) n_strong++; else n_weak++;
        end
        d[c] = (tot < 0);
      end
      n_iters++;
    end
    return d;
  endfunction

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  // ---------------- stimulus ----------------
  logic [N-1:0] codewords [$];
  int cycle = 0, last_acc = 0, done_cycle = 0;
  always @(posedge clk) begin
    cycle++;
    if (in_valid && in_ready) last_acc = cycle;
    if (in_valid && !in_ready) n_refused++;
    if (done) done_cycle = cycle;
  end

  initial begin
    real sigmas [4] = '{0.45, 0.6, 0.75, 0.9};
    for (int w = 0; w < (1 << N); w++) begin
      automatic logic [N-1:0] cw = N'(w);
      automatic bit ok = 1;
      for (int r = 0; r < M; r++) begin
        automatic bit p = 0;
        for (int c = 0; c < N; c++) if (H_EXAMPLE[r][c]) p ^= cw[c];
        if (p) ok = 0;
      end
      if (ok) codewords.push_back(cw);
    end
    chk(codewords.size() == 128, $sformatf("codeword count %0d", codewords.size()));

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      logic [N-1:0] cw, hard_ch, expv;
      int llr [N];
      int ys [N];
      real sigma;
      int si;
      cw = codewords[$urandom_range(codewords.size() - 1)];
      sigma = sigmas[f % 4];
      si = int'(2.0 / (sigma * sigma) * 16.0 + 0.5);
      if (si > 255) si = 255;
      hard_ch = '0;
      for (int c = 0; c < N; c++) begin
        automatic real x = (cw[c] ? -1.0 : 1.0) + sigma * gauss();
        automatic int q = int'($floor(x * 32.0 + 0.5));
        if (q > 127) q = 127;
        if (q < -128) q = -128;
        ys[c] = q;
        llr[c] = quant(q, si);
        if (llr[c] == 31 || llr[c] == -31) n_clip++;
        hard_ch[c] = (q < 0);
      end
      expv = ref_decode(llr);
      // send the samples, with random gaps; keep offering one extra sample
      // after the last to see that the busy decoder refuses it
      scale = 8'(si);
      for (int c = 0; c < N; c++) begin
        while ($urandom_range(3) == 0) begin
          @(negedge clk); in_valid = 0;
        end
        @(negedge clk);
        in_valid = 1; y = 8'(ys[c]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
      @(negedge clk);
      in_valid = (f % 2 == 0);
      y = '0;
      while (!done) @(negedge clk);
      in_valid = 0;
      @(posedge clk);
      #1;
      chk(done_cycle - last_acc == 2 + NGV + MI * (NGC + NGV),
          $sformatf("frame %0d latency %0d", f, done_cycle - last_acc));
      chk(dec_bits === expv, $sformatf("frame %0d decisions %b exp %b", f, dec_bits, expv));
      chk(int'(iter) == MI, "iterations");
      if (hard_ch != cw) begin
        n_channel_err++;
        if (dec_bits == cw) n_corrected++;
      end
      if (dec_bits == cw) n_frames_ok++;
    end
    $display("frames=%0d decoded_ok=%0d channel_err_frames=%0d corrected=%0d clip=%0d strong=%0d weak=%0d flips=%0d refused=%0d iters=%0d",
             FRAMES, n_frames_ok, n_channel_err, n_corrected, n_clip, n_strong, n_weak, n_flip, n_refused, n_iters);
    chk(n_corrected > 0, "no channel error was corrected");
    chk(n_clip > 0, "LLR saturation never happened");
    chk(n_strong > 0 && n_weak > 0, "strong/weak messages not both seen");
    chk(n_flip > 0, "check-node sign flip never happened");
    chk(n_refused > 0, "busy input never exercised");
    chk(n_iters == FRAMES * MI, "iteration count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * 120 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
