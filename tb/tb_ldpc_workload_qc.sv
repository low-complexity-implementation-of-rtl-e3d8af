// tb_ldpc_workload_qc: the decoder on a 1200-bit quasi-cyclic code with 10
// iterations over a BPSK/AWGN channel at Eb/N0 = 2, 3 and 4 dB, the code
// length and iteration count of the decoder's BER evaluation.
//
// Code: the 6 x 12 example matrix lifted by Z = 100, every one replaced by a
// 100 x 100 cyclically shifted identity (shift (17*r + 29*c*c + 3) mod Z for
// base row r, base column c) and every zero by a zero block. This gives a
// quasi-cyclic 600 x 1200 matrix with row weight 4 and column weight 2.
// The decoder is built with Z check-node and Z variable-node units, so a
// partition is one block row or block column and an iteration takes
// 6 + 12 cycles. The all-zero codeword is sent (the MMS update treats both
// signs alike, so it stands for any codeword). A reference model written
// here gives the expected decisions, compared bit for bit; the latency is
// checked per frame, and the bit error rate before and after decoding is
// printed per noise level (code rate taken as 1/2 for Eb/N0).
module tb_ldpc_workload_qc;
  import mms_pkg::*;

  localparam int Z = 100, BM = 6, BN = 12;
  localparam int M = BM * Z, N = BN * Z, DC = 4, DV = 2, E = M * DC;
  localparam int MI = 10, NGC = 6, NGV = 12;
  localparam int W = 6, WL = 2, T = 6;
  localparam int FRAMES_PER_POINT = 20;

  typedef logic [0:M-1][0:N-1] h_t;

  function automatic h_t lift();
    h_t h = '0;
    for (int br = 0; br < BM; br++)
      for (int bc = 0; bc < BN; bc++)
        if (H_EXAMPLE[br][bc]) begin
          int s = (17 * br + 29 * bc * bc + 3) % Z;
          for (int i = 0; i < Z; i++) h[br * Z + i][bc * Z + (i + s) % Z] = 1'b1;
        end
    return h;
  endfunction

  localparam h_t H_QC = lift();

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, done;
  logic signed [7:0] y = '0;
  logic [7:0] scale = '0;
  logic [N-1:0] dec_bits;
  logic [3:0] iter;

  always #5 clk = ~clk;

  ldpc_pp_decoder #(.M(M), .N(N), .H(H_QC), .DC(DC), .DV(DV), .P_C(Z), .P_V(Z),
                    .MAX_ITER(MI)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

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

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  // edge lists of H_QC, built the same way for the reference only
  int edge_col [E];
  int row_e [M][DC];
  int col_e [N][DV];
  int n_flip = 0, n_strong = 0, n_weak = 0;

  function automatic void build_edges();
    int e = 0;
    int cf [N];
    for (int c = 0; c < N; c++) cf[c] = 0;
    for (int r = 0; r < M; r++) begin
      int k = 0;
      for (int c = 0; c < N; c++) if (H_QC[r][c]) begin
        edge_col[e] = c;
        row_e[r][k] = e; k++;
        col_e[c][cf[c]] = e; cf[c]++;
        e++;
      end
    end
  endfunction

  function automatic logic [N-1:0] ref_decode(int llr [N]);
    msg_t msg [E];
    logic [N-1:0] d;
    for (int e = 0; e < E; e++) msg[e] = gval(llr[edge_col[e]]);
    for (int it = 0; it < MI; it++) begin
      for (int r = 0; r < M; r++) begin
        msg_t o [DC];
        for (int k = 0; k < DC; k++) begin
          bit s = 0, mg = 1;
          for (int l = 0; l < DC; l++) if (l != k) begin
            s ^= msg[row_e[r][l]][1];
            mg &= msg[row_e[r][l]][0];
          end
          o[k] = {s, mg};
          if (s != msg[row_e[r][k]][1]) n_flip++;
        end
        for (int k = 0; k < DC; k++) msg[row_e[r][k]] = o[k];
      end
      for (int c = 0; c < N; c++) begin
        int tot = llr[c];
        for (int j = 0; j < DV; j++) tot += fval(msg[col_e[c][j]]);
        for (int j = 0; j < DV; j++) begin
          msg_t v = gval(tot - fval(msg[col_e[c][j]]));
          msg[col_e[c][j]] = v;
          if (v[0]) n_strong++; else n_weak++;
        end
        d[c] = (tot < 0);
      end
    end
    return d;
  endfunction

  int cycle = 0, last_acc = 0, done_cycle = 0;
  always @(posedge clk) begin
    cycle++;
    if (in_valid && in_ready) last_acc = cycle;
    if (done) done_cycle = cycle;
  end

  initial begin
    real ebno_db [3] = '{2.0, 3.0, 4.0};
    int n_corrected_bits = 0;
    build_edges();
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (ebno_db[p]) begin
      automatic real sigma = $sqrt(1.0 / (2.0 * 0.5 * (10.0 ** (ebno_db[p] / 10.0))));
      automatic int si = int'(2.0 / (sigma * sigma) * 16.0 + 0.5);
      automatic int err_in = 0, err_out = 0;
      for (int f = 0; f < FRAMES_PER_POINT; f++) begin
        int llr [N];
        int ys [N];
        logic [N-1:0] expv;
        for (int c = 0; c < N; c++) begin
          automatic real x = 1.0 + sigma * gauss();
          automatic int q = int'($floor(x * 32.0 + 0.5));
          if (q > 127) q = 127;
          if (q < -128) q = -128;
          ys[c] = q;
          llr[c] = quant(q, si);
          if (q < 0) err_in++;
        end
        expv = ref_decode(llr);
        scale = 8'(si);
        for (int c = 0; c < N; c++) begin
          @(negedge clk);
          in_valid = 1; y = 8'(ys[c]);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
        end
        @(negedge clk);
        in_valid = 0;
        while (!done) @(negedge clk);
        @(posedge clk);
        #1;
        chk(done_cycle - last_acc == 2 + NGV + MI * (NGC + NGV),
            $sformatf("latency %0d", done_cycle - last_acc));
        chk(dec_bits === expv, $sformatf("Eb/N0 %0.1f frame %0d decisions differ from reference", ebno_db[p], f));
        err_out += $countones(dec_bits);
      end
      $display("Eb/N0 = %0.1f dB: channel BER = %0.2e, decoded BER = %0.2e (%0d frames of %0d bits)",
               ebno_db[p], real'(err_in) / real'(N * FRAMES_PER_POINT),
               real'(err_out) / real'(N * FRAMES_PER_POINT), FRAMES_PER_POINT, N);
      n_corrected_bits += err_in - err_out;
    end
    chk(n_corrected_bits > 0, "decoder corrected no channel errors");
    chk(n_flip > 0 && n_strong > 0 && n_weak > 0, "message classes not all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * FRAMES_PER_POINT * (N + 400) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
