// tb_vq_top: end-to-end codebook searches through the full processor at its
// default size (16 IPPs, 12-bit components, 25-bit sums, 24-bit distortions,
// 16-bit index). The codebook holds N random 12-bit codevectors y_j, stored
// as z_j = -2 y_j with r_j = |y_j|^2, so that the processor ranks codevectors
// by squared Euclidean distance. Several input vectors are searched back to
// back, one per N clocks. Codevector components and input components are
// presented with the per-IPP skew of B clocks the array expects.
//
// Reference: for each search, the distortion sum_i x_i z_(j,i) + r_j is
// computed with integers, reduced to the upper 24 of its 25 bits as the
// processor does, and the first index of the smallest value is taken. The
// index must appear exactly LAT clocks after the next search starts, with
// index_valid_o high in that clock only. The test also counts, from the
// processor's internals, how often each mechanism occurred: search starts
// that reset the MDR and clear the counter, new minima saved in the TIR,
// tied distortions that leave the earlier index, and IR transfers. Each must
// happen at least once. Some searches use an input vector equal to a
// codevector (distance 0), some a codebook with duplicated entries (ties).
module tb_vq_top;
  import vq_pkg::*;
  localparam int K = VQ_K, B = VQ_B, CW = VQ_CW, DW = VQ_DW, IW = VQ_IW;
  localparam int N = 64;           // codebook size of this test
  localparam int Q = 8;            // searches checked
  localparam int LAT = K*B + (CW-DW) + 2*DW - 1 + IW;
  localparam int S0 = 2;           // clock of the first search start
  localparam int TEND = S0 + (Q+1)*N + LAT + 4;
  localparam int YMAX = 500;       // component range keeps every sum within 24 bits
  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          sync_i;
  logic [CW-1:0] r_i;
  logic [B-1:0]  x_i [K];
  logic [B-1:0]  y_i [K];
  logic [IW-1:0] index_o;
  logic          index_valid_o;

  vq_top dut (.clk, .rst_n, .sync_i, .r_i, .x_i, .y_i, .index_o, .index_valid_o);

  int y  [N][K];
  int zc [N][K];
  longint rc [N];
  int xv [Q+1][K];
  int expidx [Q];
  int n_sync = 0, n_newmin = 0, n_tie = 0, n_ir = 0, n_results = 0;

  initial begin
    repeat (TEND + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, read from the CP internals
  always @(posedge clk) if (rst_n) begin
    if (dut.u_cp.u_cmp.r_i) n_sync++;
    if (dut.u_cp.u_cnt.l_i && !dut.u_cp.u_cnt.w_i) n_newmin++;
    if (n_ir > 0 && !dut.u_cp.u_cnt.w_i && !dut.u_cp.p && !dut.u_cp.q) n_tie++;
    if (dut.u_cp.u_cnt.w_i) n_ir++;
  end

  initial begin
    // codebook: codevectors 40..47 repeat 0..7, so those searches can tie
    for (int j = 0; j < N; j++) begin
      rc[j] = 0;
      for (int i = 0; i < K; i++) begin
        y[j][i] = (j >= 40 && j < 48) ? y[j-40][i] : int'($urandom_range(0, 2*YMAX)) - YMAX;
        zc[j][i] = -2 * y[j][i];
        rc[j] += longint'(y[j][i]) * longint'(y[j][i]);
      end
    end
    // input vectors: some random, some equal to a codevector
    for (int q = 0; q <= Q; q++) begin
      for (int i = 0; i < K; i++) begin
        if (q % 3 == 1) xv[q][i] = y[(q * 5) % 8][i];
        else            xv[q][i] = int'($urandom_range(0, 2*YMAX)) - YMAX;
      end
    end
    // reference search
    for (int q = 0; q < Q; q++) begin
      longint best, dsum;
      int bi;
      best = 0; bi = 0;
      for (int j = 0; j < N; j++) begin
        logic [CW-1:0] d25;
        logic [DW-1:0] d24;
        dsum = rc[j];
        for (int i = 0; i < K; i++) dsum += longint'(xv[q][i]) * longint'(zc[j][i]);
        d25 = CW'(dsum);
        d24 = d25[CW-1 -: DW];
        if (j == 0 || longint'($signed(d24)) < best) begin best = longint'($signed(d24)); bi = j; end
      end
      expidx[q] = bi;
    end

    rst_n = 1'b0; sync_i = 1'b0; r_i = '0;
    for (int i = 0; i < K; i++) begin x_i[i] = '0; y_i[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < TEND; t++) begin
      int g, q, j;
      // IPP 0 inputs and sync
      g = t - S0;
      sync_i = (g >= 0) && (g % N == 0);
      r_i = (g >= 0) ? CW'(rc[g % N]) : '0;
      // IPP i sees the stream B*i clocks later
      for (int i = 0; i < K; i++) begin
        g = t - S0 - B*i;
        if (g >= 0) begin
          q = g / N; j = g % N;
          if (q > Q) q = Q;
          y_i[i] = B'(zc[j][i]);
          x_i[i] = B'(xv[q][i]);
        end else begin
          y_i[i] = '0;
          x_i[i] = '0;
        end
      end
      #1;
      // output of clock t: result of search q appears LAT clocks after search q+1 starts
      g = t - S0 - LAT;
      if (g >= 0) begin
        q = g / N - 1;
        checks++;
        if (index_valid_o !== (g % N == 0)) begin
          failures++;
          $display("FAIL index_valid_o=%0b at t=%0d", index_valid_o, t);
        end
        if (g % N == 0 && q >= 0 && q < Q) begin
          checks++; n_results++;
          if (index_o !== IW'(expidx[q])) begin
            failures++;
            $display("FAIL search %0d: index %0d expected %0d", q, index_o, expidx[q]);
          end
        end
      end
      @(negedge clk);
    end
    $display("searches checked %0d; search starts %0d, new minima %0d, ties %0d, IR transfers %0d",
             n_results, n_sync, n_newmin, n_tie, n_ir);
    if (n_results != Q) failures++;
    if (n_sync == 0)    begin failures++; $display("no search start seen"); end
    if (n_newmin == 0)  begin failures++; $display("no new minimum seen"); end
    if (n_tie == 0)     begin failures++; $display("no tie seen"); end
    if (n_ir == 0)      begin failures++; $display("no IR transfer seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
