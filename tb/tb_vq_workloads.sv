// tb_vq_workloads: runs the distortion measures the processor is meant for
// back to back through the full default-size array (16 IPPs), each search with
// its own codebook size, which the processor learns only from the spacing of
// the sync pulses:
//   search 0: weighted squared error, k = 16, N = 65536 (the largest codebook
//             a 16-bit index can address); z_(j,i) = -2 w_i y_(j,i),
//             r_j = sum_i w_i y_(j,i)^2
//   search 1: plain squared error, k = 8 (components 8..15 held at zero),
//             N = 1024
//   search 2: Itakura-Saito inner product for LPC order p = 10 (k = 11),
//             N = 256: alpha_j = Raa_j(0) Rxx(0) + 2 sum_{i=1}^{p} Raa_j(i) Rxx(i),
//             stored as z_(j,0) = Raa_j(0), z_(j,i) = 2 Raa_j(i), r_j = 0
//   search 3: a short closing search whose start releases the result of search 2
// Autocorrelations are taken of short random signals and scaled to fit 12
// bits. For each search an integer model finds the first index of the
// smallest distortion (upper 24 of 25 bits, as the processor compares). The
// index must appear LAT clocks after the next search starts.
module tb_vq_workloads;
  import vq_pkg::*;
  localparam int K = VQ_K, B = VQ_B, CW = VQ_CW, DW = VQ_DW, IW = VQ_IW;
  localparam int LAT = K*B + (CW-DW) + 2*DW - 1 + IW;
  localparam int NS = 4;
  localparam int NLEN [NS] = '{65536, 1024, 256, 16};
  localparam int S0 = 2;
  localparam int P = 10;
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

  int start [NS+1];
  int xin [NS][K];
  int raa [256][P+1];
  int expidx [NS];
  int tend;

  // deterministic pseudo-random component in [-lim, lim]
  function automatic int hval(int s, int j, int i, int lim);
    logic [31:0] h;
    h = 32'(s) * 32'h9E3779B1 ^ 32'(j) * 32'h85EBCA77 ^ 32'(i) * 32'hC2B2AE3D;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    return int'(h % 32'(2*lim + 1)) - lim;
  endfunction

  function automatic int weight(int i);
    return 1 + (i % 3);
  endfunction

  // codevector component of search s as stored (z) and its r_j
  function automatic int yraw(int s, int j, int i);
    if (s == 0) return (j == 40000) ? xin[0][i] : hval(0, j, i, 250);
    if (s == 1) return (i >= 8) ? 0 : ((j == 777) ? xin[1][i] + hval(7, 0, i, 3) : hval(1, j, i, 250));
    return 0;
  endfunction

  function automatic int zval(int s, int j, int i);
    case (s)
      0: return -2 * weight(i) * yraw(0, j, i);
      1: return -2 * yraw(1, j, i);
      2: return (i > P) ? 0 : ((i == 0) ? raa[j][0] : 2 * raa[j][i]);
      default: return 0;
    endcase
  endfunction

  function automatic longint rval(int s, int j);
    longint acc;
    acc = 0;
    if (s == 0) for (int i = 0; i < K; i++) acc += longint'(weight(i)) * yraw(0, j, i) * yraw(0, j, i);
    if (s == 1) for (int i = 0; i < K; i++) acc += longint'(yraw(1, j, i)) * yraw(1, j, i);
    return acc;
  endfunction

  // autocorrelation of a random 16-sample signal, scaled so that R(0) = r0
  task automatic autocorr(input int seed, input int r0, output int rr [P+1]);
    int sig [16];
    longint acc [P+1];
    for (int n = 0; n < 16; n++) sig[n] = hval(seed, n, 99, 100);
    for (int i = 0; i <= P; i++) begin
      acc[i] = 0;
      for (int n = 0; n + i < 16; n++) acc[i] += longint'(sig[n]) * sig[n+i];
    end
    for (int i = 0; i <= P; i++) rr[i] = int'((acc[i] * r0) / (acc[0] == 0 ? 1 : acc[0]));
  endtask

  initial begin
    repeat (S0 + 65536 + 1024 + 256 + 16 + LAT + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rx [P+1];
    int ra [P+1];
    start[0] = S0;
    for (int s = 0; s < NS; s++) start[s+1] = start[s] + NLEN[s];
    tend = start[NS] + LAT + 4;
    // input vectors
    for (int i = 0; i < K; i++) begin
      xin[0][i] = hval(100, 0, i, 250);
      xin[1][i] = (i >= 8) ? 0 : hval(101, 0, i, 250);
      xin[3][i] = 0;
    end
    autocorr(5000, 1000, rx);
    for (int i = 0; i < K; i++) xin[2][i] = (i <= P) ? rx[i] : 0;
    for (int j = 0; j < 256; j++) begin
      autocorr(j, 500, ra);
      for (int i = 0; i <= P; i++) raa[j][i] = ra[i];
    end
    // reference searches
    for (int s = 0; s < NS - 1; s++) begin
      longint best, dsum;
      int bi;
      best = 0; bi = 0;
      for (int j = 0; j < NLEN[s]; j++) begin
        logic [CW-1:0] d25;
        logic [DW-1:0] d24;
        dsum = rval(s, j);
        for (int i = 0; i < K; i++) dsum += longint'(xin[s][i]) * zval(s, j, i);
        if (dsum >= (longint'(1) << (DW)) || dsum < -(longint'(1) << (DW))) begin
          failures++;
          $display("test data out of range: search %0d codevector %0d", s, j);
        end
        d25 = CW'(dsum);
        d24 = d25[CW-1 -: DW];
        if (j == 0 || longint'($signed(d24)) < best) begin best = longint'($signed(d24)); bi = j; end
      end
      expidx[s] = bi;
      $display("search %0d: N=%0d expected index %0d", s, NLEN[s], bi);
    end

    rst_n = 1'b0; sync_i = 1'b0; r_i = '0;
    for (int i = 0; i < K; i++) begin x_i[i] = '0; y_i[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < tend; t++) begin
      int s, j;
      logic ready;
      // IPP i sees the stream B*i clocks after IPP 0
      sync_i = 1'b0; r_i = '0;
      for (int i = 0; i < K; i++) begin
        int g;
        g = t - B*i;
        y_i[i] = '0; x_i[i] = '0;
        for (int q = 0; q < NS; q++) begin
          if (g >= start[q] && g < start[q+1]) begin
            j = g - start[q];
            y_i[i] = B'(zval(q, j, i));
            x_i[i] = B'(xin[q][i]);
            if (i == 0) begin
              sync_i = (j == 0);
              r_i = CW'(rval(q, j));
            end
          end
        end
        if (g >= start[NS]) x_i[i] = B'(xin[NS-1][i]);
      end
      #1;
      ready = 1'b0;
      for (s = 1; s < NS; s++) if (t == start[s] + LAT) ready = 1'b1;
      if (t >= start[0] + LAT) begin
        checks++;
        if (index_valid_o !== (ready || t == start[0] + LAT)) begin
          failures++;
          $display("FAIL index_valid_o=%0b at t=%0d", index_valid_o, t);
        end
      end
      for (s = 0; s < NS - 1; s++) begin
        if (t == start[s+1] + LAT) begin
          checks++;
          $display("search %0d: index %0d (expected %0d) in clock %0d", s, index_o, expidx[s], t);
          if (index_o !== IW'(expidx[s])) failures++;
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
