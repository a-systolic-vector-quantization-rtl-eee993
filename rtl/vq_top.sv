// vq_top: systolic vector quantization processor, an array of K Inner Product
// Processors (IPPs) feeding one Comparator Processor (CP).
//
// For every codevector j the array computes the distortion
//   D_j = sum_{i=0}^{K-1} x_i * y_(j,i) + r_j
// and the CP returns the index of the smallest D_j once per search over the
// codebook. With z_(j,i) = -2 y_(j,i) stored in place of the codevector and
// r_j = sum_i y_(j,i)^2, D_j ranks codevectors exactly as the squared
// Euclidean distance does; weighted squared error and Itakura-Saito
// distortion fit the same form. A search over N codevectors takes N clocks and
// a new search can follow immediately, so one index leaves every N clocks.
//
// IPP i takes input component x_i (held for the whole search) and component i
// of each codevector on its a and b inputs, adds the product to the running
// sum arriving from IPP i-1, and passes the sum on bit-skewed, LSB first. The
// first IPP gets r_j, which this block skews bit by bit (bit n delayed n
// clocks) so that it enters like any other running sum. The CP uses the upper
// DW bits of the CW-bit sum (the LSB is dropped) and gets the sync bit delayed
// to match.
//
// Interface and timing. Codevector j of a search enters IPP 0 in clock s + j,
// where sync_i = 1 in clock s and r_i carries r_j in clock s + j. Because each
// IPP adds B clocks, IPP i must see x_i[i] and y_i[i] B*i clocks later than
// IPP 0 does: y_i[i] = y_(j,i) in clock s + j + B*i, and x_i[i] must change to
// the new input component in clock s + B*i. This skew is the caller's job,
// as in the document's array, where the codevector components enter the array
// skewed in time. The index of the search that ended in clock s - 1 appears on
// index_o with index_valid_o = 1 in clock s + LAT, LAT = K*B + (CW-DW) +
// 2*DW - 1 + IW, and is held until the next one. The cascade of IPPs and a CP
// follows the document; the r_j skew, the choice of the upper DW bits and the
// exact latency are this design's own.
module vq_top
  import vq_pkg::*;
#(
  parameter int unsigned K  = VQ_K,   // vector dimension = number of IPPs
  parameter int unsigned B  = VQ_B,
  parameter int unsigned CW = VQ_CW,
  parameter int unsigned DW = VQ_DW,
  parameter int unsigned IW = VQ_IW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sync_i,          // first codevector of a search
  input  logic [CW-1:0] r_i,             // r_j, word-parallel
  input  logic [B-1:0]  x_i [K],         // input vector components (skewed, see above)
  input  logic [B-1:0]  y_i [K],         // codevector components (skewed, see above)
  output logic [IW-1:0] index_o,         // index of the best codevector of the last search
  output logic          index_valid_o    // 1 in the clock a new index appears
);
  localparam int unsigned SHIFT = CW - DW;

  // ---------------- r_j skew: bit n delayed n clocks ----------------
  logic [CW-1:0] r_skew;
  logic [CW-1:0] r_dly [CW];   // r_dly[i] = r_i delayed i+1 clocks
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < CW; i++) r_dly[i] <= '0;
    end else begin
      r_dly[0] <= r_i;
      for (int i = 1; i < CW; i++) r_dly[i] <= r_dly[i-1];
    end
  end
  for (genvar n = 0; n < CW; n++) begin : g_rskew
    if (n == 0) begin : g_direct
      assign r_skew[n] = r_i[0];
    end else begin : g_dly
      assign r_skew[n] = r_dly[n-1][n];
    end
  end

  // ---------------- IPP cascade ----------------
  logic [CW-1:0] sum  [K+1];
  logic          sync [K+1];
  assign sum[0]  = r_skew;
  assign sync[0] = sync_i;

  for (genvar i = 0; i < K; i++) begin : g_ipp
    vq_ipp #(.B(B), .CW(CW)) u_ipp (
      .clk   (clk),
      .rst_n (rst_n),
      .a_i   (x_i[i]),
      .b_i   (y_i[i]),
      .c_i   (sum[i]),
      .sync_i(sync[i]),
      .d_o   (sum[i+1]),
      .sync_o(sync[i+1])
    );
  end

  // ---------------- CP on the upper DW bits ----------------
  logic [SHIFT:0] cp_sync_sr;   // cp_sync_sr[i] = sync of the last IPP delayed i clocks
  assign cp_sync_sr[0] = sync[K];
  for (genvar i = 1; i <= SHIFT; i++) begin : g_sh
    always_ff @(posedge clk) begin
      if (!rst_n) cp_sync_sr[i] <= 1'b0;
      else        cp_sync_sr[i] <= cp_sync_sr[i-1];
    end
  end

  vq_cp #(.DW(DW), .IW(IW)) u_cp (
    .clk    (clk),
    .rst_n  (rst_n),
    .d_i    (sum[K][CW-1 -: DW]),
    .sync_i (cp_sync_sr[SHIFT]),
    .index_o(index_o),
    .sync_o (index_valid_o)
  );
endmodule
