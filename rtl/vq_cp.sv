// vq_cp: Comparator Processor. Finds the smallest of the distortion values of
// each search and outputs the index of the codevector that produced it.
//
// Three parts, as in the document: a delay triangle turns the LSB-first,
// bit-skewed distortion stream from the IPP stack into MSB-first order; a
// chain of DW comparator cells keeps the running minimum in the Minimum
// Distortion Register (MDR); and a systolic counter numbers the distortions,
// saves the number of each new minimum in the Temporary Index Register (TIR)
// and moves the TIR to the Index Register (IR) when the next search starts.
// The comparison result enters the counter as L_0 = ~P Q (x < m) and the
// search-start bit as W_0 = R.
//
// Interface and timing: one distortion per clock. Bit n of distortion j of a
// search is on d_i[n] in clock t + j + n; sync_i is 1 in clock t with the LSB of
// the first distortion of a search. The index of the search that ended just
// before is on index_o, with sync_o = 1, in clock t + 2*DW - 1 + IW, and it is
// held until the next search ends. Ties keep the earlier index. A search's
// result therefore appears when the next search begins.
module vq_cp
  import vq_pkg::*;
#(
  parameter int unsigned DW = VQ_DW,
  parameter int unsigned IW = VQ_IW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] d_i,
  input  logic          sync_i,
  output logic [IW-1:0] index_o,
  output logic          sync_o
);
  logic [DW-1:0] x, mdr;
  logic          r0, p, q, r;
  logic [IW-1:0] tir;

  vq_cp_delay_triangle #(.DW(DW)) u_tri (
    .clk(clk), .rst_n(rst_n), .d_i(d_i), .sync_i(sync_i), .x_o(x), .r_o(r0)
  );

  vq_cp_comparator_chain #(.DW(DW)) u_cmp (
    .clk(clk), .rst_n(rst_n), .x_i(x), .r_i(r0),
    .p_o(p), .q_o(q), .r_o(r), .mdr_o(mdr)
  );

  vq_cp_counter #(.IW(IW)) u_cnt (
    .clk(clk), .rst_n(rst_n), .l_i(~p & q), .w_i(r),
    .index_o(index_o), .tir_o(tir), .sync_o(sync_o)
  );
endmodule
