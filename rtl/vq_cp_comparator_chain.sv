// vq_cp_comparator_chain: bit-level systolic minimum finder of the Comparator
// Processor, holding the Minimum Distortion Register (MDR).
//
// Cell i holds bit i of the MDR, counted from the most significant (sign) bit,
// so cell 0 holds the sign. A distortion x passes through the chain MSB first:
// cell i sees x_i one clock after cell i-1 saw x_(i-1), together with the
// latched comparison state P_i, Q_i from cell i-1:
//   P Q = 00  the bits so far are equal, no decision yet
//   P Q = 10  x > m
//   P Q = 01  x < m
// Each cell writes back the bit of the smaller value: the MDR bit if x > m,
// the x bit if x < m, and while undecided the smaller of the two bits (AND for
// magnitude bits, OR for the sign bit). When the synchronisation bit R_i is 1
// a new search starts and the cell compares against, and replaces, the largest
// positive DW-bit two's complement number (0111...1) instead of its MDR bit.
// R travels down the chain with the comparison.
//
// Equations (m_t is the MDR bit after the search-start override):
//   cell i > 0: m_t = m | R_i
//               m  <= P_i Q_i + x_i m_t + x_i Q_i + P_i m_t
//               P_(i+1) <= P_i + ~m_t x_i ~Q_i,  Q_(i+1) <= Q_i + ~x_i m_t ~P_i
//   cell 0:     m_t = m & ~R_0
//               m  <= x_0 | m_t,  P_1 <= ~x_0 m_t,  Q_1 <= x_0 ~m_t
//   R_(i+1) <= R_i
// The equations for cells i > 0, P_1, Q_1 and the search-start value follow
// the document. The cell-0 MDR update and the use of the overridden bit m_t in
// the P/Q equations are this design's completion of them.
//
// Timing: x_i[i] in clock t + i (as produced by vq_cp_delay_triangle); the
// outcome p_o, q_o, r_o of that distortion is valid in clock t + DW.
module vq_cp_comparator_chain
  import vq_pkg::*;
#(
  parameter int unsigned DW = VQ_DW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] x_i,   // x_i[i]: bit for cell i (i = 0 is the MSB)
  input  logic          r_i,   // R_0: search start, with x_i[0]
  output logic          p_o,   // P_DW: x > m
  output logic          q_o,   // Q_DW: x < m
  output logic          r_o,   // R_DW
  output logic [DW-1:0] mdr_o  // MDR contents, mdr_o[i] held by cell i
);
  logic [DW:0] p, q, r;   // p[i] = P_i as seen by cell i
  logic [DW-1:0] m;

  assign p[0] = 1'b0;
  assign q[0] = 1'b0;
  assign r[0] = r_i;

  for (genvar i = 0; i < DW; i++) begin : g_cell
    logic m_t, m_nxt, p_nxt, q_nxt;
    if (i == 0) begin : g_sign
      assign m_t   = m[i] & ~r[i];
      assign m_nxt = x_i[i] | m_t;
      assign p_nxt = ~x_i[i] & m_t;
      assign q_nxt = x_i[i] & ~m_t;
    end else begin : g_mag
      assign m_t   = m[i] | r[i];
      assign m_nxt = (p[i] & q[i]) | (x_i[i] & m_t) | (x_i[i] & q[i]) | (p[i] & m_t);
      assign p_nxt = p[i] | (~m_t & x_i[i] & ~q[i]);
      assign q_nxt = q[i] | (~x_i[i] & m_t & ~p[i]);
    end
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        m[i]   <= (i == 0) ? 1'b0 : 1'b1;   // largest positive number
        p[i+1] <= 1'b0;
        q[i+1] <= 1'b0;
        r[i+1] <= 1'b0;
      end else begin
        m[i]   <= m_nxt;
        p[i+1] <= p_nxt;
        q[i+1] <= q_nxt;
        r[i+1] <= r[i];
      end
    end
  end

  assign p_o   = p[DW];
  assign q_o   = q[DW];
  assign r_o   = r[DW];
  assign mdr_o = m;
endmodule
