// vq_ipp: Inner Product Processor, a bit-level systolic multiplier/adder.
//
// Function: d = a * b + c (two's complement, modulo 2^CW). One new operation
// can start on every clock, so a stream of codevector components b (one per
// clock) against a stationary input component a produces one accumulated
// distortion term per clock.
//
// Structure: a trapezoid of latched full adder cells (vq_ipp_cell). Row r
// (r = 0 .. B-1) adds the partial product a[r] * b * 2^r into the running sum
// and spans bit columns r .. CW-1, so the array holds
// sum_{r} (CW - r) = 234 cells for B = 12, CW = 25. The carry of a row ripples
// one column per clock, and the sum moves down one row per clock, so cell
// (r, n) works on word w in clock w + n + r. Row B-1 handles the sign bit of a:
// its cells use the complement of b and its lowest cell takes a[B-1] as carry
// in, which together add -a[B-1] * b * 2^(B-1). Below the diagonal, plain
// delay latches keep the finished low sum bits in step with the rest. Input
// skewing delays along the two edges line up a and b with the cells: a[r]
// is delayed 2r clocks, bit n of the sign-extended b n clocks, and b moves
// from row to row through two latches.
//
// Interface and timing (word w is presented on a_i / b_i in clock w):
//   a_i, b_i  : parallel B-bit words, sampled in clock w
//   c_i[n]    : bit n of the incoming accumulated sum, in clock w + n
//               (LSB first, skewed by one clock per bit)
//   d_o[n]    : bit n of a*b + c, in clock w + n + B (same skew)
//   sync_i    : marks the first codevector of a search, in clock w;
//               sync_o repeats it in clock w + B, aligned with d_o[0]
// So the IPP adds B clocks of latency, and IPPs cascade by wiring d_o to the
// next c_i and sync_o to the next sync_i. The cell function, the 234-cell
// trapezoid, the complemented-b sign cells and the skewing delays follow the
// document; the exact placement of latches (and hence the latency of B
// clocks per IPP) is this design's own.
module vq_ipp
  import vq_pkg::*;
#(
  parameter int unsigned B  = VQ_B,   // width of a and b
  parameter int unsigned CW = VQ_CW   // width of c and d
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [B-1:0]  a_i,
  input  logic [B-1:0]  b_i,
  input  logic [CW-1:0] c_i,
  input  logic          sync_i,
  output logic [CW-1:0] d_o,
  output logic          sync_o
);
  // ---------------- input skewing delays ----------------
  logic [CW-1:0] b_ext;
  assign b_ext = CW'($signed(b_i));

  logic [B-1:0]  a_dly [2*B];   // a_dly[i] = a_i delayed i+1 clocks
  logic [CW-1:0] b_dly [CW];    // b_dly[i] = b_ext delayed i+1 clocks
  logic [B-1:0]  sync_dly;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 2*B; i++) a_dly[i] <= '0;
      for (int i = 0; i < CW; i++)  b_dly[i] <= '0;
      sync_dly <= '0;
    end else begin
      a_dly[0] <= a_i;
      for (int i = 1; i < 2*B; i++) a_dly[i] <= a_dly[i-1];
      b_dly[0] <= b_ext;
      for (int i = 1; i < CW; i++)  b_dly[i] <= b_dly[i-1];
      sync_dly <= {sync_dly[B-2:0], sync_i};
    end
  end
  assign sync_o = sync_dly[B-1];

  // a[r] as it enters row r (at column r), delayed 2r clocks
  logic [B-1:0] a_row;
  // b bit seen by cell (r, n), and the two latches between rows
  logic b_cell [B][CW];
  logic b_l1   [B][CW];
  logic b_l2   [B][CW];
  // latched sum, carry and a outputs of cell (r, n)
  logic s_q [B][CW];
  logic c_q [B][CW];
  logic a_q [B][CW];

  for (genvar r = 0; r < B; r++) begin : g_arow
    if (r == 0) begin : g_a0
      assign a_row[r] = a_i[0];
    end else begin : g_ar
      assign a_row[r] = a_dly[2*r-1][r];
    end
  end

  // ---------------- the cell array ----------------
  for (genvar r = 0; r < B; r++) begin : g_row
    for (genvar n = 0; n < CW; n++) begin : g_col
      if (n >= r) begin : g_cell
        logic a_in, b_in, s_in, c_in;
        // multiplier bit enters at the row's first cell and then moves along the row
        if (n == r) begin : g_first
          assign a_in = a_row[r];
          // the sign row starts with a carry of a[B-1] (the +1 of the complement)
          assign c_in = (r == B-1) ? a_row[r] : 1'b0;
        end else begin : g_next
          assign a_in = a_q[r][n-1];
          assign c_in = c_q[r][n-1];
        end
        // multiplicand bit: skewed from the input in row 0, two latches per row below
        if (r == 0) begin : g_b0
          if (n == 0) begin : g_bn0
            assign b_in = b_ext[0];
          end else begin : g_bn
            assign b_in = b_dly[n-1][n];
          end
          assign b_l1[r][n] = 1'b0;
          assign b_l2[r][n] = 1'b0;
        end else begin : g_br
          always_ff @(posedge clk) begin
            if (!rst_n) begin
              b_l1[r][n] <= 1'b0;
              b_l2[r][n] <= 1'b0;
            end else begin
              b_l1[r][n] <= b_cell[r-1][n-1];
              b_l2[r][n] <= b_l1[r][n];
            end
          end
          assign b_in = b_l2[r][n];
        end
        assign b_cell[r][n] = b_in;
        assign s_in = (r == 0) ? c_i[n] : s_q[r-1][n];

        vq_ipp_cell #(.INV_B(r == B-1)) u_cell (
          .clk  (clk),
          .rst_n(rst_n),
          .a_i  (a_in),
          .b_i  (b_in),
          .s_i  (s_in),
          .c_i  (c_in),
          .a_o  (a_q[r][n]),
          .s_o  (s_q[r][n]),
          .c_o  (c_q[r][n])
        );
      end else begin : g_delay
        // finished low-order sum bit: delay latch only
        always_ff @(posedge clk) begin
          if (!rst_n) s_q[r][n] <= 1'b0;
          else        s_q[r][n] <= s_q[r-1][n];
        end
        assign c_q[r][n]    = 1'b0;
        assign a_q[r][n]    = 1'b0;
        assign b_cell[r][n] = 1'b0;
        assign b_l1[r][n]   = 1'b0;
        assign b_l2[r][n]   = 1'b0;
      end
    end
  end

  for (genvar n = 0; n < CW; n++) begin : g_out
    assign d_o[n] = s_q[B-1][n];
  end
endmodule
