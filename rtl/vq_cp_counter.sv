// vq_cp_counter: sum-save, carry-transfer systolic index counter of the
// Comparator Processor, with the Temporary Index Register (TIR) and the Index
// Register (IR).
//
// Cell i holds counter bit S_i, TIR bit t_i and IR bit I_i. The carry C, the
// load flag L and the new-search flag W enter cell 0 and move one cell per
// clock, so bit i of the counter works one clock after bit i-1 on the same
// distortion. Per cell:
//   S_i <= (~S_i C_i + S_i ~C_i) ~W_i         count, cleared by a new search
//   C_(i+1) <= S_i C_i ~W_i,  C_0 = 1          one count per clock
//   t_i <= L_i ? (new S_i) : t_i               save the index of a new minimum
//   I_i <= W_i ? t_i : I_i                     publish the finished search
//   L_(i+1) <= L_i,  W_(i+1) <= W_i
// L_0 is 1 when the distortion at the end of the comparator chain is smaller
// than the MDR (P Q = 01); W_0 is the search-start bit R leaving the chain.
// The equations follow the document. That t_i takes the counter value after
// its update (so the first distortion of a search gets index 0) is this
// design's reading.
//
// Timing: when w_i is 1 in clock t, index_o bit i holds the index of the
// previous search from clock t + i + 1 on, and sync_o is 1 in clock t + IW,
// when all bits are valid. index_o then holds until the next search ends.
module vq_cp_counter
  import vq_pkg::*;
#(
  parameter int unsigned IW = VQ_IW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          l_i,      // L_0: current distortion is a new minimum
  input  logic          w_i,      // W_0: a new search starts with this distortion
  output logic [IW-1:0] index_o,  // IR
  output logic [IW-1:0] tir_o,    // TIR
  output logic          sync_o    // W_IW: index_o is complete
);
  logic [IW-1:0] c, l;
  logic [IW:0]   w;
  logic [IW-1:0] s, t, ir;

  assign c[0] = 1'b1;
  assign l[0] = l_i;
  assign w[0] = w_i;

  for (genvar i = 0; i < IW; i++) begin : g_cell
    logic s_nxt;
    assign s_nxt = ((~s[i] & c[i]) | (s[i] & ~c[i])) & ~w[i];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        s[i]   <= 1'b0;
        t[i]   <= 1'b0;
        ir[i]  <= 1'b0;
        w[i+1] <= 1'b0;
      end else begin
        s[i]   <= s_nxt;
        if (l[i]) t[i]  <= s_nxt;
        if (w[i]) ir[i] <= t[i];
        w[i+1] <= w[i];
      end
    end
    // carry and load flag move on to the next bit (the last bit has no successor)
    if (i < IW-1) begin : g_next
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          c[i+1] <= 1'b0;
          l[i+1] <= 1'b0;
        end else begin
          c[i+1] <= s[i] & c[i] & ~w[i];
          l[i+1] <= l[i];
        end
      end
    end
  end

  assign index_o = ir;
  assign tir_o   = t;
  assign sync_o  = w[IW];
endmodule
