// vq_ipp_cell: the latched full adder cell of the Inner Product Processor.
//
// Each cell forms the partial product bit a.b (with b optionally inverted for
// the cells that handle the sign bit of a), adds it to the incoming partial sum
// bit s_i and carry c_i, and latches the sum bit s_o and carry c_o on the
// clock edge:
//   s_o = s_i ^ (a & b) ^ c_i
//   c_o = (a & b & s_i) | (a & b & c_i) | (s_i & c_i)
// The a operand is latched and passed on with the carry, as in the document's
// cell. The b operand is not latched here: the array around the cell moves it
// (see vq_ipp). The equations and the latched outputs follow the document;
// the INV_B option is how this design realises its "complement of b" cells.
// Timing: all outputs change one clock after the inputs; synchronous,
// active-low reset clears them.
module vq_ipp_cell #(
  parameter bit INV_B = 1'b0   // 1: use the complement of b in the partial product
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a_i,   // multiplier bit, passed on to a_o
  input  logic b_i,   // multiplicand bit
  input  logic s_i,   // partial sum bit from the previous row
  input  logic c_i,   // carry from the next lower bit of this row
  output logic a_o,
  output logic s_o,
  output logic c_o
);
  logic pp;
  assign pp = a_i & (INV_B ? ~b_i : b_i);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_o <= 1'b0;
      s_o <= 1'b0;
      c_o <= 1'b0;
    end else begin
      a_o <= a_i;
      s_o <= s_i ^ pp ^ c_i;
      c_o <= (pp & s_i) | (pp & c_i) | (s_i & c_i);
    end
  end
endmodule
