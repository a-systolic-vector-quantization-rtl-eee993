// vq_cp_delay_triangle: input deskew of the Comparator Processor.
//
// The IPP stack delivers a distortion value least significant bit first, bit n
// one clock after bit n-1. The comparator chain needs the opposite order: its
// cell 0 looks at the most significant (sign) bit first and cell i looks at
// the i-th bit counted from the MSB one clock after cell i-1. The triangle
// therefore delays the bit that feeds comparator cell i (bit DW-1-i of the
// distortion) by 2i clocks, using plain delay latches. The search
// synchronisation bit arrives aligned with the LSB and is delayed DW-1 clocks
// so that it enters the comparator chain together with the MSB.
//
// Timing: if d_i[n] of a distortion is present in clock t + n and sync_i in
// clock t, then x_o[i] (= that distortion's bit DW-1-i) is present in clock
// t + DW - 1 + i and r_o in clock t + DW - 1. The 2n-clock delays follow the
// document; the extra delay of the sync bit is this design's way of making it
// enter with the MSB, which the document asks for.
module vq_cp_delay_triangle
  import vq_pkg::*;
#(
  parameter int unsigned DW = VQ_DW   // bits of a distortion value
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] d_i,     // bit n in clock t + n
  input  logic          sync_i,  // in clock t
  output logic [DW-1:0] x_o,     // x_o[i] = bit DW-1-i, in clock t + DW - 1 + i
  output logic          r_o      // in clock t + DW - 1
);
  // comparator cell i: 2i delay latches
  for (genvar i = 0; i < DW; i++) begin : g_tap
    if (i == 0) begin : g_direct
      assign x_o[i] = d_i[DW-1];
    end else begin : g_dly
      logic [2*i-1:0] sr;
      always_ff @(posedge clk) begin
        if (!rst_n) sr <= '0;
        else        sr <= {sr[2*i-2:0], d_i[DW-1-i]};
      end
      assign x_o[i] = sr[2*i-1];
    end
  end

  logic [DW-2:0] sync_sr;
  always_ff @(posedge clk) begin
    if (!rst_n) sync_sr <= '0;
    else        sync_sr <= {sync_sr[DW-3:0], sync_i};
  end
  assign r_o = sync_sr[DW-2];
endmodule
