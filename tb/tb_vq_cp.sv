// tb_vq_cp: end-to-end check of the Comparator Processor. Distortion values
// enter LSB first, bit n one clock after bit n-1, one value per clock, in
// searches of random length (sync_i with the LSB of the first value). For each
// search an integer model finds the first index of the smallest value. The
// index must appear on index_o with sync_o = 1 exactly 2*DW - 1 + IW clocks
// after the next search starts, and sync_o must be 0 in every other clock.
// Searches use narrow value ranges (many ties, which keep the earlier index),
// full-range signed values, and searches of the shortest length, IW values,
// for which the index register is still whole when sync_o rises.
module tb_vq_cp;
  import vq_pkg::*;
  localparam int DW = VQ_DW, IW = VQ_IW, T = 6000;
  localparam int LAT = 2*DW - 1 + IW;
  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [DW-1:0] d_i;
  logic sync_i, sync_o;
  logic [IW-1:0] index_o;

  vq_cp dut (.clk, .rst_n, .d_i, .sync_i, .index_o, .sync_o);

  logic [DW-1:0] dv [T];
  logic sy [T];
  int best [T];   // best[j]: at a search start j, the index won by the search before
  int n_results = 0, n_single = 0, n_tie = 0;

  initial begin
    repeat (T + 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int left, idx, bidx, mode;
    longint bval, v;
    left = 0; idx = 0; bidx = -1; bval = 0; mode = 0;
    for (int j = 0; j < T; j++) begin
      best[j] = -1;
      if (left == 0) begin
        best[j] = bidx;
        left = ($urandom_range(0, 5) == 0) ? IW : int'($urandom_range(IW, 300));
        if (left == IW) n_single++;
        mode = int'($urandom_range(0, 2));
        sy[j] = 1'b1; idx = 0; bval = 0;
      end else begin
        sy[j] = 1'b0; idx++;
      end
      left--;
      case (mode)
        0: v = longint'($urandom_range(0, 20)) - 10;
        1: v = longint'($urandom_range(0, 32'hFFFFFF)) - (longint'(1) << (DW-1));
        default: v = longint'($urandom_range(0, 2000)) + 100;
      endcase
      dv[j] = DW'(v);
      if (idx == 0 || v < bval) begin bval = v; bidx = idx; end
      else if (v == bval) n_tie++;
    end
    rst_n = 1'b0; d_i = '0; sync_i = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < T; t++) begin
      for (int n = 0; n < DW; n++) d_i[n] = (t - n >= 0) ? dv[t-n][n] : 1'b0;
      sync_i = sy[t];
      #1;
      if (t - LAT >= 0) begin
        int s;
        s = t - LAT;
        checks++;
        if (sync_o !== sy[s]) begin failures++; $display("FAIL sync_o t=%0d", t); end
        if (sy[s] && best[s] >= 0) begin
          checks++; n_results++;
          if (index_o !== IW'(best[s])) begin
            failures++;
            if (failures < 10) begin
              $display("FAIL index t=%0d got %0d expected %0d", t, index_o, best[s]);
              for (int q = s - 1; q >= 0; q--) begin $display("  %0d: %0d", q, $signed(dv[q])); if (sy[q]) break; end
            end
          end
        end
      end
      @(negedge clk);
    end
    $display("results %0d, shortest (IW-value) searches %0d, ties %0d", n_results, n_single, n_tie);
    if (n_results == 0 || n_single == 0 || n_tie == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
