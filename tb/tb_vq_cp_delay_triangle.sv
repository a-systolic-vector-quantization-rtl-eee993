// tb_vq_cp_delay_triangle: drives random bits on every input of the delay
// triangle and checks that comparator tap i shows distortion bit DW-1-i
// exactly 2i clocks later, and the sync bit DW-1 clocks later.
module tb_vq_cp_delay_triangle;
  import vq_pkg::*;
  localparam int DW = VQ_DW, T = 500;
  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [DW-1:0] d_i, x_o;
  logic sync_i, r_o;
  logic [DW-1:0] dh [T];
  logic sh [T];

  vq_cp_delay_triangle dut (.clk, .rst_n, .d_i, .sync_i, .x_o, .r_o);

  initial begin
    repeat (T + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < T; t++) begin
      dh[t] = DW'($urandom());
      sh[t] = ($urandom_range(0, 3) == 0);
    end
    rst_n = 1'b0; d_i = '0; sync_i = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < T; t++) begin
      d_i = dh[t]; sync_i = sh[t];
      #1;
      for (int i = 0; i < DW; i++) begin
        if (t - 2*i >= 0) begin
          checks++;
          if (x_o[i] !== dh[t-2*i][DW-1-i]) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d tap %0d", t, i);
          end
        end
      end
      if (t - (DW-1) >= 0) begin
        checks++;
        if (r_o !== sh[t-(DW-1)]) begin failures++; $display("FAIL sync t=%0d", t); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
