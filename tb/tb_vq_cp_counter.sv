// tb_vq_cp_counter: drives the load flag L_0 and new-search flag W_0 of the
// systolic counter with random values and searches of random length, plus
// one search longer than 2^IW so that every counter bit carries and the count
// wraps. An integer model numbers the distortions of each search, keeps the
// number of the last one that set L (TIR) and publishes it (IR) at the next
// search start. Every TIR and IR bit is checked in the clock it is due
// (bit i lags by i clocks), and sync_o must follow W_0 by IW clocks.
module tb_vq_cp_counter;
  import vq_pkg::*;
  localparam int IW = VQ_IW;
  localparam int T = 90000;
  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic l_i, w_i, sync_o;
  logic [IW-1:0] index_o, tir_o;

  vq_cp_counter dut (.clk, .rst_n, .l_i, .w_i, .index_o, .tir_o, .sync_o);

  logic lh [T], wh [T];
  logic [IW-1:0] tirh [T], irh [T];
  int n_wrap = 0, n_pub = 0;

  initial begin
    repeat (T + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt, len, left;
    logic [IW-1:0] tir, ir;
    cnt = 0; tir = '0; ir = '0; left = 0;
    for (int j = 0; j < T; j++) begin
      if (left == 0 || j == 1000) begin
        len = (j == 1000) ? (1 << IW) + 300 : int'($urandom_range(1, 400));
        left = len;
        wh[j] = 1'b1;
      end else begin
        wh[j] = 1'b0;
      end
      left--;
      lh[j] = ($urandom_range(0, 7) == 0) || wh[j];
      if (j >= 1000 && j < 1000 + (1 << IW) + 300) lh[j] = (j % 4099 == 0) || wh[j];
      if (wh[j]) begin ir = tir; cnt = 0; n_pub++; end
      else begin
        cnt++;
        if (cnt == (1 << IW)) n_wrap++;
      end
      if (lh[j]) tir = IW'(cnt);
      tirh[j] = tir;
      irh[j] = ir;
    end
    rst_n = 1'b0; l_i = 1'b0; w_i = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < T; t++) begin
      l_i = lh[t]; w_i = wh[t];
      #1;
      for (int i = 0; i < IW; i++) begin
        int j;
        j = t - i - 1;
        if (j >= 0) begin
          checks += 2;
          if (tir_o[i] !== tirh[j][i] || index_o[i] !== irh[j][i]) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d bit %0d tir %0b/%0b ir %0b/%0b", t, i, tir_o[i], tirh[j][i], index_o[i], irh[j][i]);
          end
        end
      end
      if (t - IW >= 0) begin
        checks++;
        if (sync_o !== wh[t-IW]) begin failures++; $display("FAIL sync t=%0d", t); end
      end
      @(negedge clk);
    end
    $display("searches published %0d, count wraps %0d", n_pub, n_wrap);
    if (n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
