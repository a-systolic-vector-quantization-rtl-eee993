// tb_vq_ipp: streams random words through one IPP at its default size
// (12-bit a and b, 25-bit c and d) and checks every output bit against
// a*b + c computed with integer arithmetic, at the expected skewed time
// (bit n of word w in clock w + n + B). a is held for runs of words, as in a
// codebook search, and changes between runs; extreme operands are mixed in.
// The sync output is checked to lag the sync input by B clocks.
module tb_vq_ipp;
  import vq_pkg::*;
  localparam int B = VQ_B, CW = VQ_CW, T = 3000, RUN = 37;
  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [B-1:0]  a_i, b_i;
  logic [CW-1:0] c_i, d_o;
  logic          sync_i, sync_o;

  vq_ipp dut (.clk, .rst_n, .a_i, .b_i, .c_i, .sync_i, .d_o, .sync_o);

  int aw [T], bw [T];
  logic [CW-1:0] cw [T];
  logic [CW-1:0] expw [T];
  logic sw [T];

  initial begin
    repeat (T + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_op();
    int sel;
    sel = int'($urandom_range(0, 9));
    if (sel == 0) return -(1 << (B-1));
    if (sel == 1) return (1 << (B-1)) - 1;
    if (sel == 2) return -1;
    return int'($urandom_range(0, (1 << B) - 1)) - (1 << (B-1));
  endfunction

  initial begin
    int cur_a;
    longint prod;
    cur_a = rnd_op();
    for (int w = 0; w < T; w++) begin
      if (w % RUN == 0) cur_a = rnd_op();
      aw[w] = cur_a;
      bw[w] = rnd_op();
      cw[w] = CW'($urandom());
      sw[w] = (w % RUN == 0);
      prod = longint'(aw[w]) * longint'(bw[w]);
      expw[w] = CW'(prod) + cw[w];
    end
  end

  initial begin
    rst_n = 1'b0; a_i = '0; b_i = '0; c_i = '0; sync_i = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < T + CW + B + 2; t++) begin
      // outputs of clock t
      if (t >= 1) begin
        for (int n = 0; n < CW; n++) begin
          int w;
          w = t - n - B;
          if (w >= 0 && w < T) begin
            checks++;
            if (d_o[n] !== expw[w][n]) begin
              failures++;
              if (failures < 10) $display("FAIL t=%0d word %0d bit %0d: a=%0d b=%0d", t, w, n, aw[w], bw[w]);
            end
          end
        end
        if (t - B >= 0 && t - B < T) begin
          checks++;
          if (sync_o !== sw[t-B]) begin failures++; $display("FAIL sync at %0d", t); end
        end
      end
      // inputs of clock t
      if (t < T) begin
        a_i = B'(aw[t]); b_i = B'(bw[t]); sync_i = sw[t];
      end else begin
        a_i = '0; b_i = '0; sync_i = 1'b0;
      end
      for (int n = 0; n < CW; n++) c_i[n] = (t - n >= 0 && t - n < T) ? cw[t-n][n] : 1'b0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
