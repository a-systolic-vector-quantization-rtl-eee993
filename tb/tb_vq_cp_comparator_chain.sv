// tb_vq_cp_comparator_chain: feeds a stream of signed distortion values, MSB
// first and skewed one clock per cell, with random search starts, into the
// comparator chain. An integer model keeps the running minimum of each search
// (starting from the largest positive DW-bit number). Checked every clock:
// P (x > m), Q (x < m) and R at the end of the chain DW clocks after the
// distortion entered, and every MDR bit against the model's minimum. Values
// are drawn from narrow ranges so that ties and sign changes are frequent,
// and the largest and smallest numbers are mixed in.
module tb_vq_cp_comparator_chain;
  import vq_pkg::*;
  localparam int DW = VQ_DW, T = 4000;
  localparam longint MAXPOS = (longint'(1) << (DW-1)) - 1;
  localparam longint MINNEG = -(longint'(1) << (DW-1));
  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [DW-1:0] x_i, mdr_o;
  logic r_i, p_o, q_o, r_o;

  vq_cp_comparator_chain dut (.clk, .rst_n, .x_i, .r_i, .p_o, .q_o, .r_o, .mdr_o);

  longint dv [T];
  longint mbefore [T], mafter [T];
  logic sy [T];
  int n_lt = 0, n_gt = 0, n_eq = 0;

  initial begin
    repeat (T + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic bitof(longint v, int i);
    logic [DW-1:0] w;
    w = DW'(v);
    return w[DW-1-i];   // bit for cell i
  endfunction

  initial begin
    longint m;
    m = MAXPOS;
    for (int j = 0; j < T; j++) begin
      int sel;
      sel = int'($urandom_range(0, 19));
      if (sel == 0)      dv[j] = MAXPOS;
      else if (sel == 1) dv[j] = MINNEG;
      else if (sel < 10) dv[j] = longint'($urandom_range(0, 64)) - 32;
      else               dv[j] = longint'($urandom_range(0, 32'hFFFFFF)) + MINNEG;
      sy[j] = (j == 0) || ($urandom_range(0, 15) == 0);
      if (sy[j]) m = MAXPOS;
      mbefore[j] = m;
      if (dv[j] < m) m = dv[j];
      mafter[j] = m;
    end
    rst_n = 1'b0; x_i = '0; r_i = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < T + DW + 2; t++) begin
      int j;
      // inputs of clock t: cell i sees distortion t - i
      for (int i = 0; i < DW; i++) x_i[i] = (t - i >= 0 && t - i < T) ? bitof(dv[t-i], i) : 1'b0;
      r_i = (t < T) ? sy[t] : 1'b0;
      #1;
      // outputs of clock t: result of distortion t - DW
      j = t - DW;
      if (j >= 0 && j < T) begin
        checks += 3;
        if (p_o !== (dv[j] > mbefore[j]) || q_o !== (dv[j] < mbefore[j]) || r_o !== sy[j]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d j=%0d x=%0d m=%0d p=%0b q=%0b r=%0b", t, j, dv[j], mbefore[j], p_o, q_o, r_o);
        end
        if (dv[j] < mbefore[j]) n_lt++; else if (dv[j] > mbefore[j]) n_gt++; else n_eq++;
      end
      // MDR bit i last written for distortion t - i - 1
      for (int i = 0; i < DW; i++) begin
        j = t - i - 1;
        if (j >= 0 && j < T) begin
          checks++;
          if (mdr_o[i] !== bitof(mafter[j], i)) begin
            failures++;
            if (failures < 10) $display("FAIL mdr t=%0d cell %0d", t, i);
          end
        end
      end
      @(negedge clk);
    end
    $display("outcomes: x<m %0d, x>m %0d, x==m %0d", n_lt, n_gt, n_eq);
    if (n_lt == 0 || n_gt == 0 || n_eq == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
