// tb_workload_im2col: the 31 x 31 zero-padded 5 x 5 layer computed the
// indirect way, without in-memory data movement, and compared with the
// direct (systolic) pass.
//
// Each VMM step computes seven outputs from seven 5 x 5 patches written into
// the seven windows, i.e. seven rows of the IM2COL matrix, so every pixel is
// written up to 25 times. The test checks all 961 outputs, then runs the
// same layer as one direct pass and checks that the two agree. It reports
// the bytes written and the cycles of both methods and checks that the
// direct method writes 1225 bytes in 56 words and needs fewer cycles.
module tb_workload_im2col;
  localparam int K = 5, N_RC = 7, N_T8 = 6, BW = 8, W = K*K*BW;
  localparam int RH = K * N_RC, WC = K + N_T8 * K, NO = RH - K + 1;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [5:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [2:0] krc_sel = '0;
  logic start_conv = 0, start_vmm = 0, busy;
  srm_pkg::move_e step_move;
  logic out_valid, out_vmm, out_last;
  logic [7:0] out_col;
  logic [N_RC-1:0][7:0] out_row;
  logic [N_RC-1:0] out_line_valid;
  logic [N_RC-1:0][3:0] out_code;
  logic [N_RC-1:0][19:0] out_cs;

  systolic_ram_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_writes = 0, n_vmm = 0;
  int img [RH][WC];
  int ker [K][K];
  int y_ind [NO][NO];
  longint cyc_ind, cyc_dir, t0;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  task automatic write_word(input int addr, input logic [W-1:0] data);
    wr_en = 1; wr_addr = 6'(addr); wr_data = data;
    @(negedge clk);
    wr_en = 0;
    n_writes++;
  endtask

  function automatic int conv_ref(int t, int h);
    int s;
    s = 0;
    for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) s += img[t+i][h+j] * ker[i][j];
    return s;
  endfunction

  initial begin
    logic [W-1:0] wd;
    int ws;
    for (int y = 0; y < RH; y++) for (int x = 0; x < WC; x++)
      img[y][x] = (y >= 2 && y < RH - 2 && x >= 2 && x < WC - 2) ? int'($urandom_range(0, 254)) - 127 : 0;
    for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) ker[i][j] = int'($urandom_range(0, 254)) - 127;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) wd[(K*i+j)*BW +: BW] = srm_pkg::smag_encode(ker[i][j]);
    write_word(8*N_RC, wd);
    krc_sel = '0;

    // ---- indirect: IM2COL rows written into the windows, one VMM step each ----
    ws = n_writes;
    t0 = $time;
    for (int base = 0; base < NO * NO; base += N_RC) begin
      int nl;
      nl = (NO * NO - base < N_RC) ? NO * NO - base : N_RC;
      for (int r = 0; r < nl; r++) begin
        int t, h;
        t = (base + r) / NO; h = (base + r) % NO;
        for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
          wd[(K*i+j)*BW +: BW] = srm_pkg::smag_encode(img[t+i][h+j]);
        write_word(8*r, wd);
      end
      start_vmm = 1;
      @(negedge clk);
      start_vmm = 0;
      while (!out_valid) @(negedge clk);
      n_vmm++;
      for (int r = 0; r < nl; r++) begin
        int t, h;
        t = (base + r) / NO; h = (base + r) % NO;
        y_ind[t][h] = int'(signed'(out_cs[r]));
        check(y_ind[t][h] == conv_ref(t, h), $sformatf("IM2COL Y[%0d][%0d]", t, h));
      end
    end
    cyc_ind = ($time - t0) / 10;
    $display("IM2COL: %0d VMM steps, %0d word writes (%0d bytes), %0d cycles",
             n_vmm, n_writes - ws, (n_writes - ws) * 25, cyc_ind);

    // ---- direct: one plane load and one pass ----
    ws = n_writes;
    t0 = $time;
    for (int r = 0; r < N_RC; r++) begin
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) wd[(K*i+j)*BW +: BW] = srm_pkg::smag_encode(img[K*r+i][j]);
      write_word(8*r, wd);
      write_word(8*r + 1, wd);
      for (int w = 0; w < N_T8; w++) begin
        for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) begin
          int h, t;
          h = K*w + j + 1;
          t = (K*r + 4*h + i) % RH;
          wd[(K*i+j)*BW +: BW] = srm_pkg::smag_encode(img[t][h + K - 1]);
        end
        write_word(8*r + 2 + w, wd);
      end
    end
    check(n_writes - ws == 56, "direct load is 56 words");
    start_conv = 1;
    @(negedge clk);
    start_conv = 0;
    begin
      bit done;
      done = 0;
      while (!done) begin
        if (out_valid) begin
          for (int r = 0; r < N_RC; r++) if (out_line_valid[r])
            check(int'(signed'(out_cs[r])) == y_ind[out_row[r]][out_col], "direct equals IM2COL");
          done = out_last;
        end
        @(negedge clk);
      end
    end
    cyc_dir = ($time - t0) / 10;
    $display("direct: 56 word writes (1400 bytes, 1225 of them image), %0d cycles", cyc_dir);
    check(n_vmm == (NO * NO + N_RC - 1) / N_RC, "VMM step count");
    check(cyc_dir < cyc_ind, "direct method needs fewer cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
