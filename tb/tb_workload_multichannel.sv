// tb_workload_multichannel: a small convolution layer with input and output
// channels, Y[c_out] = sum over c_in of X[c_in] (*) K[c_out][c_in], run on
// the macro at its default size as a sequence of passes.
//
// Three 31 x 31 input channels, zero-padded to 35 x 35, and two output
// channels; the six 5 x 5 kernels are stored once, in kernel words 0..5.
// For each input channel the plane is loaded with 56 writes and convolved
// with both of its kernels. A pass leaves the 8T cells untouched and only
// consumes the B6T windows, so the second pass of a channel needs just the
// seven window words rewritten. The channel sums are formed here from the
// ideal line values, and every per-pass ADC code is checked as well.
module tb_workload_multichannel;
  localparam int K = 5, N_RC = 7, N_T8 = 6, BW = 8, W = K*K*BW;
  localparam int RH = K * N_RC, WC = K + N_T8 * K, NO = RH - K + 1;
  localparam int CIN = 3, COUT = 2;

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

  int checks = 0, failures = 0, n_writes = 0, n_passes = 0, n_rewind = 0;
  int img [CIN][RH][WC];
  int ker [COUT][CIN][K][K];
  int acc [COUT][NO][NO];

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

  task automatic load_windows(input int c);
    logic [W-1:0] wd;
    for (int r = 0; r < N_RC; r++) begin
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
        wd[(K*i+j)*BW +: BW] = srm_pkg::smag_encode(img[c][K*r+i][j]);
      write_word(8*r, wd);
    end
  endtask

  task automatic load_plane(input int c);
    logic [W-1:0] wd;
    load_windows(c);
    for (int r = 0; r < N_RC; r++) begin
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
        wd[(K*i+j)*BW +: BW] = srm_pkg::smag_encode(img[c][K*r+i][j]);
      write_word(8*r + 1, wd);
      for (int w = 0; w < N_T8; w++) begin
        for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) begin
          int h, t;
          h = K*w + j + 1;
          t = (K*r + 4*h + i) % RH;
          wd[(K*i+j)*BW +: BW] = srm_pkg::smag_encode(img[c][t][h + K - 1]);
        end
        write_word(8*r + 2 + w, wd);
      end
    end
  endtask

  function automatic int part_ref(int co, int c, int t, int h);
    int s;
    s = 0;
    for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) s += img[c][t+i][h+j] * ker[co][c][i][j];
    return s;
  endfunction

  task automatic run_pass(input int co, input int c);
    int nres, cyc;
    bit done;
    krc_sel = 3'(co * CIN + c);
    @(negedge clk);
    start_conv = 1;
    @(negedge clk);
    start_conv = 0;
    nres = 0; cyc = 0; done = 0;
    while (!done && cyc < 400) begin
      if (out_valid) begin
        nres++;
        for (int r = 0; r < N_RC; r++) if (out_line_valid[r]) begin
          int t, h, e, code;
          t = int'(out_row[r]); h = int'(out_col);
          e = part_ref(co, c, t, h);
          check(int'(signed'(out_cs[r])) == e, $sformatf("cout %0d cin %0d [%0d][%0d]", co, c, t, h));
          code = (e >>> 16) + 8;
          check(int'(out_code[r]) == code, "ADC code");
          acc[co][t][h] += int'(signed'(out_cs[r]));
        end
        done = out_last;
      end
      @(negedge clk);
      cyc++;
    end
    check(nres == NO * K, $sformatf("pass length %0d", nres));
    n_passes++;
  endtask

  initial begin
    for (int c = 0; c < CIN; c++)
      for (int y = 0; y < RH; y++) for (int x = 0; x < WC; x++)
        img[c][y][x] = (y >= 2 && y < RH - 2 && x >= 2 && x < WC - 2) ? int'($urandom_range(0, 254)) - 127 : 0;
    for (int co = 0; co < COUT; co++) for (int c = 0; c < CIN; c++)
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) ker[co][c][i][j] = int'($urandom_range(0, 254)) - 127;
    for (int co = 0; co < COUT; co++) for (int t = 0; t < NO; t++) for (int h = 0; h < NO; h++) acc[co][t][h] = 0;

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int co = 0; co < COUT; co++) for (int c = 0; c < CIN; c++) begin
      logic [W-1:0] wd;
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
        wd[(K*i+j)*BW +: BW] = srm_pkg::smag_encode(ker[co][c][i][j]);
      write_word(8*N_RC + co * CIN + c, wd);
    end
    for (int c = 0; c < CIN; c++) begin
      int w0;
      w0 = n_writes;
      load_plane(c);
      check(n_writes - w0 == 8 * N_RC, "plane load is 56 writes");
      run_pass(0, c);
      w0 = n_writes;
      load_windows(c);
      n_rewind++;
      check(n_writes - w0 == N_RC, "rewind is 7 writes");
      run_pass(1, c);
    end
    // channel sums against equation (2) evaluated directly
    for (int co = 0; co < COUT; co++) for (int t = 0; t < NO; t++) for (int h = 0; h < NO; h++) begin
      int e;
      e = 0;
      for (int c = 0; c < CIN; c++) e += part_ref(co, c, t, h);
      check(acc[co][t][h] == e, $sformatf("Y[%0d][%0d][%0d]", co, t, h));
    end
    $display("layer: %0d passes, %0d window rewinds, %0d word writes", n_passes, n_rewind, n_writes);
    check(n_passes == CIN * COUT && n_rewind == CIN, "pass and rewind counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
