// tb_systolic_ram_top: end-to-end test of the macro at its default size.
//
// Pass 1 fills the whole 35 x 35 activation ring with random pixels and
// kernel word 0 with a random kernel, runs a direct-convolution pass and
// checks all 961 valid outputs (ideal line value and ADC code) against a
// direct evaluation of sum_ij X[t+i][h+j] * K[i][j].
// Pass 2 writes a 31 x 31 image zero-padded to 35 x 35 (the padded ResNet
// layer case) with a second kernel in word 3 and checks it the same way.
// A VMM step then checks the plain 25 x 7 vector-matrix mode. The test also
// checks the pass length (155 results on consecutive cycles), the 56-cycle
// image load, digital read-back, and counts each mechanism: vertical stride,
// horizontal stride, VMM step, kernel switch and invalid (wrapped) windows.
module tb_systolic_ram_top;
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

  int checks = 0, failures = 0;
  int n_v = 0, n_h = 0, n_vmm = 0, n_ksw = 0, n_invalid = 0, n_words = 0;
  int img [RH][WC];
  int ker [K][K];
  int seen [NO][NO];
  longint t_load, t_pass;

  initial begin
    #2000000;
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

  always @(posedge clk) if (rst_n) begin
    if (step_move == srm_pkg::MV_V) n_v++;
    if (step_move == srm_pkg::MV_H) n_h++;
  end

  function automatic int rnd_pix();
    return int'($urandom_range(0, 254)) - 127;
  endfunction

  // Called at a falling edge; writes one word in the next rising edge and
  // returns at the following falling edge, so calls write back to back.
  task automatic write_word(input int addr, input logic [W-1:0] data);
    wr_en = 1; wr_addr = 6'(addr); wr_data = data;
    @(negedge clk);
    wr_en = 0;
    n_words++;
  endtask

  // Load img[][] into the array in the layout a pass expects.
  task automatic load_image();
    logic [W-1:0] wd;
    for (int r = 0; r < N_RC; r++) begin
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
        wd[(K*i+j)*BW +: BW] = srm_pkg::smag_encode(img[K*r+i][j]);
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
  endtask

  task automatic load_kernel(input int slot);
    logic [W-1:0] wd;
    for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
      wd[(K*i+j)*BW +: BW] = srm_pkg::smag_encode(ker[i][j]);
    write_word(8*N_RC + slot, wd);
  endtask

  function automatic int conv_ref(int t, int h);
    int s;
    s = 0;
    for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) s += img[t+i][h+j] * ker[i][j];
    return s;
  endfunction

  function automatic int adc_ref(int v);
    int c;
    c = (v >>> 16) + 8;
    return (c < 0) ? 0 : (c > 15) ? 15 : c;
  endfunction

  task automatic run_pass(input int slot, input string name);
    int nres, first_cyc, last_cyc, cyc;
    for (int a = 0; a < NO; a++) for (int b = 0; b < NO; b++) seen[a][b] = 0;
    @(negedge clk);
    if (krc_sel != 3'(slot)) n_ksw++;
    krc_sel = 3'(slot);
    start_conv = 1;
    @(negedge clk);
    start_conv = 0;
    nres = 0; first_cyc = -1; last_cyc = -1; cyc = 1;
    while (last_cyc < 0 && cyc < 400) begin
      if (out_valid) begin
        nres++;
        if (first_cyc < 0) first_cyc = cyc;
        check(!out_vmm, "pass result flagged as VMM");
        for (int r = 0; r < N_RC; r++) begin
          if (out_line_valid[r]) begin
            int t, h, e;
            t = int'(out_row[r]); h = int'(out_col);
            if (t < NO && h < NO) begin
              seen[t][h]++;
              e = conv_ref(t, h);
              check(int'(signed'(out_cs[r])) == e, $sformatf("%s Y[%0d][%0d] = %0d, expected %0d", name, t, h, out_cs[r], e));
              check(int'(out_code[r]) == adc_ref(e), $sformatf("%s ADC code at [%0d][%0d]", name, t, h));
            end else check(0, "output tag out of range");
          end else n_invalid++;
        end
        if (out_last) last_cyc = cyc;
      end
      @(negedge clk);
      cyc++;
    end
    check(nres == NO * K, $sformatf("%s: %0d results, expected %0d", name, nres, NO * K));
    check(last_cyc - first_cyc + 1 == NO * K, $sformatf("%s: results span %0d cycles", name, last_cyc - first_cyc + 1));
    check(first_cyc == 3, $sformatf("%s: first result %0d cycles after start", name, first_cyc));
    for (int a = 0; a < NO; a++) for (int b = 0; b < NO; b++) check(seen[a][b] == 1, $sformatf("%s: output [%0d][%0d] seen %0d times", name, a, b, seen[a][b]));
    @(negedge clk);
    check(!busy, "idle after pass");
  endtask

  initial begin
    int w0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- pass 1: random ring contents, kernel in word 0 ----
    for (int y = 0; y < RH; y++) for (int x = 0; x < WC; x++) img[y][x] = rnd_pix();
    for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) ker[i][j] = rnd_pix();
    ker[0][0] = 127; img[0][0] = -127;
    n_words = 0;
    @(negedge clk);
    t_load = $time;
    load_image();
    t_load = ($time - t_load) / 10;
    check(n_words == 8 * N_RC && t_load == 8 * N_RC, $sformatf("image load took %0d word writes in %0d cycles", n_words, t_load));
    load_kernel(0);
    // digital read-back of one 8T word and the kernel
    @(negedge clk);
    rd_addr = 6'(8*3 + 4);
    @(negedge clk);
    begin
      int h, t;
      h = K*2 + 0 + 1;
      t = (K*3 + 4*h + 0) % RH;
      check(rd_data[7:0] == srm_pkg::smag_encode(img[t][h + K - 1]), "read-back of 8T word");
    end
    rd_addr = 6'(8*N_RC);
    @(negedge clk);
    check(rd_data[7:0] == srm_pkg::smag_encode(127), "read-back of kernel word");
    run_pass(0, "pass1");

    // ---- pass 2: 31x31 image zero-padded to 35x35, kernel in word 3 ----
    for (int y = 0; y < RH; y++) for (int x = 0; x < WC; x++)
      img[y][x] = (y >= 2 && y < RH - 2 && x >= 2 && x < WC - 2) ? rnd_pix() : 0;
    for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) ker[i][j] = rnd_pix();
    load_kernel(3);
    @(negedge clk);
    t_pass = $time;
    load_image();
    run_pass(3, "pass2");
    // cycles from the first image write to the last result, less the fixed
    // start-up latency of 3 edges and the idle check in run_pass
    t_pass = ($time - t_pass) / 10;
    $display("pass2: %0d MACs in %0d cycles (56 writes + 155 compute + 5 overhead)", NO*NO*K*K, t_pass);
    check(t_pass == 8 * N_RC + NO * K + 5, $sformatf("load + pass took %0d cycles", t_pass));
    check((NO*NO*K*K) / (8 * N_RC + NO * K) == 113, "continuous MACs per cycle");

    // ---- VMM step: 25-element kernel vector times 25 x 7 activation matrix ----
    for (int r = 0; r < N_RC; r++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
      img[K*r+i][j] = rnd_pix();
    for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) ker[i][j] = rnd_pix();
    for (int r = 0; r < N_RC; r++) begin
      logic [W-1:0] wd;
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) wd[(K*i+j)*BW +: BW] = srm_pkg::smag_encode(img[K*r+i][j]);
      write_word(8*r, wd);
    end
    load_kernel(5);
    @(negedge clk);
    krc_sel = 3'd5; n_ksw++;
    start_vmm = 1;
    @(negedge clk);
    start_vmm = 0;
    w0 = 0;
    while (!out_valid && w0 < 10) begin @(negedge clk); w0++; end
    check(out_valid && out_vmm && out_last, "VMM result");
    if (out_valid && out_vmm) n_vmm++;
    for (int r = 0; r < N_RC; r++) begin
      int e;
      e = conv_ref(K*r, 0);
      check(out_line_valid[r] && int'(signed'(out_cs[r])) == e, $sformatf("VMM line %0d = %0d, expected %0d", r, out_cs[r], e));
    end

    // ---- mechanisms ----
    $display("mechanisms: phi1V=%0d phi1H=%0d vmm=%0d kernel_switch=%0d invalid_windows=%0d",
             n_v, n_h, n_vmm, n_ksw, n_invalid);
    check(n_v == 2 * 124, "vertical strides");
    check(n_h == 2 * 30, "horizontal strides");
    check(n_vmm == 1, "VMM steps");
    check(n_ksw >= 2, "kernel switches");
    check(n_invalid == 2 * (NO * K * N_RC - NO * NO), "invalid (wrapped) windows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
