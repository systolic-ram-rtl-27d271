// tb_activation_row_cell: fills the window and the six 8T word lines of one
// row-cell, then runs random vertical and horizontal strides (random 8T word
// line and local address) and digital reads, comparing the window, the
// systolic bus output and the read-out with a reference model.
module tb_activation_row_cell;
  localparam int K = 5, BW = 8, N_T8 = 6, W = K*K*BW;
  logic clk = 0, rst_n = 0;
  logic phi1v = 0, phi1h = 0, wr_en = 0;
  logic [2:0] rwl = '0, local_adr = '0, wr_wl = '0, rd_wl = '0;
  logic [W-1:0] wr_data = '0, rd_data, win;
  logic [K*BW-1:0] vbus_in = '0, vbus_out;
  logic [BW-1:0] rwin [K][K];
  logic [W-1:0] rt8 [N_T8];
  int checks = 0, failures = 0, nv = 0, nh = 0;

  activation_row_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd_word();
    logic [W-1:0] v;
    for (int b = 0; b < W; b += 8) v[b +: 8] = 8'($urandom);
    return v;
  endfunction

  function automatic logic [W-1:0] ref_win();
    logic [W-1:0] v;
    for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) v[(K*i+j)*BW +: BW] = rwin[i][j];
    return v;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int wl = 0; wl < 8; wl++) begin
      @(negedge clk);
      wr_en = 1; wr_wl = 3'(wl); wr_data = rnd_word();
      if (wl < 2) begin
        for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) rwin[i][j] = wr_data[(K*i+j)*BW +: BW];
      end else rt8[wl-2] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int n = 0; n < 300; n++) begin
      int op;
      op = int'($urandom_range(0, 2));
      phi1v = (op == 1);
      phi1h = (op == 2);
      rwl = 3'($urandom_range(0, N_T8-1));
      local_adr = 3'($urandom_range(0, K-1));
      for (int b = 0; b < K*BW; b += 8) vbus_in[b +: 8] = 8'($urandom);
      rd_wl = 3'($urandom_range(0, 7));
      #1;
      checks += 2;
      if (rd_data !== ((rd_wl < 2) ? ref_win() : rt8[rd_wl-2])) failures++;
      if (vbus_out !== {rwin[0][4], rwin[0][3], rwin[0][2], rwin[0][1], rwin[0][0]}) failures++;
      @(posedge clk);
      if (op == 1) begin
        nv++;
        for (int i = 0; i < K-1; i++) for (int j = 0; j < K; j++) rwin[i][j] = rwin[i+1][j];
        for (int j = 0; j < K; j++) rwin[K-1][j] = vbus_in[j*BW +: BW];
      end else if (op == 2) begin
        nh++;
        for (int i = 0; i < K; i++) begin
          for (int j = 0; j < K-1; j++) rwin[i][j] = rwin[i][j+1];
          rwin[i][K-1] = rt8[rwl][(K*i + int'(local_adr))*BW +: BW];
        end
      end
      @(negedge clk);
      phi1v = 0; phi1h = 0;
      checks++;
      if (win !== ref_win()) begin
        failures++;
        if (failures < 5) $display("window mismatch after op %0d", op);
      end
    end
    checks++;
    if (nv == 0 || nh == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
