// tb_sram_8t_bank: writes every 8T word line, then checks the local-bit-line
// read (same cycle, only while rwl_en is high, zero otherwise) and the
// bit-line read-out against a reference copy.
module tb_sram_8t_bank;
  localparam int W = 200, N = 6;
  logic clk = 0;
  logic wr_en = 0, rwl_en = 0;
  logic [2:0] wr_wl = '0, rwl = '0, bl_rd_wl = '0;
  logic [W-1:0] wr_data = '0, lbl, bl_rd_data;
  logic [W-1:0] ref_m [N];
  int checks = 0, failures = 0;

  sram_8t_bank dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd_word();
    logic [W-1:0] v;
    for (int b = 0; b < W; b += 8) v[b +: 8] = 8'($urandom);
    return v;
  endfunction

  initial begin
    for (int round = 0; round < 4; round++) begin
      for (int w = 0; w < N; w++) begin
        @(negedge clk);
        wr_en = 1; wr_wl = 3'(w); wr_data = rnd_word(); ref_m[w] = wr_data;
      end
      @(negedge clk);
      wr_en = 0;
      for (int n = 0; n < 30; n++) begin
        rwl_en = 1'($urandom);
        rwl = 3'($urandom_range(0, N-1));
        bl_rd_wl = 3'($urandom_range(0, N-1));
        #1;
        checks += 2;
        if (lbl !== (rwl_en ? ref_m[rwl] : '0)) failures++;
        if (bl_rd_data !== ref_m[bl_rd_wl]) failures++;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
