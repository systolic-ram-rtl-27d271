// tb_kernel_row_cell: writes eight kernels, then checks that the selected
// kernel reaches the broadcast output exactly one cycle after `sel` changes,
// and checks the digital read-out.
module tb_kernel_row_cell;
  localparam int W = 200;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [2:0] wr_wl = '0, sel = '0, rd_wl = '0;
  logic [W-1:0] wr_data = '0, kernel, rd_data;
  logic [W-1:0] rm [8];
  int checks = 0, failures = 0;

  kernel_row_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 8; w++) begin
      @(negedge clk);
      wr_en = 1; wr_wl = 3'(w);
      for (int b = 0; b < W; b += 8) wr_data[b +: 8] = 8'($urandom);
      rm[w] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int n = 0; n < 64; n++) begin
      logic [2:0] prev;
      prev = sel;
      sel = 3'($urandom);
      rd_wl = 3'($urandom);
      #1;
      checks += 2;
      if (kernel !== rm[prev]) failures++;      // old selection still shown
      if (rd_data !== rm[rd_wl]) failures++;
      @(negedge clk);
      checks++;
      if (kernel !== rm[sel]) failures++;       // new selection after one edge
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
