// tb_flash_adc: random line values over and beyond the full scale, plus the
// threshold edges; the code must appear one edge after a sample and hold
// while `sample` is low.
module tb_flash_adc;
  localparam int CS_W = 20, BITS = 4, L = 16;
  logic clk = 0, rst_n = 0, sample = 0;
  logic signed [CS_W-1:0] cs = '0;
  logic [BITS-1:0] code;
  int checks = 0, failures = 0;

  flash_adc dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_code(int v);
    int c;
    c = (v >>> L) + 8;
    if (c < 0) c = 0;
    if (c > 15) c = 15;
    return c;
  endfunction

  initial begin
    int held;
    repeat (2) @(posedge clk);
    checks++;
    if (code != 4'd8) failures++;
    rst_n = 1;
    held = 8;
    for (int n = 0; n < 400; n++) begin
      int v;
      @(negedge clk);
      if (n < 40) v = ((n / 2) % 15 - 7) * (1 << L) - (n % 2);  // just on and below thresholds
      else v = int'($urandom_range(0, 1000000)) - 500000;
      cs = CS_W'(v);
      sample = (n < 40) || ($urandom_range(0, 3) != 0);
      @(posedge clk);
      #1;
      if (sample) held = expect_code(v);
      checks++;
      if (int'(code) != held) begin
        failures++;
        if (failures < 5) $display("v=%0d code=%0d exp=%0d", v, code, held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
