// tb_mdac_cs_line: random sign-magnitude activations and kernel levels,
// including the extremes +-127; the line value must equal the signed
// 25-term dot product computed here from integers.
module tb_mdac_cs_line;
  localparam int NPIX = 25, BW = 8, CS_W = 20;
  logic [NPIX*BW-1:0] act = '0;
  logic [NPIX-1:0][BW-2:0] v_dac = '0;
  logic [NPIX-1:0] bl_sign = '0;
  logic signed [CS_W-1:0] cs;
  int checks = 0, failures = 0;

  mdac_cs_line dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      int expv;
      expv = 0;
      for (int p = 0; p < NPIX; p++) begin
        int a, k;
        if (n == 0)      begin a = 127;  k = 127; end
        else if (n == 1) begin a = -127; k = 127; end
        else begin
          a = int'($urandom_range(0, 254)) - 127;
          k = int'($urandom_range(0, 254)) - 127;
        end
        act[p*BW +: BW] = srm_pkg::smag_encode(a);
        v_dac[p] = 7'((k < 0) ? -k : k);
        bl_sign[p] = (k < 0);
        expv += a * k;
      end
      #1;
      checks++;
      if (int'(cs) != expv) begin
        failures++;
        if (failures < 5) $display("cs %0d exp %0d", cs, expv);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
