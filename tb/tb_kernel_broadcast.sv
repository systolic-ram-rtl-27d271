// tb_kernel_broadcast: random kernels; while enabled and out of reset each
// byte column must carry its magnitude as the level and its sign on BL[0];
// in reset or disabled every level and sign must rest at zero.
module tb_kernel_broadcast;
  localparam int NPIX = 25, BW = 8;
  logic rst = 0, en_n = 0;
  logic [NPIX*BW-1:0] krc_data = '0;
  logic [NPIX-1:0][BW-2:0] v_dac;
  logic [NPIX-1:0] bl_sign;
  int checks = 0, failures = 0, nrst = 0, nact = 0;

  kernel_broadcast dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int p = 0; p < NPIX; p++) krc_data[p*BW +: BW] = srm_pkg::smag_encode(int'($urandom_range(0, 254)) - 127);
      rst = 1'($urandom);
      en_n = ($urandom_range(0, 3) == 0);
      #1;
      for (int p = 0; p < NPIX; p++) begin
        int v, expv;
        v = bl_sign[p] ? -int'(v_dac[p]) : int'(v_dac[p]);
        expv = (rst || en_n) ? 0 : srm_pkg::smag_value(krc_data[p*BW +: BW]);
        checks++;
        if (v != expv || ((rst || en_n) && (v_dac[p] != 0 || bl_sign[p]))) failures++;
      end
      if (rst || en_n) nrst++; else nact++;
      #1;
    end
    checks++;
    if (nrst == 0 || nact == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
