// tb_lbl_mux: random local-bit-line words and every local address; each
// window row must receive byte (row, local_adr) of the word.
module tb_lbl_mux;
  localparam int K = 5, BW = 8;
  logic en = 1;
  logic [K*K*BW-1:0] lbl = '0;
  logic [2:0] local_adr = '0;
  logic [K*BW-1:0] hins;
  int checks = 0, failures = 0;

  lbl_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int b = 0; b < K*K*BW; b += 8) lbl[b +: 8] = 8'($urandom);
      local_adr = 3'(n % K);
      #1;
      for (int i = 0; i < K; i++) begin
        checks++;
        if (hins[i*BW +: BW] !== lbl[(K*i + n % K)*BW +: BW]) begin
          failures++;
          if (failures < 5) $display("row %0d adr %0d got %h", i, n % K, hins[i*BW +: BW]);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
