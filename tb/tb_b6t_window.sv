// tb_b6t_window: random writes, vertical strides and horizontal strides on
// one B6T window, checked every cycle against a byte-array reference model.
// Each move must be visible exactly one clock edge after it is applied.
module tb_b6t_window;
  localparam int K = 5, BW = 8;
  logic clk = 0, rst_n = 0;
  logic phi1v = 0, phi1h = 0, wr_en = 0;
  logic [K*K*BW-1:0] wr_data = '0, win;
  logic [K*BW-1:0] vbus_in = '0, hins_in = '0, vbus_out;
  int checks = 0, failures = 0, nv = 0, nh = 0, nw = 0;
  logic [BW-1:0] ref_q [K][K];

  b6t_window dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++) begin
        checks++;
        if (win[(K*i+j)*BW +: BW] !== ref_q[i][j]) begin
          failures++;
          if (failures < 10) $display("mismatch win (%0d,%0d) got %h exp %h", i, j, win[(K*i+j)*BW +: BW], ref_q[i][j]);
        end
      end
    for (int j = 0; j < K; j++) begin
      checks++;
      if (vbus_out[j*BW +: BW] !== ref_q[0][j]) failures++;
    end
  endtask

  initial begin
    for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) ref_q[i][j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int n = 0; n < 400; n++) begin
      int op;
      op = (n < 2) ? 0 : int'($urandom_range(0, 3));
      wr_en = 0; phi1v = 0; phi1h = 0;
      for (int b = 0; b < K*BW; b += 8) begin
        vbus_in[b +: 8] = 8'($urandom);
        hins_in[b +: 8] = 8'($urandom);
      end
      for (int b = 0; b < K*K*BW; b += 8) wr_data[b +: 8] = 8'($urandom);
      case (op)
        0: wr_en = 1;
        1: phi1v = 1;
        2: phi1h = 1;
        default: ;
      endcase
      @(posedge clk);
      // reference update
      case (op)
        0: begin
          nw++;
          for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) ref_q[i][j] = wr_data[(K*i+j)*BW +: BW];
        end
        1: begin
          nv++;
          for (int i = 0; i < K - 1; i++) for (int j = 0; j < K; j++) ref_q[i][j] = ref_q[i+1][j];
          for (int j = 0; j < K; j++) ref_q[K-1][j] = vbus_in[j*BW +: BW];
        end
        2: begin
          nh++;
          for (int i = 0; i < K; i++) begin
            for (int j = 0; j < K - 1; j++) ref_q[i][j] = ref_q[i][j+1];
            ref_q[i][K-1] = hins_in[i*BW +: BW];
          end
        end
        default: ;
      endcase
      @(negedge clk);
      compare();
    end
    checks++;
    if (nv == 0 || nh == 0 || nw == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
