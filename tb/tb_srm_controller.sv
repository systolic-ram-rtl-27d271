// tb_srm_controller: runs one convolution pass and one VMM step. Checks the
// pass length (155 cycles), the move counts (124 vertical, 30 horizontal,
// one without movement), the 8T address of every horizontal stride, and that
// the valid output tags cover each of the 31 x 31 output positions exactly
// once.
module tb_srm_controller;
  localparam int K = 5, N_RC = 7, N_T8 = 6;
  logic clk = 0, rst_n = 0, start_conv = 0, start_vmm = 0;
  logic busy, compute, vmm, last;
  srm_pkg::move_e move;
  logic [2:0] rwl, local_adr;
  logic [7:0] col;
  logic [N_RC-1:0][7:0] row;
  logic [N_RC-1:0] line_valid;
  int checks = 0, failures = 0;
  int seen [31][31];
  int nsteps, nv, nh, nn, nvalid;

  srm_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int a = 0; a < 31; a++) for (int b = 0; b < 31; b++) seen[a][b] = 0;
    nsteps = 0; nv = 0; nh = 0; nn = 0; nvalid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy, "idle after reset");
    start_conv = 1;
    @(negedge clk);
    start_conv = 0;
    while (busy) begin
      nsteps++;
      check(compute, "compute every step");
      case (move)
        srm_pkg::MV_V: nv++;
        srm_pkg::MV_H: begin
          nh++;
          check(int'(rwl) == (int'(col) - 1) / K && int'(local_adr) == (int'(col) - 1) % K,
                "8T address of horizontal stride");
        end
        default: nn++;
      endcase
      for (int r = 0; r < N_RC; r++) if (line_valid[r]) begin
        nvalid++;
        if (row[r] < 31 && col < 31) seen[row[r]][col]++;
        else check(0, "tag out of range");
      end
      check(last == (nsteps == 155), "last flag");
      @(negedge clk);
    end
    check(nsteps == 155, $sformatf("pass length %0d", nsteps));
    check(nv == 124 && nh == 30 && nn == 1, $sformatf("moves v=%0d h=%0d none=%0d", nv, nh, nn));
    check(nvalid == 961, $sformatf("valid outputs %0d", nvalid));
    for (int a = 0; a < 31; a++) for (int b = 0; b < 31; b++) check(seen[a][b] == 1, "coverage");
    // VMM: one step, no movement, all lines valid
    start_vmm = 1;
    @(negedge clk);
    start_vmm = 0;
    check(busy && vmm && compute && move == srm_pkg::MV_NONE && line_valid == '1 && last, "vmm step");
    @(negedge clk);
    check(!busy, "vmm is one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
