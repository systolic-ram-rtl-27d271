// systolic_ram_top: a Systolic-RAM macro, a 200 x 64 bit SRAM that computes
// signed 8-bit 5x5 convolutions inside the array by moving activations
// between bit cells instead of duplicating them.
//
// Word lines 0..55 form seven activation row-cells of eight word lines; word
// lines 56..63 form the kernel row-cell. Each activation row-cell holds one
// 5x5 window in its B6T cells, right under a row of 25 MDACs that share
// charge on one line, and further image columns in its 8T cells. The seven
// windows are stacked five image rows apart, and their B6T cells are chained
// into a ring by 40-bit systolic buses, so one vertical stride (phi1V) moves
// every window down the image by one row, passing each window's top row to
// the row-cell above. A horizontal stride (phi1H) shifts every window one
// column and fills the new column from the row-cell's 8T cells. Between
// moves, the selected kernel is broadcast on the bit lines and all seven
// lines compute a 25-term dot product at once (phi2): 175 MACs per cycle.
// A 4-bit flash ADC digitises each line.
//
// Interface (all on the rising edge of clk, active-low asynchronous reset):
//   wr_en/wr_addr/wr_data  write word line wr_addr (0..63), 200 bits; word
//                          lines 8r and 8r+1 both address row-cell r's
//                          window. Not allowed while busy.
//   rd_addr -> rd_data     digital read-out, one cycle later.
//   krc_sel                kernel word line (56 + krc_sel) to broadcast.
//   start_conv             run a full direct-convolution pass: 155 steps,
//                          one per cycle (controller description).
//   start_vmm              one compute step on the data as written, no
//                          movement (vector-matrix / IM2COL use).
//   step_move              movement of the step issued this cycle.
//   out_valid ...          results, two cycles after their step was issued
//                          (the first one three edges after the edge that
//                          samples start_conv), one step per cycle:
//                          per line the ADC code, the ideal line value
//                          out_cs (two's complement), the output row and a
//                          valid flag, and the
//                          output column; out_last marks a pass's final one.
// Image layout for a pass: row-cell r, window word = image rows 5r..5r+4,
// columns 0..4; 8T word w, byte (i, j) = image row (5r + 4h + i) mod 35 of
// column h + 4, with h = 5w + j + 1. Result (row t, column h) is
// sum_ij X[t+i][h+j] * K[i][j].
// The array organisation, phases, counts and ADCs follow the document; the
// pipeline timing, address map, image layout and ADC full scale are this
// design's own.
module systolic_ram_top #(
  parameter int K    = srm_pkg::K,
  parameter int N_RC = srm_pkg::N_RC,
  parameter int N_T8 = srm_pkg::N_T8,
  parameter int BW   = srm_pkg::BW,
  parameter int CS_W = srm_pkg::CS_W,
  parameter int ADC_BITS = srm_pkg::ADC_BITS,
  parameter int ADC_LSB_LOG2 = 16
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               wr_en,
  input  logic [5:0]                         wr_addr,
  input  logic [K*K*BW-1:0]                  wr_data,
  input  logic [5:0]                         rd_addr,
  output logic [K*K*BW-1:0]                  rd_data,
  input  logic [2:0]                         krc_sel,
  input  logic                               start_conv,
  input  logic                               start_vmm,
  output logic                               busy,
  output srm_pkg::move_e                     step_move,
  output logic                               out_valid,
  output logic                               out_vmm,
  output logic                               out_last,
  output logic [7:0]                         out_col,
  output logic [N_RC-1:0][7:0]               out_row,
  output logic [N_RC-1:0]                    out_line_valid,
  output logic [N_RC-1:0][ADC_BITS-1:0]      out_code,
  output logic [N_RC-1:0][CS_W-1:0]          out_cs
);

  localparam int W    = K * K * BW;
  localparam int NPIX = K * K;

  // ---------------- controller ----------------
  logic                     ctl_busy, ctl_compute, ctl_vmm, ctl_last;
  srm_pkg::move_e           ctl_move;
  logic [$clog2(N_T8)-1:0]  ctl_rwl;
  logic [2:0]               ctl_ladr;
  logic [7:0]               ctl_col;
  logic [N_RC-1:0][7:0]     ctl_row;
  logic [N_RC-1:0]          ctl_lvalid;

  srm_controller #(.K(K), .N_RC(N_RC), .N_T8(N_T8)) u_ctl (
    .clk, .rst_n, .start_conv, .start_vmm,
    .busy(ctl_busy), .move(ctl_move), .rwl(ctl_rwl), .local_adr(ctl_ladr),
    .compute(ctl_compute), .vmm(ctl_vmm), .last(ctl_last),
    .col(ctl_col), .row(ctl_row), .line_valid(ctl_lvalid)
  );

  assign step_move = ctl_move;

  // ---------------- activation row-cells (ring) ----------------
  logic [N_RC-1:0][W-1:0]    win, rc_rd;
  logic [N_RC-1:0][K*BW-1:0] vbus;

  for (genvar r = 0; r < N_RC; r++) begin : g_rc
    activation_row_cell #(.K(K), .BW(BW), .N_T8(N_T8)) u_rc (
      .clk, .rst_n,
      .phi1v(ctl_move == srm_pkg::MV_V),
      .phi1h(ctl_move == srm_pkg::MV_H),
      .rwl(ctl_rwl), .local_adr(ctl_ladr),
      .wr_en(wr_en && (32'(wr_addr[5:3]) == r)),
      .wr_wl(wr_addr[2:0]), .wr_data,
      .rd_wl(rd_addr[2:0]), .rd_data(rc_rd[r]),
      .vbus_in(vbus[(r + 1) % N_RC]), .vbus_out(vbus[r]),
      .win(win[r])
    );
  end

  // ---------------- kernel row-cell and broadcast ----------------
  logic [W-1:0]               kernel, krc_rd;
  logic [NPIX-1:0][BW-2:0]    v_dac;
  logic [NPIX-1:0]            bl_sign;

  kernel_row_cell #(.W(W), .N_WL(8)) u_krc (
    .clk, .rst_n,
    .wr_en(wr_en && (32'(wr_addr[5:3]) == N_RC)),
    .wr_wl(wr_addr[2:0]), .wr_data,
    .sel(krc_sel), .kernel,
    .rd_wl(rd_addr[2:0]), .rd_data(krc_rd)
  );

  // Compute stage: the step issued last cycle has moved its data and now
  // computes; the ring amplifiers are held in reset otherwise.
  logic                 c_compute, c_vmm, c_last;
  logic [7:0]           c_col;
  logic [N_RC-1:0][7:0] c_row;
  logic [N_RC-1:0]      c_lvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_compute <= 1'b0;
      c_vmm     <= 1'b0;
      c_last    <= 1'b0;
      c_col     <= '0;
      c_row     <= '0;
      c_lvalid  <= '0;
    end else begin
      c_compute <= ctl_compute;
      c_vmm     <= ctl_vmm;
      c_last    <= ctl_last;
      c_col     <= ctl_col;
      c_row     <= ctl_row;
      c_lvalid  <= ctl_lvalid;
    end
  end

  kernel_broadcast #(.NPIX(NPIX), .BW(BW)) u_bcast (
    .rst(!c_compute), .en_n(!c_compute), .krc_data(kernel),
    .v_dac, .bl_sign
  );

  // ---------------- charge-share lines and ADCs ----------------
  logic [N_RC-1:0][CS_W-1:0] cs;   // two's complement per line

  for (genvar r = 0; r < N_RC; r++) begin : g_line
    mdac_cs_line #(.NPIX(NPIX), .BW(BW), .CS_W(CS_W)) u_line (
      .act(win[r]), .v_dac, .bl_sign, .cs(cs[r])
    );
    flash_adc #(.CS_W(CS_W), .BITS(ADC_BITS), .LSB_LOG2(ADC_LSB_LOG2)) u_adc (
      .clk, .rst_n, .sample(c_compute), .cs(cs[r]), .code(out_code[r])
    );
  end

  // ---------------- output stage ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid      <= 1'b0;
      out_vmm        <= 1'b0;
      out_last       <= 1'b0;
      out_col        <= '0;
      out_row        <= '0;
      out_line_valid <= '0;
      out_cs         <= '0;
    end else begin
      out_valid      <= c_compute;
      out_vmm        <= c_vmm;
      out_last       <= c_last && c_compute;
      out_col        <= c_col;
      out_row        <= c_row;
      out_line_valid <= c_compute ? c_lvalid : '0;
      if (c_compute) out_cs <= cs;
    end
  end

  assign busy = ctl_busy || c_compute;

  // ---------------- digital read-out ----------------
  always_ff @(posedge clk) begin
    if (32'(rd_addr[5:3]) < N_RC) rd_data <= rc_rd[rd_addr[5:3]];
    else                          rd_data <= krc_rd;
  end

  a_no_write_busy: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && busy))
    else $error("systolic_ram_top: write while a pass is running");

endmodule
