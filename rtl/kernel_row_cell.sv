// kernel_row_cell: the eighth row-cell (word lines 56..63), which stores
// kernels and presents one of them to the ring-amplifier broadcast.
//
// Eight 200-bit words, each a full 5x5 kernel of sign-magnitude bytes
// (byte p = K*i + j is kernel element K[i][j]). Writes go through the bit
// lines on the rising edge. `sel` chooses the word that drives the BEOL
// DACs (KRC data) and is registered at the rising edge, so a new selection
// reaches `kernel` one cycle later; `rd_wl`/`rd_data` is a combinational
// digital read-out. The document places the kernel in this row-cell and
// broadcasts it; holding up to eight kernels and the registered select are
// this design's choices.
module kernel_row_cell #(
  parameter int W    = srm_pkg::WORD_W,
  parameter int N_WL = srm_pkg::N_WL
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    wr_en,
  input  logic [$clog2(N_WL)-1:0] wr_wl,
  input  logic [W-1:0]            wr_data,
  input  logic [$clog2(N_WL)-1:0] sel,
  output logic [W-1:0]            kernel,
  input  logic [$clog2(N_WL)-1:0] rd_wl,
  output logic [W-1:0]            rd_data
);

  logic [W-1:0]            mem [N_WL];
  logic [$clog2(N_WL)-1:0] sel_q;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_wl] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel_q <= '0;
    else        sel_q <= sel;
  end

  assign kernel  = mem[sel_q];
  assign rd_data = mem[rd_wl];

endmodule
