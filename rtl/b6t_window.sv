// b6t_window: the buffered-6T (B6T) systolic datapath of one activation
// row-cell, holding the 5x5 pixel window that the row-cell's MDACs multiply.
//
// Each bit column has a pair of B6T cells chained through buffers; the pair
// acts as a master/slave stage, so here each window byte is one register
// (the slave cell is the transfer latch and holds no separate word).
// Byte p = K*i + j of `win` is window row i, window column j.
//
//   phi1v  vertical stride: window rows move up by one (row i <- row i+1);
//          row 0 leaves on `vbus_out` and row K-1 is loaded from `vbus_in`,
//          the 40-bit systolic bus from the neighbouring row-cell.
//   phi1h  horizontal stride: window columns move left by one
//          (column j <- column j+1); column K-1 is loaded from `hins_in`,
//          byte i feeding window row i (data read from the 8T cells).
//   wr_en  digital write of the whole window through the bit lines.
//
// All three act on the rising clock edge, at most one per cycle (asserted).
// The window is cleared by reset. The vertical and horizontal moves follow
// the document; the left/up directions and the register view of the B6T
// pair are this design's choice.
module b6t_window #(
  parameter int K  = srm_pkg::K,
  parameter int BW = srm_pkg::BW
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                phi1v,
  input  logic                phi1h,
  input  logic                wr_en,
  input  logic [K*K*BW-1:0]   wr_data,
  input  logic [K*BW-1:0]     vbus_in,
  input  logic [K*BW-1:0]     hins_in,
  output logic [K*K*BW-1:0]   win,
  output logic [K*BW-1:0]     vbus_out
);

  logic [K-1:0][K-1:0][BW-1:0] cell_q, cell_d;   // [row][col][bit]

  always_comb begin
    cell_d = cell_q;
    if (wr_en) begin
      cell_d = wr_data;
    end else if (phi1v) begin
      for (int i = 0; i < K - 1; i++) cell_d[i] = cell_q[i+1];
      cell_d[K-1] = vbus_in;
    end else if (phi1h) begin
      for (int i = 0; i < K; i++) begin
        for (int j = 0; j < K - 1; j++) cell_d[i][j] = cell_q[i][j+1];
        cell_d[i][K-1] = hins_in[i*BW +: BW];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cell_q <= '0;
    else        cell_q <= cell_d;
  end

  assign win      = cell_q;
  assign vbus_out = cell_q[0];

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({phi1v, phi1h, wr_en}))
    else $error("b6t_window: more than one of phi1v, phi1h, wr_en in one cycle");

endmodule
