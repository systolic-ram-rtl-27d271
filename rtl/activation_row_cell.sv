// activation_row_cell: one of the seven activation row-cells (eight word
// lines x 200 bit lines) under one charge-share line.
//
// It joins the B6T window (word lines 0 and 1, the buffered pair that moves
// data), the six 8T word lines (word lines 2..7) that store later image
// columns, and the local-bit-line multiplexers between them.
//   phi1v          vertical stride: window rows shift up; the top row leaves
//                  on vbus_out, the bottom row arrives on vbus_in.
//   phi1h          horizontal stride: columns shift left; the new column is
//                  read from 8T word line `rwl` (0..5 = WWL 2..7) and byte
//                  `local_adr` of each window row's 5-byte group.
//   wr_en/wr_wl    digital write of word line wr_wl (0..7); word lines 0 and
//                  1 both write the B6T window.
//   rd_wl/rd_data  digital read-out of word line rd_wl (combinational).
//   win            the 25 window bytes seen by this row-cell's MDACs.
// Moves and writes take effect at the rising edge. The split of word lines
// follows the document (2 B6T + 6 8T); mapping both B6T word lines onto one
// register stage is this design's choice.
module activation_row_cell #(
  parameter int K    = srm_pkg::K,
  parameter int BW   = srm_pkg::BW,
  parameter int N_T8 = srm_pkg::N_T8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    phi1v,
  input  logic                    phi1h,
  input  logic [$clog2(N_T8)-1:0] rwl,
  input  logic [2:0]              local_adr,
  input  logic                    wr_en,
  input  logic [2:0]              wr_wl,
  input  logic [K*K*BW-1:0]       wr_data,
  input  logic [2:0]              rd_wl,
  output logic [K*K*BW-1:0]       rd_data,
  input  logic [K*BW-1:0]         vbus_in,
  output logic [K*BW-1:0]         vbus_out,
  output logic [K*K*BW-1:0]       win
);

  localparam int W = K * K * BW;
  localparam int AW = $clog2(N_T8);

  logic          wr_b6t, wr_8t;
  logic [AW-1:0] wr_t8_wl, rd_t8_wl;
  logic [W-1:0]  lbl, t8_rd;
  logic [K*BW-1:0] hins;

  assign wr_b6t   = wr_en && (wr_wl < 3'd2);
  assign wr_8t    = wr_en && (wr_wl >= 3'd2);
  assign wr_t8_wl = AW'(wr_wl - 3'd2);
  assign rd_t8_wl = AW'(rd_wl - 3'd2);

  b6t_window #(.K(K), .BW(BW)) u_b6t (
    .clk, .rst_n, .phi1v, .phi1h,
    .wr_en(wr_b6t), .wr_data,
    .vbus_in, .hins_in(hins), .win, .vbus_out
  );

  sram_8t_bank #(.W(W), .N_T8(N_T8)) u_8t (
    .clk, .wr_en(wr_8t), .wr_wl(wr_t8_wl), .wr_data,
    .rwl_en(phi1h), .rwl, .lbl,
    .bl_rd_wl(rd_t8_wl), .bl_rd_data(t8_rd)
  );

  lbl_mux #(.K(K), .BW(BW)) u_mux (
    .en(phi1h), .lbl, .local_adr, .hins
  );

  assign rd_data = (rd_wl < 3'd2) ? win : t8_rd;

endmodule
