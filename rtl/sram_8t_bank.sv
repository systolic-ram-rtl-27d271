// sram_8t_bank: the 8T SRAM cells of one activation row-cell (six word lines
// of 200 bits), which hold the image columns not yet inside the window.
//
// Write: one word per cycle through the bit lines (wr_en, wr_wl, wr_data),
// on the rising clock edge.
// Read port 1 (local bit lines): with rwl_en high, the word on read word
// line `rwl` appears on `lbl` in the same cycle, as the decoupled 8T read
// stack pulls the reset local bit lines; with rwl_en low the local bit lines
// rest in their reset state, modelled as all zeros. The phi1H move latches
// `lbl` into the B6T window at the end of the cycle.
// Read port 2 (bit lines): `bl_rd_data` shows word `bl_rd_wl`, for digital
// read-out.
// The six-cell count and the RWL/LBL read path follow the document; the
// zero rest value of the local bit lines and the second read port are this
// design's choices. The cells are not reset.
module sram_8t_bank #(
  parameter int W    = srm_pkg::WORD_W,
  parameter int N_T8 = srm_pkg::N_T8
) (
  input  logic                    clk,
  input  logic                    wr_en,
  input  logic [$clog2(N_T8)-1:0] wr_wl,
  input  logic [W-1:0]            wr_data,
  input  logic                    rwl_en,
  input  logic [$clog2(N_T8)-1:0] rwl,
  output logic [W-1:0]            lbl,
  input  logic [$clog2(N_T8)-1:0] bl_rd_wl,
  output logic [W-1:0]            bl_rd_data
);

  logic [W-1:0] mem [N_T8];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_wl] <= wr_data;
  end

  assign lbl        = rwl_en ? mem[rwl] : '0;
  assign bl_rd_data = mem[bl_rd_wl];

endmodule
