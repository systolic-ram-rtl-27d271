// srm_controller: sequencer for the data-movement (phi1) and compute (phi2)
// phases of a Systolic-RAM direct-convolution pass.
//
// Every cycle of a pass is one step: a phi1 movement followed by a phi2
// compute. For a padded image of RING_H = K*N_RC rows (35) by
// K + N_T8*K columns (35) the pass visits N_HSTEP = 31 kernel columns; at
// each it computes K = 5 vertical positions. The first position of a
// column is reached by a horizontal stride (phi1H; none for column 0) and
// the other four by vertical strides (phi1V), so 4 of 5 moves are vertical
// and 1 of 5 horizontal, and a pass takes 31 * 5 = 155 cycles.
//
// Vertical strides rotate the 35 activation rows held by the seven
// row-cells one row further round the ring, so the window of row-cell r
// starts at image row (K*r + off) mod RING_H, where `off` counts vertical
// strides. A window is valid when it does not wrap past the last row, which
// gives 31 valid outputs per column (7 + 6 + 6 + 6 + 6). Horizontal stride h
// (1..30) reads 8T word line (h-1)/K at local address (h-1) mod K.
//
// start_conv begins a pass, start_vmm issues one compute step without any
// movement (the array used as a plain 25 x 7 vector-matrix multiplier);
// both are ignored while busy. Step outputs are combinational from the
// state and describe the current cycle: `move`, `rwl`, `local_adr`,
// `compute`, and the tags of the outputs this compute produces (`col`,
// `row[r]`, `line_valid[r]`), with `last` on the final step.
// The 155-cycle count, the 80/20 split of vertical and horizontal moves and
// the 31x31 output come from the document; the ring rotation, the tag
// formula and the 8T address order are this design's reading of them.
module srm_controller #(
  parameter int K    = srm_pkg::K,
  parameter int N_RC = srm_pkg::N_RC,
  parameter int N_T8 = srm_pkg::N_T8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start_conv,
  input  logic                         start_vmm,
  output logic                         busy,
  output srm_pkg::move_e                        move,
  output logic [$clog2(N_T8)-1:0]      rwl,
  output logic [2:0]                   local_adr,
  output logic                         compute,
  output logic                         vmm,
  output logic                         last,
  output logic [7:0]                   col,
  output logic [N_RC-1:0][7:0]         row,
  output logic [N_RC-1:0]              line_valid
);

  localparam int RH  = K * N_RC;
  localparam int NH  = 1 + N_T8 * K;
  localparam int OFW = $clog2(RH);

  typedef enum logic [1:0] {S_IDLE, S_CONV, S_VMM} state_e;

  state_e                   state_q;
  logic [7:0]               h_q;          // kernel column of this step
  logic [2:0]               s_q;          // vertical position within the column
  logic [OFW-1:0]           off_q;        // ring offset before this step's move
  logic [OFW-1:0]           off_now;      // ring offset seen by this step's compute
  logic [$clog2(N_T8)-1:0]  hw_q;         // 8T word line of the next insertion
  logic [2:0]               hj_q;         // local address of the next insertion

  assign busy    = (state_q != S_IDLE);
  assign compute = busy;
  assign vmm     = (state_q == S_VMM);

  always_comb begin
    move = srm_pkg::MV_NONE;
    if (state_q == S_CONV) begin
      if (s_q != 3'd0)      move = srm_pkg::MV_V;
      else if (h_q != 8'd0) move = srm_pkg::MV_H;
    end
  end

  assign off_now   = (move == srm_pkg::MV_V) ? ((off_q == OFW'(RH - 1)) ? '0 : off_q + 1'b1) : off_q;
  assign rwl       = hw_q;
  assign local_adr = hj_q;
  assign last      = (state_q == S_VMM) ||
                     (state_q == S_CONV && h_q == 8'(NH - 1) && s_q == 3'(K - 1));
  assign col       = (state_q == S_CONV) ? h_q : 8'd0;

  always_comb begin
    for (int r = 0; r < N_RC; r++) begin
      int t;
      t = K * r + int'(off_now);
      if (t >= RH) t -= RH;
      row[r]        = 8'(t);
      line_valid[r] = (state_q == S_VMM) || (state_q == S_CONV && t <= RH - K);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      h_q     <= '0;
      s_q     <= '0;
      off_q   <= '0;
      hw_q    <= '0;
      hj_q    <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          h_q   <= '0;
          s_q   <= '0;
          off_q <= '0;
          hw_q  <= '0;
          hj_q  <= '0;
          if (start_conv)     state_q <= S_CONV;
          else if (start_vmm) state_q <= S_VMM;
        end
        S_VMM: state_q <= S_IDLE;
        S_CONV: begin
          off_q <= off_now;
          if (move == srm_pkg::MV_H) begin
            if (hj_q == 3'(K - 1)) begin
              hj_q <= '0;
              hw_q <= hw_q + 1'b1;
            end else begin
              hj_q <= hj_q + 1'b1;
            end
          end
          if (s_q == 3'(K - 1)) begin
            s_q <= '0;
            h_q <= h_q + 1'b1;
            if (h_q == 8'(NH - 1)) state_q <= S_IDLE;
          end else begin
            s_q <= s_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
