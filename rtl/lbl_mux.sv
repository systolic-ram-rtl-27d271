// lbl_mux: the local-bit-line multiplexers that feed the horizontal stride.
//
// For every window row i the multiplexer picks one of the K bytes that the
// 8T read put on that row's local bit lines, byte (i, local_adr), and hands
// it to the B6T window as the new pixel of column K-1. `local_adr` is the
// 3-bit LOCAL_ADR address of the document; values of K and above select
// nothing and give zero (asserted never to happen while `en` is high).
// Purely combinational. The document gives the address name and width and
// shows a multiplexer reaching nearby local bit lines; the grouping of the
// K candidate bytes by window row is this design's choice.
module lbl_mux #(
  parameter int K  = srm_pkg::K,
  parameter int BW = srm_pkg::BW
) (
  input  logic                en,
  input  logic [K*K*BW-1:0]   lbl,
  input  logic [2:0]          local_adr,
  output logic [K*BW-1:0]     hins
);

  always_comb begin
    hins = '0;
    for (int i = 0; i < K; i++) begin
      for (int j = 0; j < K; j++) begin
        if (32'(local_adr) == j) hins[i*BW +: BW] = lbl[(K*i + j)*BW +: BW];
      end
    end
  end

  always_comb begin
    if (en) a_adr_range: assert (32'(local_adr) < K)
      else $error("lbl_mux: LOCAL_ADR out of range");
  end

endmodule
