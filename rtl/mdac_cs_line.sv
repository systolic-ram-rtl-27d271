// mdac_cs_line: behavioural model (not synthesizable intent) of one row of
// 25 BEOL C2C-ladder MDACs sharing charge on one differential charge-share
// (CS+/CS-) line.
//
// MDAC p multiplies its activation byte (sign-magnitude, from the bit cells
// under it) by the broadcast kernel level of byte column p. Each magnitude
// bit n (1..7) switches its ladder input to the broadcast bit line, and the
// C2C ladder weighs input n by 2^(n-1); a clear bit contributes nothing.
// The output polarity is the XOR of the activation sign (data bit 0) and the
// kernel sign (BL[0]). Charge sharing sums the 25 products; `cs` is that
// sum in units of one (activation LSB x DAC step), an ideal signed value
// from -403225 to +403225. Combinational, zero delay. Attenuation, the
// nonlinearity removed by notch tuning, noise and the division of charge
// sharing by the line capacitance are not modelled. The XOR sign rule and
// the binary ladder follow the document; the zero contribution of a clear
// bit is this model's own.
module mdac_cs_line #(
  parameter int NPIX = srm_pkg::NPIX,
  parameter int BW   = srm_pkg::BW,
  parameter int CS_W = srm_pkg::CS_W
) (
  input  logic [NPIX*BW-1:0]        act,
  input  logic [NPIX-1:0][BW-2:0]   v_dac,
  input  logic [NPIX-1:0]           bl_sign,
  output logic signed [CS_W-1:0]    cs
);

  always_comb begin
    int acc;
    int q;
    acc = 0;
    for (int p = 0; p < NPIX; p++) begin
      q = 0;
      for (int n = 1; n < BW; n++) begin
        if (act[p*BW + n]) q += int'(v_dac[p]) << (n - 1);
      end
      acc += (act[p*BW] ^ bl_sign[p]) ? -q : q;
    end
    cs = CS_W'(acc);
  end

endmodule
