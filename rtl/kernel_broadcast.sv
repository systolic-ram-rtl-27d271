// kernel_broadcast: behavioural model (not synthesizable intent) of the
// BEOL DACs and the 25 ring amplifiers that broadcast the kernel as analog
// differential bit-line voltages.
//
// For each of the 25 kernel bytes, the BEOL DAC converts the magnitude
// (KRC data bits 7:1) into a voltage and the ring amplifier drives it onto
// the bit lines BL/BLB of that byte column; the sign bit (KRC data bit 0)
// travels as the digital level on BL[0]. In the model a voltage is an
// integer in units of one DAC step: `v_dac` is the differential level
// (BL - BLB)/2 above half supply, so 0..127.
// While `rst` is high (the phi1 half cycle, when the ring amplifier's
// inverters are shorted) or the DAC is disabled (`en_n` high) both lines sit
// at half supply: level 0 and sign 0. Zero delay; the outputs follow the
// inputs combinationally. Non-idealities (attenuation, noise, finite
// settling) are not modelled. The reset-to-half-supply behaviour and the
// signal names come from the document's schematic; the integer scale is
// this model's own.
module kernel_broadcast #(
  parameter int NPIX = srm_pkg::NPIX,
  parameter int BW   = srm_pkg::BW
) (
  input  logic                           rst,
  input  logic                           en_n,
  input  logic [NPIX*BW-1:0]             krc_data,
  output logic [NPIX-1:0][BW-2:0]        v_dac,
  output logic [NPIX-1:0]                bl_sign
);

  always_comb begin
    for (int p = 0; p < NPIX; p++) begin
      if (rst || en_n) begin
        v_dac[p]   = '0;
        bl_sign[p] = 1'b0;
      end else begin
        v_dac[p]   = krc_data[p*BW+1 +: BW-1];
        bl_sign[p] = krc_data[p*BW];
      end
    end
  end

endmodule
