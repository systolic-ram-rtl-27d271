// flash_adc: behavioural model (not synthesizable intent) of the 4-bit
// flash ADC that digitises one charge-share line.
//
// Fifteen comparators compare the line value `cs` with thresholds
// (k - 8) * 2^LSB_LOG2 for k = 1..15; the thermometer code is counted into
// a 4-bit code, so code = clamp(floor(cs / 2^LSB_LOG2) + 8, 0, 15) and an
// input of zero gives code 8. The comparators are latched on the rising
// clock edge when `sample` is high; `code` holds its value otherwise and is
// 8 after reset. The 4-bit flash type and its one-per-line count are the
// document's; the thresholds and the full scale (LSB_LOG2 = 16, so
// +-524288 covers the largest possible sum) are this model's choice.
module flash_adc #(
  parameter int CS_W     = srm_pkg::CS_W,
  parameter int BITS     = srm_pkg::ADC_BITS,
  parameter int LSB_LOG2 = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   sample,
  input  logic signed [CS_W-1:0] cs,
  output logic [BITS-1:0]        code
);

  localparam int NCMP = (1 << BITS) - 1;
  localparam int MID  = 1 << (BITS - 1);

  logic [NCMP-1:0] therm;
  logic [BITS-1:0] count;

  always_comb begin
    for (int k = 1; k <= NCMP; k++)
      therm[k-1] = (int'(cs) >= ((k - MID) * (1 << LSB_LOG2)));
    count = '0;
    for (int k = 0; k < NCMP; k++) count += BITS'(therm[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      code <= BITS'(MID);
    else if (sample) code <= count;
  end

endmodule
