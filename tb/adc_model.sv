// adc_model: behavioural model of one 8-bit serial ADC for the testbenches.
// When cs_n falls it takes `code` (offset binary) and drives its MSB on sdata;
// after each falling edge of sclk it drives the next bit.
module adc_model (
  input  logic       cs_n,
  input  logic       sclk,
  input  logic [7:0] code,
  output logic       sdata
);
  logic [7:0] sh = '0;

  assign sdata = sh[7];

  always @(negedge cs_n) sh = code;
  always @(negedge sclk) if (!cs_n) sh = {sh[6:0], 1'b0};
endmodule
