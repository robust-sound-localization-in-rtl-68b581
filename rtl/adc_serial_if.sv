// adc_serial_if: reads one 8-bit sample from each of the two serial ADCs at
// the sampling rate, 20 kHz in the document.
//
// Every CLKS_PER_SAMPLE clocks the interface lowers adc_cs_n and drives
// SAMPLE_W pulses on adc_sclk (SCLK_HALF clocks high, SCLK_HALF low); both
// ADCs shift their result out MSB first, changing data after a falling edge,
// and the bits are taken on each rising edge. After the last bit adc_cs_n
// rises and sample_valid pulses for one clock with both samples. The ADC
// codes are offset binary and are returned as two's complement. The document
// says only that serial data is read from each ADC; the framing, the shared
// clock and select, and the code format are this design's assumptions.
// Default timing assumes a 16 MHz clock (800 clocks per 20 kHz sample,
// 1 MHz serial clock).
module adc_serial_if
  import tdoa_pkg::*;
#(
  parameter int unsigned CLKS_PER_SAMPLE = 800,
  parameter int unsigned SCLK_HALF       = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  output logic                       adc_cs_n,
  output logic                       adc_sclk,
  input  logic [1:0]                 adc_sdata,
  output logic                       sample_valid,
  output logic signed [SAMPLE_W-1:0] sample1,
  output logic signed [SAMPLE_W-1:0] sample2
);
  localparam int unsigned TW = $clog2(CLKS_PER_SAMPLE);
  localparam int unsigned HW = $clog2(SCLK_HALF + 1);

  logic [TW-1:0]       tick;
  logic [HW-1:0]       div;
  logic [3:0]          nbits;
  logic [SAMPLE_W-1:0] sh1, sh2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick         <= '0;
      div          <= '0;
      nbits        <= '0;
      adc_cs_n     <= 1'b1;
      adc_sclk     <= 1'b0;
      sh1          <= '0;
      sh2          <= '0;
      sample_valid <= 1'b0;
      sample1      <= '0;
      sample2      <= '0;
    end else begin
      sample_valid <= 1'b0;
      tick <= (32'(tick) == CLKS_PER_SAMPLE - 1) ? '0 : tick + 1'b1;
      if (tick == '0) begin
        adc_cs_n <= 1'b0;
        adc_sclk <= 1'b0;
        div      <= '0;
        nbits    <= '0;
      end else if (!adc_cs_n) begin
        if (32'(div) == SCLK_HALF - 1) begin
          div <= '0;
          if (!adc_sclk) begin
            if (32'(nbits) == SAMPLE_W) begin
              // frame complete: release the ADCs, deliver both samples
              adc_cs_n     <= 1'b1;
              sample_valid <= 1'b1;
              sample1      <= {~sh1[SAMPLE_W-1], sh1[SAMPLE_W-2:0]};
              sample2      <= {~sh2[SAMPLE_W-1], sh2[SAMPLE_W-2:0]};
            end else begin
              adc_sclk <= 1'b1;                     // rising edge: take a bit
              sh1      <= {sh1[SAMPLE_W-2:0], adc_sdata[0]};
              sh2      <= {sh2[SAMPLE_W-2:0], adc_sdata[1]};
              nbits    <= nbits + 1'b1;
            end
          end else begin
            adc_sclk <= 1'b0;
          end
        end else begin
          div <= div + 1'b1;
        end
      end
    end
  end
endmodule
