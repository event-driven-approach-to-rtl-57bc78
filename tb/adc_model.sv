// adc_model: behavioural model of one serial ADC as the adc_if driver expects
// it (not synthesizable logic, testbench use only). On the rising edge of
// conv the input value is captured; the model then presents LEAD zero bits
// followed by the NBITS-bit two's-complement result, MSB first, with a new
// bit after every falling edge of sclk.
module adc_model #(
  parameter int NBITS = 12,
  parameter int LEAD  = 2
) (
  input  logic                    conv,
  input  logic                    sclk,
  input  logic signed [NBITS-1:0] sample,
  output logic                    sdo
);
  logic [LEAD+NBITS-1:0] sh = '0;
  assign sdo = sh[LEAD+NBITS-1];
  always @(posedge conv) sh <= {{LEAD{1'b0}}, sample};
  always @(negedge sclk) sh <= {sh[LEAD+NBITS-2:0], 1'b0};
endmodule
