// dac_model: behavioural model of the output digital-to-analog converter.
//
// This is a behavioural model, not synthesizable logic: the DAC is an
// analog part outside the FPGA that turns the digital QPSK samples into a
// voltage for an oscilloscope. The model is an ideal unipolar converter,
//     vout = VREF * code / (2^WIDTH - 1)
// rounded down to whole microvolts, that follows its input after a
// settling delay of T_SETTLE time units. The voltage is carried as an
// integer number of microvolts so that the model stays within integer
// types. Resolution, reference voltage and delay are not taken from any
// part's data sheet; they are this model's choices.
//
// Interface: code (offset-binary sample) in, vout_uv (microvolts) out.
module dac_model #(
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned VREF_UV  = 3_300_000,
  parameter int unsigned T_SETTLE = 1
) (
  input  logic [WIDTH-1:0] code,
  output logic [31:0]      vout_uv
);

  localparam logic [63:0] FULL_SCALE = (64'd1 << WIDTH) - 64'd1;

  assign #(T_SETTLE) vout_uv = 32'((64'(VREF_UV) * 64'(code)) / FULL_SCALE);

endmodule
