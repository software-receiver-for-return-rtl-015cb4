// Software-controlled input switch: routes any of N_IN digitized upstream
// spectra (ADC input ports) to each of N_CH digital front ends. Each output is
// a registered N_IN-to-1 multiplexer steered by its own select field, which the
// controlling processor writes. The crossbar function follows the receiver
// description; the multiplexer structure and the output register are this
// design's choice.
//
// Timing: out_data[j] = in_data[sel[j]] one clock after the inputs.
module input_switch #(
  parameter int N_IN = 4,
  parameter int N_CH = 16,
  parameter int W    = 10,
  localparam int SW  = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] in_data  [N_IN],
  input  logic [SW-1:0]       sel      [N_CH],
  output logic signed [W-1:0] out_data [N_CH]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N_CH; j++) out_data[j] <= '0;
    end else begin
      for (int j = 0; j < N_CH; j++)
        out_data[j] <= (int'(sel[j]) < N_IN) ? in_data[sel[j]] : '0;
    end
  end

endmodule
