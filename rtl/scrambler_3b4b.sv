// scrambler_3b4b - parallel 3b/4b line coder (12 channel bits -> 16 lanes).
//
// Four coders work side by side, each on three channel bits per 155.52 MHz
// cycle, using the document's table of eight 4-baud words. The words are
// chosen so that ones and zeros are balanced on average and no more than four
// equal bits follow each other on the line. Coder k takes channels 3k+2..3k
// (channel 3k+2 as the left input bit) and drives lanes 4k+3..4k (left
// output bit on lane 4k+3, sent first). The output is registered: one cycle
// of latency. The channel and lane assignment is this design's choice.
module scrambler_3b4b
  import sdh_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_CH-1:0]   din,
  output logic [N_LANE-1:0] dout
);

  logic [N_LANE-1:0] coded;

  always_comb
    for (int k = 0; k < N_CODER; k++)
      coded[4*k +: 4] = enc3b4b(din[3*k +: 3]);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dout <= '0;
    else        dout <= coded;

endmodule
