// descrambler_4b3b - four parallel 4b/3b decoders (16 lanes -> 12 channels).
//
// Lanes 4k+3..4k go back to channels 3k+2..3k, the inverse of the
// transmitter's coder. A 4-baud word that is not one of the eight in the
// code table was corrupted on the line; viol[k] flags it and the channels
// then read 000. Registered, one cycle of latency. The code table is the
// document's; the invalid-word handling is this design's choice.
module descrambler_4b3b
  import sdh_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_LANE-1:0]  din,
  output logic [N_CH-1:0]    dout,
  output logic [N_CODER-1:0] viol
);

  dec_t dec [N_CODER];

  always_comb
    for (int k = 0; k < N_CODER; k++) dec[k] = dec4b3b(din[4*k +: 4]);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dout <= '0;
      viol <= '0;
    end else begin
      for (int k = 0; k < N_CODER; k++) begin
        dout[3*k +: 3] <= dec[k].d;
        viol[k]        <= dec[k].bad;
      end
    end

endmodule
