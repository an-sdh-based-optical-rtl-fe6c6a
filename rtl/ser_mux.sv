// ser_mux - parallel-to-serial multiplexer IN_W:OUT_W between two clocks of
// the same source, the fast one IN_W/OUT_W times the slow one. Used as the
// 16:4 stage (155.52 -> 622.08 MHz) and the 4:1 stage (622.08 MHz ->
// 2.488 GHz) of the transmitter.
//
// The slow side registers din and flips a toggle flag every slow cycle. The
// fast side sees the flag change two fast cycles later, loads the word into
// its shift register and sends it OUT_W bits per fast cycle, most
// significant bits first. Latency is constant, 3 fast cycles after the slow
// edge; every word is sent exactly once because one slow cycle spans
// IN_W/OUT_W fast cycles. The toggle transfer is this design's choice; the
// document gives only the two multiplexing stages.
module ser_mux #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 4
) (
  input  logic             clk_slow,
  input  logic             clk_fast,
  input  logic             rst_n,
  input  logic [IN_W-1:0]  din,
  output logic [OUT_W-1:0] dout
);

  logic [IN_W-1:0] din_q, sh;
  logic            tog, tog_f, tog_seen;

  always_ff @(posedge clk_slow or negedge rst_n)
    if (!rst_n) begin
      din_q <= '0;
      tog   <= 1'b0;
    end else begin
      din_q <= din;
      tog   <= ~tog;
    end

  always_ff @(posedge clk_fast or negedge rst_n)
    if (!rst_n) begin
      tog_f    <= 1'b0;
      tog_seen <= 1'b0;
      sh       <= '0;
    end else begin
      tog_f <= tog;
      if (tog_f != tog_seen) begin
        tog_seen <= tog_f;
        sh       <= din_q;
      end else begin
        sh <= sh << OUT_W;
      end
    end

  assign dout = sh[IN_W-1 -: OUT_W];

  initial assert (IN_W % OUT_W == 0 && IN_W / OUT_W >= 3)
    else $error("IN_W must be a multiple of OUT_W, ratio at least 3");

endmodule
