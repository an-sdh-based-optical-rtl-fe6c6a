// des_demux - serial-to-parallel demultiplexer IN_W:OUT_W between two clocks
// of the same source (the slow one OUT_W/IN_W times slower). Used as the
// 1:4 stage (2.488 GHz -> 622.08 MHz, part of the CDR component in the
// document) and the 4:16 stage (622.08 -> 155.52 MHz) of the receiver.
//
// The fast side shifts IN_W bits per cycle into a shift register, first
// bits ending up at the top, and every OUT_W/IN_W cycles copies it to a
// holding register; the slow side registers that. Where the word boundary
// falls is arbitrary: the frame synchronizer rotates the lanes afterwards.
module des_demux #(
  parameter int unsigned IN_W  = 4,
  parameter int unsigned OUT_W = 16
) (
  input  logic             clk_fast,
  input  logic             clk_slow,
  input  logic             rst_n,
  input  logic [IN_W-1:0]  din,
  output logic [OUT_W-1:0] dout
);

  localparam int unsigned R  = OUT_W / IN_W;
  localparam int unsigned CW = $clog2(R);

  logic [OUT_W-1:0] sh, hold, sh_next;
  logic [CW-1:0]    cnt;

  assign sh_next = {sh[OUT_W-IN_W-1:0], din};

  always_ff @(posedge clk_fast or negedge rst_n)
    if (!rst_n) begin
      sh   <= '0;
      hold <= '0;
      cnt  <= '0;
    end else begin
      sh  <= sh_next;
      cnt <= (cnt == CW'(R - 1)) ? '0 : cnt + 1'b1;
      if (cnt == CW'(R - 1)) hold <= sh_next;
    end

  always_ff @(posedge clk_slow or negedge rst_n)
    if (!rst_n) dout <= '0;
    else        dout <= hold;

  initial assert (OUT_W % IN_W == 0 && R >= 2) else $error("OUT_W must be a multiple of IN_W");

endmodule
