// output_fifo - receiver output FIFO towards the back-end electronics.
//
// Synchronous show-ahead FIFO of DEPTH entries of WIDTH bits (12 payload
// bits and a start-of-frame flag). A write while full is dropped and pulses
// overflow. dout/valid show the oldest entry; it leaves when ready is high.
// The document names the output FIFO; width, depth and handshake are this
// design's choices.
module output_fifo #(
  parameter int unsigned WIDTH = 13,
  parameter int unsigned DEPTH = 512
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  output logic             valid,
  input  logic             ready,
  output logic             full,
  output logic             overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;
  logic             push, pop;

  assign full  = (wp - rp) == (AW+1)'(DEPTH);
  assign valid = (wp != rp);
  assign push  = wr && !full;
  assign pop   = valid && ready;
  assign dout  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) if (push) mem[wp[AW-1:0]] <= din;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      overflow <= 1'b0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      overflow <= wr && full;
    end

  initial assert (DEPTH == (1 << AW)) else $error("DEPTH must be a power of two");

endmodule
