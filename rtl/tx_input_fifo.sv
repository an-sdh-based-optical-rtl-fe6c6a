// tx_input_fifo - dynamic input FIFO of one transmitter channel.
//
// Two shift registers of PAY_BITS bits, as in the document: SR1 takes one
// data bit in every interface slot (wr), shifting in at the LSB. Once SR1
// holds a full row (load, from the controller) its content is copied in
// parallel into SR2, and SR1 starts over. SR2 is shifted out MSB first while
// rd is high (the payload part of the row, at the STM-1 rate), so bits leave
// in the order they came. dout is the MSB of SR2, valid in the same cycle.
// Writes and the load must not coincide (the controller's gap slot falls on
// the load cycle); an assertion checks this. Lint tools may note that rst_n
// is used both as an asynchronous reset and synchronously: the synchronous
// use is only that assertion's disable condition, not a circuit.
module tx_input_fifo
  import sdh_pkg::*;
#(
  parameter int unsigned PAY = PAY_BITS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wr,
  input  logic din,
  input  logic load,
  input  logic rd,
  output logic dout
);

  logic [PAY-1:0] sr1, sr2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr1 <= '0;
      sr2 <= '0;
    end else begin
      if (wr) sr1 <= {sr1[PAY-2:0], din};
      if (load)    sr2 <= sr1;
      else if (rd) sr2 <= {sr2[PAY-2:0], 1'b0};
    end
  end

  assign dout = sr2[PAY-1];

  a_no_write_on_load: assert property (@(posedge clk) disable iff (!rst_n) !(wr && load))
    else $error("write during SR1->SR2 load");

endmodule
