// rx_controller - frame timing of the receiver.
//
// Keeps the position (row 0..8, col 0..ROW_BITS-1) of the word now at the
// output of the frame synchronizer. When the synchronizer reports a frame
// found (sof, with the first A2A2 word, word A2_WORD of row 0), the
// position is set to that word; otherwise it counts on, wrapping after the
// last word of a frame. row/col are valid in the same cycle as sof. exp_a2
// tells the synchronizer that the word it registers next should be the
// first A2A2 word. frame_last marks the last word of a frame.
// The document assigns frame timing to the Rx controller; the counter form
// is this design's.
module rx_controller
  import sdh_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sof,
  output logic [3:0]  row,
  output logic [11:0] col,
  output logic        exp_a2,
  output logic        frame_last
);

  logic [3:0]  row_q;
  logic [11:0] col_q;

  always_comb begin
    row        = sof ? 4'd0 : row_q;
    col        = sof ? 12'(A2_WORD) : col_q;
    exp_a2     = (row == 4'd0) && (col == 12'(A2_WORD - 1));
    frame_last = (row == 4'(ROWS - 1)) && (col == 12'(ROW_BITS - 1));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      row_q <= '0;
      col_q <= '0;
    end else if (col == 12'(ROW_BITS - 1)) begin
      col_q <= '0;
      row_q <= (row == 4'(ROWS - 1)) ? 4'd0 : row + 4'd1;
    end else begin
      col_q <= col + 12'd1;
      row_q <= row;
    end

endmodule
