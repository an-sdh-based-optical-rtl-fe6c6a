// sdh_rx - receiver logic after the 4:16 demultiplexer, at the recovered
// 155.52 MHz clock.
//
// frame_sync finds the framing pattern and rotates the 16 lanes into the
// transmitter's order; rx_controller keeps the frame position; the 4b/3b
// decoder restores the 12 channels; soh_evaluation checks the SOH, builds
// the transmission protocol and writes the payload of data frames into the
// output FIFO, read by the back end with out_valid/out_ready. Position and
// aligned word are delayed one cycle to stay aligned with the decoder
// output.
module sdh_rx
  import sdh_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_LANE-1:0] din,
  output logic [N_CH-1:0]   out_data,
  output logic              out_sof,
  output logic              out_valid,
  input  logic              out_ready,
  output rx_protocol_t      protocol,
  output logic [3:0]        rot
);

  logic [N_LANE-1:0]  aligned, aligned_q;
  logic               sof, exp_a2, lof, wr, full;
  fs_state_t          state, state_q;
  logic [3:0]         row, row_q;
  logic [11:0]        col, col_q;
  logic [N_CH-1:0]    dec;
  logic [N_CODER-1:0] viol;
  logic [N_CH:0]      wdata, rdata;

  frame_sync u_sync (.clk, .rst_n, .din, .exp_a2, .dout(aligned), .sof, .state, .rot, .lof);

  rx_controller u_ctrl (.clk, .rst_n, .sof, .row, .col, .exp_a2, .frame_last());

  descrambler_4b3b u_dec (.clk, .rst_n, .din(aligned), .dout(dec), .viol);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      aligned_q <= '0;
      row_q     <= '0;
      col_q     <= '0;
      state_q   <= FS_HUNT;
    end else begin
      aligned_q <= aligned;
      row_q     <= row;
      col_q     <= col;
      state_q   <= state;
    end

  soh_evaluation u_eval (
    .clk, .rst_n, .state(state_q), .row(row_q), .col(col_q), .d(dec), .viol,
    .w16(aligned_q), .lof, .fifo_full(full), .wr, .wdata, .protocol
  );

  output_fifo #(.WIDTH(N_CH + 1), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr, .din(wdata), .dout(rdata), .valid(out_valid),
    .ready(out_ready), .full, .overflow()
  );

  assign out_data = rdata[N_CH-1:0];
  assign out_sof  = rdata[N_CH];

endmodule
