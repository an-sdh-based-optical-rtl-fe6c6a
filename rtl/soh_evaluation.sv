// soh_evaluation - SOH evaluation and transmission protocol of the receiver.
//
// Works on the decoded channel bits d (and the aligned coded word w16 they
// came from) together with their frame position row/col and the frame
// synchronizer state, all aligned in the same cycle.
//  - Code violations: invalid 4-baud words outside the framing section.
//  - B1: BIP-8 of the serial stream (both bytes of every word), computed
//    like the transmitter's SR5 and compared with row 2, byte 1 of channel 0
//    in the next frame. A mismatching frame counts one B1 error.
//  - B2: per channel, BIP-8 of the decoded stream without the first 72 bits
//    (like SR4), compared with row 5, byte 1 of that channel in the next
//    frame. Each mismatching channel counts one B2 error.
//  - Status: the last SOH byte of row 9 (channel 0, majority of its bits)
//    says whether the next frame carries data or idle cells.
// Payload bits of data frames received in SYNC go to the output FIFO with a
// start-of-frame flag on the first payload word. Counters saturate.
// The document says the SOH is evaluated and a protocol with transmission
// errors is made; which checks and counters it holds is this design's choice.
module soh_evaluation
  import sdh_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  fs_state_t          state,
  input  logic [3:0]         row,
  input  logic [11:0]        col,
  input  logic [N_CH-1:0]    d,
  input  logic [N_CODER-1:0] viol,
  input  logic [N_LANE-1:0]  w16,
  input  logic               lof,
  input  logic               fifo_full,
  output logic               wr,
  output logic [N_CH:0]      wdata,    // {sof, channel bits}
  output rx_protocol_t       protocol
);

  logic              active, in_sync, framing, frame_last, b_col, last_b;
  logic [7:0]        bip1, b1_calc, rb1, rb1_next;
  logic [7:0]        bip2 [N_CH];
  logic [7:0]        b2_calc [N_CH];
  logic [7:0]        rb2 [N_CH];
  logic [7:0]        rst_byte, rst_next;
  logic              calc_ok, stat_ok, next_data, frame_data;
  logic [4:0]        b2_bad, n_viol;

  always_comb begin
    active     = (state != FS_HUNT);
    in_sync    = (state == FS_SYNC);
    framing    = (row == 4'd0) && (col < 12'(SOH_BITS));
    frame_last = (row == 4'(ROWS - 1)) && (col == 12'(ROW_BITS - 1));
    b_col      = (col < 12'd8);
    last_b     = (col == 12'd7);
    rb1_next   = {rb1[6:0], d[0]};
    rst_next   = {rst_byte[6:0], d[0]};
    b2_bad     = '0;
    for (int c = 0; c < N_CH; c++)
      if ({rb2[c][6:0], d[c]} != b2_calc[c]) b2_bad = b2_bad + 5'd1;
    n_viol = '0;
    for (int k = 0; k < N_CODER; k++) n_viol = n_viol + 5'(viol[k]);
    wr    = in_sync && frame_data && (col >= 12'(SOH_BITS));
    wdata = {(row == 4'd0) && (col == 12'(SOH_BITS)), d};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bip1       <= '0;
      b1_calc    <= '0;
      rb1        <= '0;
      rst_byte   <= '0;
      calc_ok    <= 1'b0;
      stat_ok    <= 1'b0;
      next_data  <= 1'b0;
      frame_data <= 1'b0;
      protocol   <= '0;
      for (int c = 0; c < N_CH; c++) begin
        bip2[c] <= '0; b2_calc[c] <= '0; rb2[c] <= '0;
      end
    end else begin
      protocol.state <= state;
      if (lof)              protocol.lof      <= sat_add(protocol.lof, 5'd1);
      if (wr && fifo_full)  protocol.overflow <= sat_add(protocol.overflow, 5'd1);

      if (!active) begin
        bip1       <= '0;
        calc_ok    <= 1'b0;
        stat_ok    <= 1'b0;
        frame_data <= 1'b0;
        for (int c = 0; c < N_CH; c++) bip2[c] <= '0;
      end else begin
        // parities of the frame now arriving
        if (frame_last) begin
          b1_calc <= bip1 ^ w16[15:8] ^ w16[7:0];
          bip1    <= '0;
          calc_ok <= 1'b1;
        end else begin
          bip1 <= bip1 ^ w16[15:8] ^ w16[7:0];
        end
        for (int c = 0; c < N_CH; c++) begin
          if (frame_last) begin
            b2_calc[c] <= {bip2[c][6:0], bip2[c][7] ^ d[c]};
            bip2[c]    <= '0;
          end else if (!framing) begin
            bip2[c] <= {bip2[c][6:0], bip2[c][7] ^ d[c]};
          end
        end

        // received parities of the previous frame
        if (row == 4'(B1_ROW) && b_col) rb1 <= rb1_next;
        if (row == 4'(B2_ROW) && b_col)
          for (int c = 0; c < N_CH; c++) rb2[c] <= {rb2[c][6:0], d[c]};
        if (in_sync && calc_ok && last_b) begin
          if (row == 4'(B1_ROW) && rb1_next != b1_calc)
            protocol.b1_err <= sat_add(protocol.b1_err, 5'd1);
          if (row == 4'(B2_ROW) && b2_bad != '0)
            protocol.b2_err <= sat_add(protocol.b2_err, b2_bad);
        end

        // idle/data status of the next frame
        if (row == 4'(STAT_ROW) && col >= 12'(8*STAT_BYTE) && col < 12'(8*STAT_BYTE + 8)) begin
          rst_byte <= rst_next;
          if (col == 12'(8*STAT_BYTE + 7)) begin
            next_data <= ($countones(rst_next) >= 5);
            stat_ok   <= 1'b1;
          end
        end
        if (frame_last) begin
          frame_data <= next_data && stat_ok;
          stat_ok    <= 1'b0;
          if (in_sync) begin
            protocol.frames <= sat_add(protocol.frames, 5'd1);
            if (frame_data) protocol.data_frames <= sat_add(protocol.data_frames, 5'd1);
          end
        end

        if (in_sync && !framing && n_viol != '0)
          protocol.code_viol <= sat_add(protocol.code_viol, n_viol);
      end
    end
  end

endmodule
