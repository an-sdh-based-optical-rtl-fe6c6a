// tx_controller - frame timing of the transmitter.
//
// Counts the bit position (col 0..ROW_BITS-1) and row (0..8) of the STM-1
// row now being read out of SR3/SR2 at 155.52 MHz. While row r is read out,
// the input shift registers SR1 fill with row r+1. The interface clock of
// 150.336 MHz is realised as a slot strobe if_ce on the 155.52 MHz clock that
// skips one cycle in IF_GAP (30), which gives exactly PAY_BITS writes per
// row. row_load, in the last cycle of a row, copies SR1 into SR2 and SOH-R
// into SR3. The Enable input is sampled at the start of each frame fill:
// fill_data tells whether that frame carries input data or idle cells
// (all zero). The same decision goes out in the status byte of the row then
// loaded (row 9 of the frame before), so the receiver knows it in advance.
// rom_sel/rom_idx are delayed by one cycle so they line up with the
// registered 3b/4b coder output that SOH generator II works on.
//
// The document gives the tasks (control of data handling, idle cells, the
// Enable input); the counters, the 1-in-30 slot pattern and the way the idle
// decision is signalled are this design's choices. The PLL that makes the
// clocks is analog and not part of this module.
module tx_controller
  import sdh_pkg::*;
#(
  parameter int unsigned ROW_LEN = ROW_BITS,
  parameter int unsigned SOH_LEN = SOH_BITS,
  parameter int unsigned GAP     = IF_GAP
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,        // data is provided at the input port
  output logic [3:0]  row,           // row being read out
  output logic [11:0] col,           // bit position in that row
  output logic [3:0]  next_row,      // row whose SOH is loaded by row_load
  output logic        if_ce,         // interface write slot
  output logic        if_sof,        // first write slot of a frame fill
  output logic        row_load,      // SR1->SR2, SOH-R->SR3 this cycle
  output logic        soh_rd,        // SR3 drives the channel stream
  output logic        pay_rd,        // SR2 drives the channel stream
  output logic        par_en,        // bit counts into the SR4 parity
  output logic        frame_last,    // last bit of a frame
  output logic        fill_data,     // frame being filled carries data
  output logic        status_data,   // value for the status byte loaded now
  output logic        rom_sel,       // coder output word is in the framing section
  output logic [6:0]  rom_idx        // its index 0..71
);

  logic [4:0] gap_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row       <= '0;
      col       <= '0;
      gap_cnt   <= '0;
      fill_data <= 1'b0;
      rom_sel   <= 1'b0;
      rom_idx   <= '0;
    end else begin
      gap_cnt <= (gap_cnt == 5'(GAP - 1)) ? '0 : gap_cnt + 5'd1;
      if (row_load) begin
        col <= '0;
        row <= next_row;
        if (next_row == 4'(ROWS - 1)) fill_data <= enable;
      end else begin
        col <= col + 12'd1;
      end
      rom_sel <= (row == 4'd0) && (col < 12'(SOH_LEN));
      rom_idx <= col[6:0];
    end
  end

  always_comb begin
    next_row    = (row == 4'(ROWS - 1)) ? 4'd0 : row + 4'd1;
    row_load    = (col == 12'(ROW_LEN - 1));
    if_ce       = (gap_cnt != 5'(GAP - 1));
    if_sof      = (row == 4'(ROWS - 1)) && (col == 12'd0);
    soh_rd      = (col < 12'(SOH_LEN));
    pay_rd      = !soh_rd;
    par_en      = !((row == 4'd0) && soh_rd);
    frame_last  = (row == 4'(ROWS - 1)) && row_load;
    status_data = enable;
  end

  // A row holds exactly ROW_LEN/GAP unused slots, so the row period and the
  // gap pattern stay in step.
  initial assert (ROW_LEN % GAP == 0 && ROW_LEN / GAP == SOH_LEN)
    else $error("row length, SOH length and slot gap do not match");

endmodule
