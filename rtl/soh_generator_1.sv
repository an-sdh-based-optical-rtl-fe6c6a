// soh_generator_1 - SOH insertion and pre-coding parity of one channel.
//
// SOH-R holds the nine SOH bytes of the next row; on load they are copied
// into the 72-bit shift register SR3, which then drives the channel stream
// for the first 72 cycles of the row (soh_rd), MSB first, before the payload
// from SR2 (pay_bit). SR4 is an 8-bit shift register with a modulo-2
// addition in its feedback (a BIP-8): it takes every bit of the channel
// stream except the first 72 of a frame, which are later replaced by the
// framing bytes. At the last bit of a frame its value is kept as b2 and sent
// in row 5 of the next frame. Row 2 carries b1, the parity computed after
// coding by SOH generator II, and the last byte of row 9 the idle/data
// status of the next frame. Other SOH bytes are zero.
//
// SR3/SR4/SOH-R follow the document's figure; the byte positions and the
// parity coverage are this design's choices.
module soh_generator_1
  import sdh_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,        // SOH-R -> SR3
  input  logic [3:0] next_row,    // row whose SOH is loaded
  input  logic [7:0] b1,          // post-coding parity of the previous frame
  input  logic       status_data, // next frame carries data
  input  logic       soh_rd,
  input  logic       pay_bit,
  input  logic       par_en,
  input  logic       frame_last,
  output logic       dout
);

  logic [SOH_BITS-1:0] soh_r, sr3;
  logic [7:0]          sr4, sr4_next, b2;

  // SOH-R: byte j of the row sits at bits [71-8j -: 8].
  always_comb begin
    soh_r = '0;
    if (next_row == 4'(B1_ROW)) soh_r[SOH_BITS-1 -: 8] = b1;
    if (next_row == 4'(B2_ROW)) soh_r[SOH_BITS-1 -: 8] = b2;
    if (next_row == 4'(STAT_ROW))
      soh_r[SOH_BITS-1-8*STAT_BYTE -: 8] = status_data ? STAT_DATA : STAT_IDLE;
  end

  assign dout     = soh_rd ? sr3[SOH_BITS-1] : pay_bit;
  assign sr4_next = par_en ? {sr4[6:0], sr4[7] ^ dout} : sr4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr3 <= '0;
      sr4 <= '0;
      b2  <= '0;
    end else begin
      if (load)        sr3 <= soh_r;
      else if (soh_rd) sr3 <= {sr3[SOH_BITS-2:0], 1'b0};
      if (frame_last) begin
        b2  <= sr4_next;
        sr4 <= '0;
      end else begin
        sr4 <= sr4_next;
      end
    end
  end

endmodule
