// sdh_pkg - constants, code tables and types shared by the SDH link.
//
// One STM-1 channel frame is 9 rows of 2160 bits read out at 155.52 Mbit/s:
// 72 bits (9 bytes) of section overhead (SOH) followed by 2088 payload bits.
// 2088/2160 equals 150.336/155.52, the ratio of the interface rate to the
// STM-1 rate, and 72/2160 is the 1/30 overhead share. Twelve such channels
// run in lock step; the 3b/4b code turns their 12 bits into 16 lane bits, so
// one 16-bit word per 155.52 MHz cycle gives the 2.488 Gbit/s line.
//
// The 3b/4b table is the document's; A1/A2 are the standard SDH framing
// bytes; C1, the SOH byte positions of the parities and of the idle/data
// status, and the protocol record are this design's own choices.
package sdh_pkg;

  localparam int unsigned N_CH        = 12;    // parallel data channels
  localparam int unsigned N_LANE      = 16;    // coded lanes
  localparam int unsigned N_CODER     = 4;     // parallel 3b/4b coders
  localparam int unsigned ROWS        = 9;
  localparam int unsigned SOH_BYTES   = 9;
  localparam int unsigned SOH_BITS    = 72;
  localparam int unsigned PAY_BITS    = 2088;
  localparam int unsigned ROW_BITS    = SOH_BITS + PAY_BITS;   // 2160
  localparam int unsigned FRAME_BITS  = ROWS * ROW_BITS;       // 19440
  localparam int unsigned IF_GAP      = ROW_BITS / SOH_BITS;   // 30: one slot in 30 unused

  // Framing bytes sent uncoded at the start of every frame.
  localparam logic [7:0] A1 = 8'hF6;
  localparam logic [7:0] A2 = 8'h28;
  localparam logic [7:0] C1 = 8'h01;
  localparam int unsigned ROM_WORDS = SOH_BITS;                // 72 words: 24 x A1A1, A2A2, C1C1
  localparam int unsigned A2_WORD   = ROM_WORDS / 3;           // index of the first A2A2 word

  // SOH byte positions (row index 0..8, byte index 0..8).
  localparam int unsigned B1_ROW     = 1;   // parity after coding (SR5), byte 0
  localparam int unsigned B2_ROW     = 4;   // parity before coding (SR4), byte 0
  localparam int unsigned STAT_ROW   = 8;   // status of the next frame, byte 8
  localparam int unsigned STAT_BYTE  = 8;
  localparam logic [7:0]  STAT_DATA  = 8'hFF;
  localparam logic [7:0]  STAT_IDLE  = 8'h00;

  // Table II: 3-bit input -> 4-baud word (left bit first on the line).
  function automatic logic [3:0] enc3b4b(input logic [2:0] d);
    unique case (d)
      3'b000: return 4'b0101;
      3'b001: return 4'b0110;
      3'b010: return 4'b0011;
      3'b011: return 4'b1100;
      3'b100: return 4'b1001;
      3'b101: return 4'b0010;
      3'b110: return 4'b1101;
      default: return 4'b1010;
    endcase
  endfunction

  typedef struct packed {
    logic       bad;     // not one of the eight words of Table II
    logic [2:0] d;
  } dec_t;

  function automatic dec_t dec4b3b(input logic [3:0] c);
    unique case (c)
      4'b0101: return '{bad: 1'b0, d: 3'b000};
      4'b0110: return '{bad: 1'b0, d: 3'b001};
      4'b0011: return '{bad: 1'b0, d: 3'b010};
      4'b1100: return '{bad: 1'b0, d: 3'b011};
      4'b1001: return '{bad: 1'b0, d: 3'b100};
      4'b0010: return '{bad: 1'b0, d: 3'b101};
      4'b1101: return '{bad: 1'b0, d: 3'b110};
      4'b1010: return '{bad: 1'b0, d: 3'b111};
      default: return '{bad: 1'b1, d: 3'b000};
    endcase
  endfunction

  typedef enum logic [1:0] {FS_HUNT = 2'd0, FS_PRESYNC = 2'd1, FS_SYNC = 2'd2} fs_state_t;

  // Transmission protocol handed to the back end together with the data.
  typedef struct packed {
    fs_state_t   state;        // frame synchronizer state
    logic [15:0] frames;       // frames received in sync
    logic [15:0] data_frames;  // of these, frames that carried data
    logic [15:0] code_viol;    // invalid 4-baud words
    logic [15:0] b1_err;       // frames whose post-coding parity failed
    logic [15:0] b2_err;       // channel-frames whose pre-coding parity failed
    logic [15:0] lof;          // losses of frame
    logic [15:0] overflow;     // payload words lost at a full output FIFO
  } rx_protocol_t;

  // Saturating increment used by all protocol counters.
  function automatic logic [15:0] sat_add(input logic [15:0] a, input logic [4:0] n);
    logic [16:0] s;
    s = {1'b0, a} + 17'(n);
    return s[16] ? 16'hFFFF : s[15:0];
  endfunction

endpackage
