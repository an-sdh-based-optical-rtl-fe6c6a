// soh_generator_2 - framing bytes and post-coding parity.
//
// The framing section of a frame (A1, A2, C1, three of each per STM-1
// channel) must reach the line uncoded so the receiver can find it. A small
// ROM holds the three framing words; the selector Sel replaces the first 72
// coded words of every frame by 24 words {A1,A1}, 24 words {A2,A2} and 24
// words {C1,C1}, i.e. 48 bytes of each on the serial line, the STM-16
// framing pattern. The result is registered (SR5 stage, one cycle) and goes
// to the 16:4 multiplexer. The parity of SR5 is a BIP-8 over the serial
// stream: both bytes of every output word are added modulo 2. At the first
// word of a frame the value of the previous frame is kept as b1.
//
// The ROM/Sel/SR5 structure follows the document; the ROM content beyond
// "A1, A2 and C1" and the parity coverage are this design's choices.
module soh_generator_2
  import sdh_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rom_sel,
  input  logic [6:0]        rom_idx,
  input  logic [N_LANE-1:0] din,
  output logic [N_LANE-1:0] dout,
  output logic [7:0]        b1,
  output logic              frame_start   // dout is the first word of a frame
);

  localparam logic [N_LANE-1:0] ROM [3] = '{{A1, A1}, {A2, A2}, {C1, C1}};

  logic [N_LANE-1:0] sel;
  logic [7:0]        sr5;
  logic              first;

  always_comb begin
    if (rom_sel) sel = (rom_idx < 7'(A2_WORD))     ? ROM[0] :
                       (rom_idx < 7'(2 * A2_WORD)) ? ROM[1] : ROM[2];
    else         sel = din;
    first = rom_sel && (rom_idx == 7'd0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout        <= '0;
      sr5         <= '0;
      b1          <= '0;
      frame_start <= 1'b0;
    end else begin
      dout        <= sel;
      frame_start <= first;
      if (first) begin
        b1  <= sr5;
        sr5 <= sel[15:8] ^ sel[7:0];
      end else begin
        sr5 <= sr5 ^ sel[15:8] ^ sel[7:0];
      end
    end
  end

endmodule
