// frame_sync - frame synchronizer of the receiver.
//
// The 4:16 demultiplexer delivers 16-bit words whose boundary is anywhere in
// the serial stream. The last three words form a 48-bit window; for each
// rotation k = 0..15 the aligned word is the 16 bits starting k bits into
// the newer two words, and the 32 bits before and including it are compared
// with {A1,A1,A2,A2}, the A1->A2 transition of the framing section.
//   HUNT    : all 16 rotations are searched; the first hit fixes the
//             rotation, sof marks the aligned word (the first A2A2 word, word
//             A2_WORD of the frame) and the state goes to PRESYNC.
//   PRESYNC : one frame later (exp_a2 from the receiver controller) the
//             pattern must be found again at the kept rotation, else HUNT.
//   SYNC    : checked every frame; LOF_MISSES misses in a row are a loss of
//             frame (lof pulse) and hunting starts again.
// All later data is rotated by the kept rotation. dout/sof are registered,
// three cycles after the word enters.
//
// Searching for A1/A2 and rotating the 16 channels are the document's; the
// three states, the confirmation and LOF_MISSES are this design's choices.
module frame_sync
  import sdh_pkg::*;
#(
  parameter int unsigned LOF_MISSES = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_LANE-1:0] din,
  input  logic              exp_a2,   // word registered now should be the first A2A2 word
  output logic [N_LANE-1:0] dout,
  output logic              sof,
  output fs_state_t         state,
  output logic [3:0]        rot,      // rotation in use
  output logic              lof
);

  localparam logic [31:0] PATTERN = {A1, A1, A2, A2};

  logic [N_LANE-1:0] r0, r1, r2;
  logic [47:0]       win;
  logic [15:0]       hit;
  logic [N_LANE-1:0] aligned [16];
  logic [3:0]        first_k;
  logic [2:0]        miss;

  always_comb begin
    win     = {r2, r1, r0};
    first_k = '0;
    for (int k = 0; k < 16; k++) begin
      hit[k]     = (win[47-k -: 32] == PATTERN);
      aligned[k] = win[31-k -: 16];
    end
    for (int k = 15; k >= 0; k--) if (hit[k]) first_k = 4'(k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0 <= '0; r1 <= '0; r2 <= '0;
      dout  <= '0;
      sof   <= 1'b0;
      state <= FS_HUNT;
      rot   <= '0;
      miss  <= '0;
      lof   <= 1'b0;
    end else begin
      r0  <= din;
      r1  <= r0;
      r2  <= r1;
      sof <= 1'b0;
      lof <= 1'b0;
      unique case (state)
        FS_HUNT: begin
          dout <= aligned[rot];
          if (|hit) begin
            rot   <= first_k;
            dout  <= aligned[first_k];
            sof   <= 1'b1;
            state <= FS_PRESYNC;
            miss  <= '0;
          end
        end
        FS_PRESYNC: begin
          dout <= aligned[rot];
          if (exp_a2) state <= hit[rot] ? FS_SYNC : FS_HUNT;
        end
        default: begin
          dout <= aligned[rot];
          if (exp_a2) begin
            if (hit[rot]) miss <= '0;
            else if (miss == 3'(LOF_MISSES - 1)) begin
              state <= FS_HUNT;
              lof   <= 1'b1;
              miss  <= '0;
            end else miss <= miss + 3'd1;
          end
        end
      endcase
    end
  end

  initial assert (LOF_MISSES >= 1 && LOF_MISSES <= 7) else $error("LOF_MISSES out of range");

endmodule
