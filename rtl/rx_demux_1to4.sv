// rx_demux_1to4 - twelve 1:M_MUX demultiplexers after the receiver, the
// mirror of the transmitter's STM-1 adaptation multiplexers.
//
// Each word taken from the output FIFO (in_valid) carries one bit of each
// channel. Channel c's bit in phase m belongs to stream c*M_MUX + m. The
// phase restarts at a word flagged as start of frame. After phase M_MUX-1
// the N_CH*M_MUX collected bits are presented together for one cycle
// (out_valid); out_sof says the set began a frame. Registered outputs.
// With slot_div = n > 1 only every n-th word of a frame carries data (the
// transmitter wrote only every n-th interface slot); the others are dropped.
// The word count restarts at each start of frame, and slot_div is taken
// there, so it must match the transmitter's value for that frame.
// The document shows the 1:4 demultiplexer and the every-n-th-slot option;
// the phase and slot rules are this design's.
module rx_demux_1to4 #(
  parameter int unsigned N_CH  = 12,
  parameter int unsigned M_MUX = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [N_CH-1:0]       in_bits,
  input  logic                  in_sof,
  input  logic [3:0]            slot_div,   // data in every slot_div-th word
  output logic [N_CH*M_MUX-1:0] out_bits,
  output logic                  out_valid,
  output logic                  out_sof
);

  localparam int unsigned PW = (M_MUX > 1) ? $clog2(M_MUX) : 1;

  logic [PW-1:0]          ph_q, ph;
  logic [N_CH*M_MUX-1:0]  stage, stage_next;
  logic                   sof_q, sof_next;
  logic [3:0]             div_q, div, sc_q, sc;
  logic                   use_word;

  always_comb begin
    div        = (in_valid && in_sof) ? slot_div : div_q;
    sc         = (in_valid && in_sof) ? '0 : sc_q;
    use_word   = (sc == '0);
    ph         = in_sof ? '0 : ph_q;
    stage_next = stage;
    for (int c = 0; c < N_CH; c++) stage_next[c*M_MUX + int'(ph)] = in_bits[c];
    sof_next   = in_sof ? 1'b1 : ((ph == '0) ? 1'b0 : sof_q);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ph_q      <= '0;
      sc_q      <= '0;
      div_q     <= 4'd1;
      stage     <= '0;
      sof_q     <= 1'b0;
      out_bits  <= '0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        div_q <= div;
        sc_q  <= (div <= 4'd1 || sc == div - 4'd1) ? '0 : sc + 4'd1;
        if (use_word) begin
          stage <= stage_next;
          sof_q <= sof_next;
          ph_q  <= (ph == PW'(M_MUX - 1)) ? '0 : ph + PW'(1);
          if (ph == PW'(M_MUX - 1)) begin
            out_bits  <= stage_next;
            out_valid <= 1'b1;
            out_sof   <= sof_next;
          end
        end
      end
    end

endmodule
