// stm1_adapt_mux - STM-1 adaptation: twelve M_MUX:1 multiplexers in front of
// the transmitter.
//
// Each front-end module delivers a serial stream of at most
// 150.336/M_MUX Mbit/s (37.584 Mbit/s for 4:1). Multiplexer c interleaves
// inputs fe_bits[c*M_MUX + m], m = 0..M_MUX-1, bit by bit into transmitter
// input c: in interface slot phase m it passes input m. fe_ce marks the
// slot after which every front-end stream moves on to its next bit. The
// phase restarts at the first slot of every frame fill (if_sof) so the
// receiver's demultiplexers can find it from the frame start. Combinational
// from the phase register to tx_bits.
//
// Rate reduction: with slot_div = n > 1 only every n-th interface slot is
// written with front-end data; the slots in between carry zeros and do not
// advance the phase. The slot count also restarts at if_sof, and slot_div is
// taken at if_sof, so it changes only between frames. The receiver must be
// set to the same n (rx_demux_1to4). slot_div of 0 or 1 uses every slot.
//
// The 12 x 4:1 arrangement, the rates and the option to write only every
// n-th interface clock period are the document's; bit interleaving, the
// frame-aligned phase and slot count, and zero filler are this design's.
module stm1_adapt_mux #(
  parameter int unsigned N_CH  = 12,
  parameter int unsigned M_MUX = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    if_ce,
  input  logic                    if_sof,
  input  logic [3:0]              slot_div,   // use every slot_div-th slot
  input  logic [N_CH*M_MUX-1:0]   fe_bits,
  output logic [N_CH-1:0]         tx_bits,
  output logic                    fe_ce
);

  localparam int unsigned PW = (M_MUX > 1) ? $clog2(M_MUX) : 1;

  logic [PW-1:0] ph_q, ph;
  logic [3:0]    div_q, div, sc_q, sc;
  logic          use_slot;

  always_comb begin
    div      = if_sof ? slot_div : div_q;
    sc       = if_sof ? '0 : sc_q;
    use_slot = (sc == '0);
    ph       = if_sof ? '0 : ph_q;
    for (int c = 0; c < N_CH; c++) tx_bits[c] = use_slot && fe_bits[c*M_MUX + int'(ph)];
    fe_ce = if_ce && use_slot && (ph == PW'(M_MUX - 1));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ph_q  <= '0;
      sc_q  <= '0;
      div_q <= 4'd1;
    end else begin
      div_q <= div;
      if (if_ce) begin
        sc_q <= (div <= 4'd1 || sc == div - 4'd1) ? '0 : sc + 4'd1;
        if (use_slot) ph_q <= (ph == PW'(M_MUX - 1)) ? '0 : ph + PW'(1);
        else          ph_q <= ph;
      end else begin
        sc_q <= sc;
        ph_q <= ph;
      end
    end

endmodule
