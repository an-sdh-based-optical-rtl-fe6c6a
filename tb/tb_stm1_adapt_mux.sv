// tb_stm1_adapt_mux - drives random front-end bits and an interface slot
// pattern with gaps, and checks that transmitter input c carries front-end
// input 4c+m in slot phase m, that the phase restarts at if_sof and that
// fe_ce comes after the last phase. The rate reduction is run with every
// slot used, then every 3rd and every 5th slot; a change of slot_div in the
// middle of a frame must wait for the next if_sof, and unused slots must
// carry zeros.
module tb_stm1_adapt_mux;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, if_ce = 0, if_sof = 0;
  logic [3:0] slot_div = 4'd1;
  logic [47:0] fe_bits;
  logic [11:0] tx_bits;
  logic fe_ce;
  stm1_adapt_mux dut (.clk, .rst_n, .if_ce, .if_sof, .slot_div, .fe_bits, .tx_bits, .fe_ce);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int ph, nce, sc, dv, nunused;
    logic use_slot;
    ph = 0; nce = 0; sc = 0; dv = 1; nunused = 0;
    fe_bits = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      fe_bits = 48'({$urandom, $urandom});
      if_ce   = (t % 30) != 29;
      if_sof  = (t == 1000) || (t == 2001);
      if (t == 900)  slot_div = 4'd3;
      if (t == 1500) slot_div = 4'd5;
      if (if_sof) begin ph = 0; sc = 0; dv = int'(slot_div); end
      use_slot = (sc == 0);
      #1;
      for (int c = 0; c < 12; c++) begin
        checks++;
        if (tx_bits[c] !== (use_slot ? fe_bits[4*c + ph] : 1'b0)) begin
          failures++; $display("FAIL t=%0d c=%0d", t, c);
        end
      end
      checks++;
      if (fe_ce !== (if_ce && use_slot && ph == 3)) begin failures++; $display("FAIL fe_ce t=%0d", t); end
      if (fe_ce) nce++;
      if (if_ce && !use_slot) nunused++;
      if (if_ce) begin
        if (use_slot) ph = (ph + 1) % 4;
        sc = (dv <= 1 || sc == dv - 1) ? 0 : sc + 1;
      end
    end
    checks++;
    // 967 slots at n=1, 967 at n=3, 967 at n=5 (give or take): about 242 + 81 + 48
    if (nce < 350 || nce > 390) begin failures++; $display("FAIL fe_ce count %0d", nce); end
    checks++;
    if (nunused < 1000) begin failures++; $display("FAIL unused slots %0d", nunused); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
