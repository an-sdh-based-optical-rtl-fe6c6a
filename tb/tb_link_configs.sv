// tb_link_configs - runs the complete link in the two front-end
// configurations besides the default 4:1 / 12-bit one:
//  - 8:1 multiplexers: 96 front-end streams at 18.792 Mbit/s, 12-bit words,
//    i.e. 61,440 detector channels per fibre at 640 per module;
//  - no multiplexer, 8-bit words: 12 streams at the full 150.336 Mbit/s,
//    the shortest readout (128 x 8 bits in 6.8 us per stream).
// Each runs in its own link_cfg_harness, on shared clocks: bit clock period
// 2, 622 MHz clock period 8, core clock period 32. The harnesses compare the
// delivered data with what was handed over, and check the stream rate
// (18792 / M_MUX bits per 125 us frame), the A/D word spacing and the
// error-free protocol, and print the latency from front end to output.
// Four frames each.
module tb_link_configs;
  localparam int FRAME = 19440;
  localparam int NFR   = 4;

  logic clk_bit = 0, clk_622 = 0, clk_core = 0, rst_n = 0;
  int   c8, f8, c1, f1;
  logic d8, d1;

  always #1  clk_bit  = ~clk_bit;
  always #4  clk_622  = ~clk_622;
  always #16 clk_core = ~clk_core;

  link_cfg_harness #(.M_MUX(8), .N_AD(12), .LINE_DELAY(13), .NFR(NFR)) u_mux8 (
    .clk_bit, .clk_622, .clk_core, .rst_n, .checks(c8), .failures(f8), .done(d8));
  link_cfg_harness #(.M_MUX(1), .N_AD(8), .LINE_DELAY(6), .NFR(NFR)) u_mux1 (
    .clk_bit, .clk_622, .clk_core, .rst_n, .checks(c1), .failures(f1), .done(d1));

  initial begin
    #40 rst_n = 1;
    wait (d8 && d1);
    #10;
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c1, f8 + f1);
    $finish;
  end

  initial begin
    #(64'd32 * 64'(FRAME) * 64'(NFR + 2));
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c1, f8 + f1 + 1);
    $finish;
  end
endmodule
