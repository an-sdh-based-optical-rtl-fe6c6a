// tb_soh_generator_2 - feeds random coded words and the framing-section
// markers of three short frames; checks the 24 {A1,A1}, 24 {A2,A2} and
// 24 {C1,C1} words, the pass-through of coded words, the frame_start flag and
// the BIP-8 of each frame reported at the start of the next.
module tb_soh_generator_2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rom_sel = 0, frame_start;
  logic [6:0] rom_idx = 0;
  logic [15:0] din = 0, dout;
  logic [7:0] b1;
  soh_generator_2 dut (.clk, .rst_n, .rom_sel, .rom_idx, .din, .dout, .b1, .frame_start);
  always #5 clk = ~clk;
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [7:0] bip, prev;
    logic [15:0] exp;
    bip = 0; prev = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      for (int w = 0; w < 1000; w++) begin
        @(negedge clk);
        rom_sel = (w < 72);
        rom_idx = 7'(w);
        din = 16'($urandom);
        exp = (w < 24) ? 16'hF6F6 : (w < 48) ? 16'h2828 : (w < 72) ? 16'h0101 : din;
        @(posedge clk); #1;
        checks++;
        if (dout !== exp) begin failures++; if (failures < 10) $display("FAIL f%0d w%0d %h", f, w, dout); end
        checks++;
        if (frame_start !== (w == 0)) begin failures++; $display("FAIL frame_start"); end
        if (w == 0) begin
          prev = bip; bip = 0;
          if (f > 0) begin
            checks++;
            if (b1 !== prev) begin failures++; $display("FAIL b1 f%0d %h vs %h", f, b1, prev); end
          end
        end
        bip ^= exp[15:8] ^ exp[7:0];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
