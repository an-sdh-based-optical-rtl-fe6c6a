// tb_soh_generator_1 - runs a channel through two frames with the real row
// timing. Checks that the first 72 cycles of each row carry the SOH bytes
// (b1 in row 2, the parity of the previous frame in row 5, the status byte
// in row 9, zero elsewhere), that the payload passes through afterwards, and
// that the parity equals a BIP-8 worked out here over the stream.
module tb_soh_generator_1;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, soh_rd = 0, pay_bit = 0, par_en = 0, frame_last = 0, status_data = 0, dout;
  logic [3:0] next_row = 0;
  logic [7:0] b1 = 0;
  soh_generator_1 dut (.clk, .rst_n, .load, .next_row, .b1, .status_data, .soh_rd, .pay_bit, .par_en, .frame_last, .dout);
  always #5 clk = ~clk;
  initial begin #1000000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [7:0] bip, prev_bip, exp_byte;
    logic [7:0] b1_val [4];
    logic       stat_val [4];
    bip = 0; prev_bip = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // cycle "-1": load the SOH of row 0 of frame 0
    for (int f = 0; f < 4; f++) begin b1_val[f] = 8'($urandom); stat_val[f] = 1'($urandom); end
    @(negedge clk); load = 1; next_row = 0;
    @(posedge clk);
    for (int f = 0; f < 4; f++) begin
      for (int r = 0; r < 9; r++) begin
        for (int c = 0; c < 2160; c++) begin
          @(negedge clk);
          soh_rd     = (c < 72);
          pay_bit    = 1'($urandom);
          par_en     = !(r == 0 && c < 72);
          frame_last = (r == 8 && c == 2159);
          load       = (c == 2159);
          next_row   = 4'((r + 1) % 9);
          b1         = b1_val[f];
          status_data = stat_val[f];
          #1;
          if (c < 72) begin
            exp_byte = 8'h00;
            if (c < 8 && r == 1) exp_byte = b1_val[f];
            if (c < 8 && r == 4) exp_byte = prev_bip;
            if (c >= 64 && r == 8) exp_byte = stat_val[f] ? 8'hFF : 8'h00;
            // row 0's SOH was loaded one frame earlier: all zero
            if (f > 0 || r > 0) begin
              checks++;
              if (dout !== exp_byte[7 - c % 8]) begin failures++; if (failures < 10) $display("FAIL f%0d r%0d c%0d", f, r, c); end
            end
          end else begin
            checks++;
            if (dout !== pay_bit) begin failures++; if (failures < 10) $display("FAIL payload f%0d r%0d c%0d", f, r, c); end
          end
          if (par_en) bip[7 - (c % 8)] ^= dout;
          if (frame_last) begin prev_bip = bip; bip = 0; end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
