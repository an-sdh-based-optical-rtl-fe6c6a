// tb_tx_controller - runs the controller for three frames and checks the
// frame timing: 2160-cycle rows, 9 rows per frame, 2088 interface slots per
// row with no slot in the load cycle (the 150.336/155.52 ratio), 72 SOH
// cycles per row, 72 framing words per frame (one cycle late), the frame
// fill start, and that Enable is taken once per frame at the row-9 load.
module tb_tx_controller;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [3:0] row, next_row;
  logic [11:0] col;
  logic if_ce, if_sof, row_load, soh_rd, pay_rd, par_en, frame_last, fill_data, status_data, rom_sel;
  logic [6:0] rom_idx;
  tx_controller dut (.clk, .rst_n, .enable, .row, .col, .next_row, .if_ce, .if_sof, .row_load,
    .soh_rd, .pay_rd, .par_en, .frame_last, .fill_data, .status_data, .rom_sel, .rom_idx);
  always #5 clk = ~clk;
  initial begin #2000000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    int n_if, n_soh, n_rom, n_rows, n_sof, cyc, exp_row, exp_col, rom_expect;
    logic en_at_fill;
    n_if = 0; n_soh = 0; n_rom = 0; n_rows = 0; n_sof = 0; rom_expect = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    exp_row = 0; exp_col = 1;   // reset is released at a falling edge
    rom_expect = 72;
    en_at_fill = 0;
    for (cyc = 0; cyc < 3 * 19440; cyc++) begin
      @(negedge clk);
      // a new Enable value every 5000 cycles
      if (cyc % 5000 == 0) enable = 1'($urandom_range(0, 1));
      #1;
      chk(row == 4'(exp_row) && col == 12'(exp_col), $sformatf("position %0d/%0d", exp_row, exp_col));
      chk(rom_sel == (rom_expect > 0), $sformatf("rom_sel cyc %0d", cyc));
      if (rom_sel) begin
        chk(rom_idx == 7'(72 - rom_expect), "rom_idx");
        n_rom++;
      end
      if (if_ce) n_if++;
      if (soh_rd) n_soh++;
      chk(pay_rd == !soh_rd, "pay_rd");
      chk(par_en == !(exp_row == 0 && exp_col < 72), "par_en");
      chk(frame_last == (exp_row == 8 && exp_col == 2159), "frame_last");
      if (if_sof) begin
        n_sof++;
        chk(exp_row == 8 && exp_col == 0 && if_ce, "if_sof position");
      end
      if (row_load) begin
        chk(exp_col == 2159 && !if_ce, "row_load position");
        chk(next_row == 4'((exp_row + 1) % 9), "next_row");
        if (n_rows > 0) begin
          chk(n_if == 2088, $sformatf("interface slots per row %0d", n_if));
          chk(n_soh == 72, "SOH cycles per row");
        end
        n_if = 0; n_soh = 0; n_rows++;
        if (exp_row == 7) en_at_fill = enable;
        chk(status_data == enable, "status follows enable");
      end
      // fill_data changes only at the row-9 load
      chk(fill_data == en_at_fill || (exp_row == 7 && exp_col == 2159), "fill_data");
      rom_expect = (rom_expect > 0) ? rom_expect - 1 : 0;
      if (exp_row == 0 && exp_col == 0) rom_expect = 72;
      exp_col++;
      if (exp_col == 2160) begin exp_col = 0; exp_row = (exp_row + 1) % 9; end
    end
    chk(n_rows == 27, "rows");
    chk(n_sof == 3, "frame fills");
    chk(n_rom == 3 * 72 - 1 || n_rom == 3 * 72, "framing words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
