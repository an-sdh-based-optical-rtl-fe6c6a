// tb_sdh_pkg - checks the 3b/4b code functions of sdh_pkg against the code
// table written out here, the decoder's detection of the eight unused words,
// and the saturating counter increment.
module tb_sdh_pkg;
  import sdh_pkg::*;
  int checks = 0, failures = 0;
  // expected code words for inputs 0..7, left bit = MSB
  localparam logic [3:0] TAB [8] = '{4'h5, 4'h6, 4'h3, 4'hC, 4'h9, 4'h2, 4'hD, 4'hA};

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int nvalid;
    dec_t r;
    for (int i = 0; i < 8; i++) chk(enc3b4b(3'(i)) == TAB[i], $sformatf("enc %0d", i));
    nvalid = 0;
    for (int c = 0; c < 16; c++) begin
      r = dec4b3b(4'(c));
      if (!r.bad) begin
        nvalid++;
        chk(TAB[r.d] == 4'(c), $sformatf("dec %h", c));
      end else begin
        for (int i = 0; i < 8; i++) chk(TAB[i] != 4'(c), $sformatf("valid word %h flagged", c));
      end
    end
    chk(nvalid == 8, "eight valid words");
    chk(sat_add(16'd5, 5'd3) == 16'd8, "sat_add small");
    chk(sat_add(16'hFFFE, 5'd4) == 16'hFFFF, "sat_add saturates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
