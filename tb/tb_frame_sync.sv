// tb_frame_sync - builds STM frames here (framing section followed by random
// code words), sends them as a bit stream that is cut into 16-bit words at an
// arbitrary bit offset, and checks the synchronizer:
//  - HUNT finds the frame: sof comes with the first {A2,A2} word and from
//    then on dout equals the original words in order (lanes rotated back);
//  - the next frame's pattern moves it to SYNC;
//  - four frames with a damaged framing pattern give one loss of frame;
//  - after the bit offset changes by 5 bits it finds the new rotation.
// The expected position (exp_a2) is kept here, from the sof.
module tb_frame_sync;
  import sdh_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, exp_a2 = 0;
  logic [15:0] din = 0, dout;
  logic sof, lof;
  fs_state_t state;
  logic [3:0] rot;
  localparam int NF = 10, FL = 19440;
  localparam logic [3:0] TAB [8] = '{4'h5, 4'h6, 4'h3, 4'hC, 4'h9, 4'h2, 4'hD, 4'hA};

  frame_sync dut (.clk, .rst_n, .din, .exp_a2, .dout, .sof, .state, .rot, .lof);
  always #5 clk = ~clk;
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [15:0] frames [NF][FL];
  bit bits [$];
  int sent_f = 0, sent_i = 0;
  int cur_f = -1, cur_i = 0;     // word now expected at dout
  int n_sof = 0, n_lof = 0, n_sync = 0, rots [$];

  initial begin
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < FL; i++) begin
        logic [15:0] w;
        for (int q = 0; q < 4; q++) w[4*q +: 4] = TAB[$urandom % 8];
        if (i < 24) w = {A1, A1};
        else if (i < 48) w = {A2, A2};
        else if (i < 72) w = {C1, C1};
        // frames 3..6: damaged A2 bytes
        if (f >= 3 && f <= 6 && i >= 24 && i < 48) w = 16'h2929;
        frames[f][i] = w;
      end
    repeat (9) bits.push_back(1'b1);   // initial bit offset
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
  end

  // transmitter side of the test: one word per clock into the bit queue
  always @(negedge clk) if (rst_n) begin
    if (sent_f < NF) begin
      for (int b = 15; b >= 0; b--) bits.push_back(frames[sent_f][sent_i][b]);
      if (sent_f == 7 && sent_i == 0) repeat (5) bits.push_back(1'b0);   // bit slip
      sent_i++;
      if (sent_i == FL) begin sent_i = 0; sent_f++; end
    end
    for (int b = 15; b >= 0; b--) din[b] = bits.pop_front();
    exp_a2 = (cur_f >= 0) && (cur_i == 23);
  end

  always @(posedge clk) if (rst_n) begin
    #1;
    if (lof) n_lof++;
    if (sof) begin
      n_sof++;
      rots.push_back(int'(rot));
      chk(dout == {A2, A2}, "sof word");
      // the frame whose word 24 was sent most recently
      cur_f = (sent_i > 24) ? sent_f : sent_f - 1;
      cur_i = 24;
    end else if (cur_f >= 0) begin
      cur_i++;
      if (cur_i == FL) begin cur_i = 0; cur_f++; end
    end
    if (state == FS_HUNT && !sof) cur_f = -1;
    if (cur_f >= 0 && cur_f < NF && state == FS_SYNC) begin
      n_sync++;
      chk(dout == frames[cur_f][cur_i], $sformatf("aligned word f%0d i%0d", cur_f, cur_i));
    end
    if (sent_f == NF) begin
      chk(n_sof == 2, $sformatf("frames found %0d", n_sof));
      chk(n_lof == 1, $sformatf("losses of frame %0d", n_lof));
      chk(n_sync > 5 * FL, "time in SYNC");
      if (rots.size() == 2) chk(rots[0] != rots[1], "rotation changed after bit slip");
      chk(state == FS_SYNC, "in sync at the end");
      $display("rotations %p", rots);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
