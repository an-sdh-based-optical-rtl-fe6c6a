// adc_serializer - front-end shift register that turns the N_AD-bit result
// of a module's A/D converter into a serial bit stream, MSB first.
//
// bit_out holds one bit until ce (from the STM-1 adaptation multiplexer,
// after all its inputs were read) moves on. After the last bit of a word the
// next ce loads adc_word and pulses sample for one cycle, telling the
// front end that the word was taken and the next conversion may start. Until
// the first word is loaded bit_out is 0. The document names the shift
// register; MSB first and the sample handshake are this design's choices.
module adc_serializer #(
  parameter int unsigned N_AD = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ce,
  input  logic [N_AD-1:0] adc_word,
  output logic            bit_out,
  output logic            sample
);

  logic [N_AD-1:0] sh;
  logic [$clog2(N_AD)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh     <= '0;
      cnt    <= ($clog2(N_AD))'(N_AD - 1);
      sample <= 1'b0;
    end else begin
      sample <= 1'b0;
      if (ce) begin
        if (cnt == ($clog2(N_AD))'(N_AD - 1)) begin
          sh     <= adc_word;
          cnt    <= '0;
          sample <= 1'b1;
        end else begin
          sh  <= {sh[N_AD-2:0], 1'b0};
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  assign bit_out = sh[N_AD-1];

endmodule
