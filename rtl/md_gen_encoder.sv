// md_gen_encoder: input encoder of the matched delay generator.
//
// The generator's toggle latches need to know where output edges go, while
// the user supplies "sample-like" words, bit i being the level of the i-th
// serial bit period. The encoder registers each word as the XOR of every bit
// with the bit before it in serial order: bit 0 is compared with the last
// bit (N-1) of the previous word, which the encoder remembers. A one marks a
// change of level, i.e. an edge that the corresponding toggle latch will
// make. The XOR comparison, the wrap from bit 0 to the previous word's last
// bit and the clocked encoder follow the generator description; the reset
// (previous last bit taken as 0, so the serial output starts low) is this
// design's choice.
//
// Timing: the word at d on rising edge c appears encoded at e right after
// that edge; one word per clock period T.
module md_gen_encoder #(
  parameter int unsigned N = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] d,      // sample-like word, bit 0 first in time
  output logic [N-1:0] e       // edge marks for the toggle latches
);
  timeunit 1ps;
  timeprecision 1ps;

  logic last_bit;  // bit N-1 of the previously encoded word

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e        <= '0;
      last_bit <= 1'b0;
    end else begin
      e        <= d ^ {d[N-2:0], last_bit};
      last_bit <= d[N-1];
    end
  end
endmodule
