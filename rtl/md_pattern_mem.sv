// md_pattern_mem: sample data memory that lets the matched delay generator
// produce an arbitrary serial data stream.
//
// The memory holds SAMPLES serial samples as SAMPLES/N words of N bits, bit 0
// of a word being the earliest sample. It is loaded through a write port
// (one word per clock) and, while play is high, reads one word per clock
// period T in address order from 0 to last_addr and then starts again at 0,
// so a pattern of (last_addr+1)*N samples repeats without gaps. When play is
// low the read address returns to 0 and the output word is all zeros (the
// generator then holds its output low). The 512-sample size is that of the
// generator chip built with this technique; the organisation as N-bit words,
// the write port, the looping read-out with a programmable last address and
// the idle behaviour are this design's choices.
//
// Timing: the word read at rising edge c is on word from just after edge c;
// the first word appears one clock after play rises. wrap pulses for one
// clock together with the word at last_addr.
module md_pattern_mem #(
  parameter int unsigned N       = 64,   // bits per word (generator stages)
  parameter int unsigned SAMPLES = 512,  // memory size in samples
  localparam int unsigned WORDS  = SAMPLES / N,
  localparam int unsigned AW     = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // write port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [N-1:0]  wdata,
  // playback
  input  logic          play,
  input  logic [AW-1:0] last_addr,  // last word of the pattern
  output logic [N-1:0]  word,
  output logic          wrap        // word is the pattern's last word
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N-1:0]  mem [WORDS];
  logic [AW-1:0] raddr;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raddr <= '0;
      word  <= '0;
      wrap  <= 1'b0;
    end else if (play) begin
      word  <= mem[raddr];
      wrap  <= (raddr == last_addr);
      raddr <= (raddr == last_addr) ? '0 : raddr + 1'b1;
    end else begin
      raddr <= '0;
      word  <= '0;
      wrap  <= 1'b0;
    end
  end

  initial begin
    assert (SAMPLES % N == 0)
      else $error("md_pattern_mem: SAMPLES must be a multiple of N");
  end
endmodule
