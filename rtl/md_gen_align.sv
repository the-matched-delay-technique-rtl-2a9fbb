// md_gen_align: consecutive-data additions of the matched delay generator,
// the reflected counterpart of md_sampler_align.
//
// An encoded word must reach every toggle latch just before the clock edge
// that toggles it, although that edge arrives Dc later at each stage and
// several edges are in flight, one per clock section. This block therefore
//   1. delays clock section k by k clocks in a synchronization FIFO
//      (md_section_fifo, ORDER_GENERATOR), because the edge reaching section
//      k was launched k periods earlier, and
//   2. holds the downstream half of every section for T/2 in out-of-phase
//      latches on the inverted clock (md_deskew_latches, HALF_DOWNSTREAM),
//      because those stages are clocked in the second half of the period.
// FIFOs come first and the out-of-phase latches sit next to the toggle
// latches, as in the continuous generator structure.
//
// Timing: bits of section k of the word at e on rising edge c are at t from
// edge c+k (upstream half) or from the falling edge half a period later
// (downstream half), and stay for one period T.
module md_gen_align
  import md_pkg::*;
#(
  parameter int unsigned N        = 64,
  parameter int unsigned SECTIONS = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] e,   // encoded word from md_gen_encoder
  output logic [N-1:0] t    // toggle enables for the generator core
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N-1:0] synced;

  md_section_fifo #(.N(N), .SECTIONS(SECTIONS), .ORDER(ORDER_GENERATOR)) u_fifo (
    .clk, .rst_n, .d(e), .q(synced)
  );

  md_deskew_latches #(.N(N), .SECTIONS(SECTIONS), .HALF(HALF_DOWNSTREAM)) u_oop (
    .clk, .rst_n, .d(synced), .q(t)
  );
endmodule
