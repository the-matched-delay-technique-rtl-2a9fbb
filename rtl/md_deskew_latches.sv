// md_deskew_latches: bank of out-of-phase latches for one half of every clock
// section of a matched delay sampler or generator.
//
// Along the clock delay line the stages of a clock section are clocked Dc
// apart, so the valid windows of their data are skewed by up to nearly one
// clock period T. Delaying one half of each section by T/2 cancels most of
// that skew. This bank holds the selected half (HALF) of every section in
// registers clocked on the falling edge of clk, i.e. by the inverted clock,
// about 180 degrees out of phase with the rising edge that clocks the rest of
// the continuous structure. The other half of each section passes straight
// through.
//   * Sampler (deskew latches): HALF = HALF_UPSTREAM.
//   * Generator (out of phase latches): HALF = HALF_DOWNSTREAM.
// The placement of the latches and the inverted clock follow the continuous
// sampler and generator structures; using edge-triggered registers on the
// falling edge (rather than transparent latches) and the asynchronous
// active-low reset to zero are this design's choices.
//
// Timing: a held bit changes only on a falling edge of clk; a passed bit
// follows d combinationally.
module md_deskew_latches
  import md_pkg::*;
#(
  parameter int unsigned N        = 64,  // stages
  parameter int unsigned SECTIONS = 4,   // clock sections
  parameter half_e       HALF     = HALF_UPSTREAM
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  for (genvar i = 0; i < N; i++) begin : g_stage
    if (in_half(i, N, SECTIONS, HALF)) begin : g_hold
      logic held;
      always_ff @(negedge clk or negedge rst_n) begin
        if (!rst_n) held <= 1'b0;
        else        held <= d[i];
      end
      assign q[i] = held;
    end else begin : g_pass
      assign q[i] = d[i];
    end
  end

  initial begin
    assert (N % SECTIONS == 0 && (N / SECTIONS) % 2 == 0)
      else $error("md_deskew_latches: N/SECTIONS must be an even whole number");
  end
endmodule
