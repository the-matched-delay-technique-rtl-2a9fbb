// md_section_fifo: synchronization FIFOs of a matched delay sampler or
// generator.
//
// The N stages form SECTIONS clock sections, each traversed by a different
// clock edge during one period T. To make the data of all sections belong to
// the same clock edge, every section passes through a clocked FIFO (a chain
// of registers on the rising edge of clk) of its own depth:
//   * ORDER_SAMPLER:   section k is delayed SECTIONS-1-k clocks (the leading
//                      sections wait for the last one);
//   * ORDER_GENERATOR: section k is delayed k clocks (the reflected version).
// A section of depth 0 passes straight through. Depths follow the continuous
// sampler and generator structures; the asynchronous active-low reset to
// zero is this design's choice.
//
// Timing: bits of section k appear at q fifo_depth(k) rising edges after they
// were at d.
module md_section_fifo
  import md_pkg::*;
#(
  parameter int unsigned N        = 64,  // stages
  parameter int unsigned SECTIONS = 4,   // clock sections
  parameter fifo_order_e ORDER    = ORDER_SAMPLER
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned SPC = N / SECTIONS;  // stages per clock section

  for (genvar k = 0; k < SECTIONS; k++) begin : g_sec
    localparam int unsigned DEPTH = fifo_depth(k, SECTIONS, ORDER);
    if (DEPTH == 0) begin : g_pass
      assign q[k*SPC +: SPC] = d[k*SPC +: SPC];
    end else begin : g_fifo
      logic [SPC-1:0] stage_q [DEPTH];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int s = 0; s < DEPTH; s++) stage_q[s] <= '0;
        end else begin
          stage_q[0] <= d[k*SPC +: SPC];
          for (int s = 1; s < DEPTH; s++) stage_q[s] <= stage_q[s-1];
        end
      end
      assign q[k*SPC +: SPC] = stage_q[DEPTH-1];
    end
  end

  initial begin
    assert (N % SECTIONS == 0)
      else $error("md_section_fifo: N must be a multiple of SECTIONS");
  end
endmodule
