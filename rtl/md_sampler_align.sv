// md_sampler_align: continuous-sampling additions of the matched delay
// sampler (everything in the continuous sampler except the delay lines and
// their sampling latches).
//
// The sampler core's N latch outputs do not form one word at any instant:
// stage i is re-latched Dc after stage i-1, and each of the SECTIONS clock
// sections holds samples taken by a different clock edge. This block turns
// them into one word of N consecutive samples per clock period T:
//   1. deskew latches (md_deskew_latches, HALF_UPSTREAM) hold the upstream
//      half of every section for T/2 on the inverted clock, so that all
//      stages of a section are valid together around the next rising edge;
//   2. synchronization FIFOs (md_section_fifo, ORDER_SAMPLER) delay section
//      k by SECTIONS-1-k clocks so that all sections carry the same edge;
//   3. the output register captures the aligned word on the rising edge.
// The order of these three parts follows the continuous sampler structure.
// The valid flag (set once the pipeline holds only data captured after
// reset) and the reset are this design's additions.
//
// Interface: clk is the sampling clock of period T = N*dt, also applied to
// the sampler core (which may add an insertion delay of less than Dc).
// Timing: samples taken by the core on clock edge e are in word at the
// rising edge e+SECTIONS, i.e. SECTIONS clocks of latency; one word per
// clock.
module md_sampler_align
  import md_pkg::*;
#(
  parameter int unsigned N        = 64,
  parameter int unsigned SECTIONS = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] q_core,  // latch outputs of the sampler core
  output logic [N-1:0] word,    // bit i = i-th consecutive sample
  output logic         valid
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N-1:0] deskewed;
  logic [N-1:0] synced;
  localparam int unsigned FW = $clog2(SECTIONS + 2);
  localparam logic [FW-1:0] FULL = FW'(SECTIONS + 1);
  logic [FW-1:0] fill;  // rising edges since reset, saturating at FULL

  md_deskew_latches #(.N(N), .SECTIONS(SECTIONS), .HALF(HALF_UPSTREAM)) u_deskew (
    .clk, .rst_n, .d(q_core), .q(deskewed)
  );

  md_section_fifo #(.N(N), .SECTIONS(SECTIONS), .ORDER(ORDER_SAMPLER)) u_fifo (
    .clk, .rst_n, .d(deskewed), .q(synced)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word  <= '0;
      fill  <= '0;
      valid <= 1'b0;
    end else begin
      word <= synced;
      if (fill != FULL) fill <= fill + 1'b1;
      valid <= (fill == FULL);
    end
  end
endmodule
