// md_sampler_core: behavioural model of the basic matched delay sampler, the
// pair of tapped delay lines with a latch at each pair of taps. This is a
// timing (analog) structure, not synthesizable logic: its delays stand for
// the propagation delays of matched delay elements on the chip.
//
// The serial input travels down the data delay line (Dd per stage) while
// the clock travels down the clock delay line (Dc per stage). Stage i
// latches its data tap on the rising edge of its clock tap, so it samples the
// input as it was i*(Dc-Dd) after stage 0 did: the sampling interval is
// dt = |Dc - Dd|, finer than any single delay. One clock edge takes N
// consecutive samples; with a clock of period T = N*dt the edges follow each
// other without gaps or overlap.
//
// Delay values: dt = DT_PS; Dc = T/(stages per clock section), so that Dc is
// an integral multiple of dt and SECTIONS clock edges are in flight at once;
// Dd = Dc - dt (the clock line is the slower one, so later stages hold later
// samples). The delay lines and latches follow the basic sampler structure;
// the choice Dc > Dd, the transport (pulse-preserving) delays and the clock
// insertion delay T_INS_PS between the clock pin and the first stage are
// this model's choices. The stage latch is modelled as a flip-flop on the
// rising edge of its clock tap, with no reset.
//
// Interface: clk (period T = N*DT_PS ps), din (serial data), q[i] = output of
// stage i's latch, updated at (edge time) + T_INS_PS + i*Dc.
module md_sampler_core #(
  parameter int unsigned N        = 64,   // stages
  parameter int unsigned SECTIONS = 4,    // clock edges in flight
  parameter int unsigned DT_PS    = 100,  // sampling interval dt in ps
  parameter int unsigned T_INS_PS = (SECTIONS * DT_PS) / 2  // clock insertion delay
) (
  input  logic         clk,
  input  logic         din,
  output logic [N-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DC_PS = SECTIONS * DT_PS;  // clock delay per stage
  localparam int unsigned DD_PS = DC_PS - DT_PS;          // data delay per stage

  // Each delay element is an ideal transport delay: every change at its
  // input reappears at its output after the element's delay, however close
  // the changes follow each other.
  for (genvar i = 0; i < N; i++) begin : g_stage
    logic data_tap;  // data delay line tap of stage i
    logic clk_tap;   // clock delay line tap of stage i
    logic held;      // stage latch

    initial begin
      data_tap = 1'b0;
      clk_tap  = 1'b0;
    end

    // clock delay in front of this stage: insertion delay or one Dc
    localparam int unsigned CLK_DLY = (i == 0) ? T_INS_PS : DC_PS;

    task automatic drive_data(input logic v);
      fork
        begin
          #(DD_PS);
          data_tap = v;
        end
      join_none
    endtask

    task automatic drive_clk(input logic v);
      fork
        begin
          #(CLK_DLY);
          clk_tap = v;
        end
      join_none
    endtask

    if (i == 0) begin : g_in
      always @(din) data_tap = din;  // stage 0 taps the input directly
      always @(clk) drive_clk(clk);
    end else begin : g_dly
      always @(g_stage[i-1].data_tap) drive_data(g_stage[i-1].data_tap);
      always @(g_stage[i-1].clk_tap)  drive_clk(g_stage[i-1].clk_tap);
    end

    always @(posedge clk_tap) held <= data_tap;
    assign q[i] = held;
  end

  initial begin
    assert (N % SECTIONS == 0 && DC_PS * (N / SECTIONS) == N * DT_PS && DC_PS > DT_PS)
      else $error("md_sampler_core: Dc must be an integral multiple of dt above dt");
    assert (T_INS_PS < DC_PS)
      else $error("md_sampler_core: clock insertion delay must stay below Dc");
  end
endmodule
