// md_generator_core: behavioural model of the basic matched delay generator,
// the dual of the sampler. This is a timing (analog) structure, not
// synthesizable logic: its delays stand for the propagation delays of matched
// delay elements on the chip.
//
// The clock travels down a clock delay line (Dc per stage) and clocks a
// toggle latch at each stage; a latch whose toggle input t[i] is 1 at its
// clock edge changes state. The latch outputs feed a chain of XOR gates, each
// with delay Dd: XOR i combines the output of XOR i-1 (0 for the first) with
// toggle latch i, and the last XOR drives the serial output. An XOR passes
// rising and falling edges from upstream and lets its own latch insert a new
// edge. A toggle of stage i reaches the output at
//   (edge time) + T_INS_PS + i*Dc + (N-i)*Dd = (edge time) + T_INS_PS + N*Dd + i*dt,
// so the edges of one clock edge are placed dt = Dc - Dd apart.
//
// Delay values as in md_sampler_core: Dc = T/(stages per clock section),
// Dd = Dc - dt. The structure follows the basic generator; Dc > Dd, transport
// delays, the clock insertion delay T_INS_PS and the asynchronous active-low
// reset of the toggle latches to 0 are this model's choices.
//
// Interface: rst_n clears the toggle latches on its falling edge (an
// asynchronous reset); clk (period T = N*DT_PS ps), t[i] = toggle enable of stage i,
// sampled at (edge time) + T_INS_PS + i*Dc; dout = serial output.
module md_generator_core #(
  parameter int unsigned N        = 64,
  parameter int unsigned SECTIONS = 4,
  parameter int unsigned DT_PS    = 100,
  parameter int unsigned T_INS_PS = (SECTIONS * DT_PS) / 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] t,
  output logic         dout
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DC_PS = SECTIONS * DT_PS;
  localparam int unsigned DD_PS = DC_PS - DT_PS;

  // Each delay element is an ideal transport delay: every change at its
  // input reappears at its output after the element's delay, however close
  // the changes follow each other. The XOR gates also re-evaluate when
  // rst_n changes, so the chain settles to the (all-zero) reset state of the
  // toggle latches whatever its power-up state was.
  for (genvar i = 0; i < N; i++) begin : g_stage
    logic clk_tap;  // clock delay line tap of stage i
    logic tog;      // toggle latch of stage i
    logic xo;       // output of XOR gate i

    initial begin
      clk_tap = 1'b0;
      xo      = 1'b0;
    end

    // clock delay in front of this stage: insertion delay or one Dc
    localparam int unsigned CLK_DLY = (i == 0) ? T_INS_PS : DC_PS;

    task automatic drive_clk(input logic v);
      fork
        begin
          #(CLK_DLY);
          clk_tap = v;
        end
      join_none
    endtask

    task automatic drive_xor(input logic v);
      fork
        begin
          #(DD_PS);
          xo = v;
        end
      join_none
    endtask

    always @(posedge clk_tap or negedge rst_n) begin
      if (!rst_n)    tog <= 1'b0;
      else if (t[i]) tog <= ~tog;
    end

    if (i == 0) begin : g_first
      always @(clk) drive_clk(clk);
      always @(tog or rst_n) drive_xor(tog);  // other XOR input tied low
    end else begin : g_next
      always @(g_stage[i-1].clk_tap) drive_clk(g_stage[i-1].clk_tap);
      always @(tog or g_stage[i-1].xo or rst_n) drive_xor(g_stage[i-1].xo ^ tog);
    end
  end

  assign dout = g_stage[N-1].xo;

  initial begin
    assert (N % SECTIONS == 0 && DC_PS * (N / SECTIONS) == N * DT_PS && DC_PS > DT_PS)
      else $error("md_generator_core: Dc must be an integral multiple of dt above dt");
    assert (T_INS_PS > 0 && T_INS_PS < DC_PS)
      else $error("md_generator_core: clock insertion delay must lie between 0 and Dc");
  end
endmodule
