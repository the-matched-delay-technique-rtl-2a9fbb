// tb_md_sampler_core_25ps: the basic (single-shot) sampler at the finest
// resolution reported for a 64-stage test chip: 64 stages, dt = 25 ps.
// With four sections this gives Dc = 100 ps and Dd = 75 ps. The clock is not
// a continuous clock here but isolated 1 ns pulses at random picosecond
// times, each far enough from the next that one edge has left the line
// before the next enters it. The input is a random waveform whose pulses are
// at least 1 ns wide (the narrowest pulse the test chip was reported to
// handle) with edges at arbitrary picosecond times, so they do not line up
// with the sampling grid.
//
// For a shot at time t_e, stage i must hold the input level at
// t_e + T_INS + i*dt once the edge has crossed the whole line. Every stage of
// every shot is checked against the recorded waveform, except where an input
// edge lies within 1 ps of the sampling instant (the order of two events in
// the same picosecond is not defined). The test fails if no shot contains an
// input edge between two neighbouring stages, i.e. if the 25 ps resolution
// was never exercised. The pulse-width limit itself is a property of real
// delay elements and is not modelled; the model passes narrower pulses too.
module tb_md_sampler_core_25ps;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 64, SECTIONS = 4, DT_PS = 25;
  localparam int unsigned DC = SECTIONS * DT_PS;
  localparam int unsigned T_INS = DC / 2;
  localparam int unsigned SHOTS = 300;
  localparam int unsigned CLK_HIGH = 1000;              // clock pulse width
  localparam int unsigned CROSS = T_INS + N * DC + 50;  // edge has left the line
  localparam int unsigned MAXEDGES = 4096;

  logic clk = 1'b0, din = 1'b0;
  logic [N-1:0] q;
  longint unsigned edge_t [MAXEDGES];  // times at which din toggles
  int unsigned nedges;
  int checks = 0, failures = 0, skipped = 0, resolved = 0;
  bit wave_ready = 1'b0;

  md_sampler_core #(.N(N), .SECTIONS(SECTIONS), .DT_PS(DT_PS)) dut (.clk, .din, .q);

  // level of din at time t, and whether an edge lies within 1 ps of t
  // (edge_t is in increasing order)
  function automatic logic level_at(longint unsigned t);
    logic v = 1'b0;
    for (int unsigned k = 0; k < nedges && edge_t[k] <= t; k++) v = ~v;
    return v;
  endfunction

  function automatic bit near_edge(longint unsigned t);
    for (int unsigned k = 0; k < nedges && edge_t[k] <= t + 1; k++)
      if (edge_t[k] + 1 >= t) return 1'b1;
    return 1'b0;
  endfunction

  // input waveform: pulses and gaps of 1 ns to 2.5 ns at arbitrary times
  initial begin
    longint unsigned t;
    t = 700;
    nedges = 0;
    while (nedges < MAXEDGES) begin
      edge_t[nedges] = t;
      nedges++;
      t += 64'(1000 + $urandom_range(0, 1500));
    end
    wave_ready = 1'b1;
    for (int unsigned k = 0; k < nedges; k++) begin
      #(edge_t[k] - $time);
      din = ~din;
    end
  end

  // single clock pulses; the stage outputs are checked after each crossing
  initial begin
    longint unsigned t_e, s;
    logic exp_v, prev_v;
    bit change;
    wait (wave_ready);
    #2000;
    for (int shot = 0; shot < SHOTS; shot++) begin
      #($urandom_range(100, 3000));
      t_e = $time;
      clk = 1'b1;
      #(CLK_HIGH);
      clk = 1'b0;
      #(CROSS - CLK_HIGH);
      change = 1'b0;
      for (int i = 0; i < N; i++) begin
        s = t_e + 64'(T_INS + i * DT_PS);
        exp_v = level_at(s);
        if (i > 0 && exp_v != prev_v) change = 1'b1;
        prev_v = exp_v;
        if (near_edge(s)) begin
          skipped++;
          continue;
        end
        checks++;
        if (q[i] !== exp_v) begin
          failures++;
          if (failures < 10)
            $display("shot %0d at %0d ps, stage %0d: q=%b expected %b", shot, t_e, i, q[i], exp_v);
        end
      end
      if (change) resolved++;
    end
    if (resolved == 0) begin
      failures++;
      $display("no input edge fell between two stages");
    end
    $display("shots=%0d with an edge inside the window=%0d skipped samples=%0d", SHOTS, resolved, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd2000 + 64'(SHOTS) * 64'(3000 + CROSS) + 64'd200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
