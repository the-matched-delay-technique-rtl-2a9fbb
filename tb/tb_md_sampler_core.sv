// tb_md_sampler_core: drives the sampler model with a random serial stream
// whose bit k occupies [t0 + k*dt, t0 + (k+1)*dt), t0 chosen so that the
// intended sampling instants fall in the middle of bits. With rising clock
// edge e at T/2 + e*T, stage i must sample the input at
// (edge e) + T_INS + i*dt (bit e*N + i of the stream) and show it on q[i]
// from (edge e) + T_INS + i*Dc on. Every stage is checked just after each of
// its clock edges, which confirms both the sampling interval dt = Dc - Dd
// and the skew of Dc between stages.
module tb_md_sampler_core;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 64, SECTIONS = 4, DT_PS = 100;
  localparam int unsigned T_PS = N * DT_PS;
  localparam int unsigned DC = SECTIONS * DT_PS;
  localparam int unsigned T_INS = DC / 2;
  localparam int unsigned NCYC = 120, FIRST = 2;
  localparam int unsigned NBITS = (NCYC + 8) * N;

  logic clk = 1'b0, din = 1'b0;
  logic [N-1:0] q;
  logic stream [NBITS];
  int checks = 0, failures = 0;

  md_sampler_core dut (.clk, .din, .q);

  always #(T_PS / 2) clk = ~clk;

  initial for (int k = 0; k < NBITS; k++) stream[k] = 1'($urandom);

  initial begin
    #(T_PS / 2 + T_INS - DT_PS / 2);
    for (int k = 0; k < NBITS; k++) begin
      din = stream[k];
      #(DT_PS);
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_check
    initial begin
      #(T_PS / 2 + T_INS + i * DC + DT_PS / 4);
      for (int e = 0; e < NCYC; e++) begin
        if (e >= FIRST) begin
          checks++;
          if (q[i] !== stream[e * N + i]) begin
            failures++;
            if (failures < 10) $display("edge %0d stage %0d: q=%b expected %b", e, i, q[i], stream[e * N + i]);
          end
        end
        #(T_PS);
      end
    end
  end

  initial begin
    #(T_PS / 2 + (NCYC + SECTIONS + 1) * T_PS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((NCYC + 50) * T_PS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
