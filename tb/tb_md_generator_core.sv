// tb_md_generator_core: drives the toggle enables of the generator model
// the way md_gen_align does, a random word R[e] per clock edge with bit i
// stable from Dc/2 before to Dc/2 after the moment stage i is clocked,
// (edge e) + T_INS + i*Dc. The testbench keeps its own serial level, which
// flips at every set bit taken in serial order, and checks dout in the
// middle of every bit period: bit i of edge e lasts from
// (edge e) + T_INS + N*Dd + i*dt for dt. Both the dt spacing of edges and
// the latency N*Dd = (SECTIONS-1)*T are checked this way.
module tb_md_generator_core;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 64, SECTIONS = 4, DT_PS = 100;
  localparam int unsigned T_PS = N * DT_PS;
  localparam int unsigned DC = SECTIONS * DT_PS;
  localparam int unsigned DD = DC - DT_PS;
  localparam int unsigned T_INS = DC / 2;
  localparam int unsigned NCYC = 150, FIRST = 2;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] t = '0;
  logic dout;
  logic [N-1:0] r [NCYC + 8];
  logic [N-1:0] level [NCYC + 8];  // expected serial level of each bit
  int checks = 0, failures = 0, edges = 0;

  md_generator_core dut (.clk, .rst_n, .t, .dout);

  always #(T_PS / 2) clk = ~clk;

  initial begin
    logic lv;
    lv = 1'b0;
    for (int e = 0; e < NCYC + 8; e++) begin
      r[e] = (e < FIRST) ? '0 : N'({$urandom, $urandom});
      for (int i = 0; i < N; i++) begin
        lv = lv ^ r[e][i];
        level[e][i] = lv;
        edges += int'(r[e][i]);
      end
    end
    #1 rst_n = 1'b0;
    #(T_PS / 4) rst_n = 1'b1;
  end

  for (genvar i = 0; i < N; i++) begin : g_drive
    initial begin
      #(T_PS / 2 + T_INS + i * DC - DC / 2);
      for (int e = 0; e < NCYC + 4; e++) begin
        t[i] = r[e][i];
        #(T_PS);
      end
    end
  end

  initial begin
    #(T_PS / 2 + T_INS + N * DD + DT_PS / 2);
    for (int e = 0; e < NCYC; e++) begin
      for (int i = 0; i < N; i++) begin
        checks++;
        if (dout !== level[e][i]) begin
          failures++;
          if (failures < 10) $display("edge %0d bit %0d: dout=%b expected %b", e, i, dout, level[e][i]);
        end
        #(DT_PS);
      end
    end
    checks++;
    if (edges == 0) failures++;
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
