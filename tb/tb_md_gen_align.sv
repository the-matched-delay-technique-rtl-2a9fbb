// tb_md_gen_align: feeds a random encoded word E[c] into md_gen_align on
// every rising edge c (as md_gen_encoder would) and checks every toggle
// enable at the moment its toggle latch is clocked. The latch of stage i
// is clocked by edge c at (edge c) + T_INS + i*Dc, more than a period later
// for the far stages; t[i] must then hold bit i of E[c], and must not change
// within Dc/4 on either side of that moment.
module tb_md_gen_align;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 64, SECTIONS = 4, DT_PS = 100;
  localparam int unsigned T_PS = N * DT_PS;
  localparam int unsigned DC = SECTIONS * DT_PS;
  localparam int unsigned T_INS = DC / 2;
  localparam int unsigned NCYC = 200, FIRST = 3;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] e = '0, t;
  logic [N-1:0] ew [NCYC + 8];
  int checks = 0, failures = 0;

  md_gen_align dut (.clk, .rst_n, .e, .t);

  always #(T_PS / 2) clk = ~clk;  // rising edge c at T/2 + c*T

  initial for (int c = 0; c < NCYC + 8; c++) ew[c] = N'({$urandom, $urandom});

  // e changes 1 ps after each rising edge, like a register output
  initial begin
    #1 rst_n = 1'b0;
    #(T_PS / 2);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC + 8; c++) begin
      e = ew[c];
      @(posedge clk);
      #1;
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_check
    initial begin
      logic t_early;
      #(T_PS / 2 + T_INS + i * DC - DC / 4);
      for (int c = 0; c < NCYC; c++) begin
        t_early = t[i];
        #(DC / 4);
        if (c >= FIRST) begin
          checks++;
          if (t[i] !== ew[c][i] || t_early !== t[i]) begin
            failures++;
            if (failures < 10) $display("edge %0d stage %0d: t=%b (Dc/4 before: %b) expected %b", c, i, t[i], t_early, ew[c][i]);
          end
        end
        #(DC / 4);
        if (c >= FIRST) begin
          checks++;
          if (t[i] !== ew[c][i]) failures++;
        end
        #(T_PS - DC / 2);
      end
    end
  end

  initial begin
    #(T_PS / 2 + (NCYC + SECTIONS + 2) * T_PS);
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
