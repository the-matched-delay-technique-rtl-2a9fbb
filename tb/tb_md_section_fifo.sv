// tb_md_section_fifo: checks the synchronization FIFOs in both directions.
// A random word enters every clock. After each rising edge, section k of the
// sampler-order instance must show section k of the word that entered
// SECTIONS-1-k edges earlier, and section k of the generator-order instance
// the word from k edges earlier (a section of depth 0 follows the input
// directly). The expected words come from the testbench's own history.
module tb_md_section_fifo;
  timeunit 1ps;
  timeprecision 1ps;
  import md_pkg::*;

  localparam int unsigned N = 64, SECTIONS = 4, SPC = N / SECTIONS;
  localparam int unsigned T_PS = 6400, NCYC = 200;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] d = '0, q_smp, q_gen;
  logic [N-1:0] hist [NCYC + 1];  // hist[c] = d during cycle c
  int checks = 0, failures = 0;

  md_section_fifo #(.ORDER(ORDER_SAMPLER))   u_smp (.clk, .rst_n, .d, .q(q_smp));
  md_section_fifo #(.ORDER(ORDER_GENERATOR)) u_gen (.clk, .rst_n, .d, .q(q_gen));

  always #(T_PS / 2) clk = ~clk;

  initial begin
    #1 rst_n = 1'b0;
    @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      d = N'({$urandom, $urandom});
      hist[c] = d;
      @(posedge clk);
      #(T_PS / 4);
      for (int k = 0; k < SECTIONS; k++) begin
        int ds, dg;
        logic [SPC-1:0] es, eg;
        ds = SECTIONS - 1 - k;  // sampler-order delay of section k
        dg = k;                 // generator-order delay of section k
        // a register stage has taken the word of this cycle at the edge,
        // so a delay of n shows the word of cycle c-n+1 (depth 0: cycle c+1)
        es = (ds == 0) ? d[k*SPC +: SPC] : (c - ds + 1 >= 0 ? hist[c-ds+1][k*SPC +: SPC] : '0);
        eg = (dg == 0) ? d[k*SPC +: SPC] : (c - dg + 1 >= 0 ? hist[c-dg+1][k*SPC +: SPC] : '0);
        checks += 2;
        if (q_smp[k*SPC +: SPC] !== es) begin
          failures++;
          if (failures < 10) $display("cycle %0d sampler order section %0d: %h expected %h", c, k, q_smp[k*SPC +: SPC], es);
        end
        if (q_gen[k*SPC +: SPC] !== eg) begin
          failures++;
          if (failures < 10) $display("cycle %0d generator order section %0d: %h expected %h", c, k, q_gen[k*SPC +: SPC], eg);
        end
      end
      @(negedge clk);
    end
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
