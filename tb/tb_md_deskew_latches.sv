// tb_md_deskew_latches: checks both uses of the out-of-phase latch bank.
// Two instances (upstream half for the sampler, downstream half for the
// generator) get the same random input, which changes at random moments
// within the clock period. After every change and every clock edge the
// testbench compares each output bit with its own model: a held bit equals
// the input as it was at the last falling clock edge, a passed bit equals
// the input now. The held/passed split is worked out from the stage's
// position in its clock section, independently of md_pkg.
module tb_md_deskew_latches;
  timeunit 1ps;
  timeprecision 1ps;
  import md_pkg::*;

  localparam int unsigned N = 64, SECTIONS = 4, SPC = N / SECTIONS;
  localparam int unsigned T_PS = 6400;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] d = '0, q_up, q_dn;
  logic [N-1:0] at_fall = '0;   // d at the last falling edge
  int checks = 0, failures = 0;

  md_deskew_latches #(.HALF(HALF_UPSTREAM))   u_up (.clk, .rst_n, .d, .q(q_up));
  md_deskew_latches #(.HALF(HALF_DOWNSTREAM)) u_dn (.clk, .rst_n, .d, .q(q_dn));

  always #(T_PS / 2) clk = ~clk;
  always @(negedge clk) at_fall <= rst_n ? d : '0;

  task automatic check_now();
    for (int i = 0; i < N; i++) begin
      bit upstream;
      logic exp_up, exp_dn;
      upstream = (i % SPC) < (SPC / 2);
      exp_up = upstream ? at_fall[i] : d[i];
      exp_dn = upstream ? d[i] : at_fall[i];
      checks += 2;
      if (q_up[i] !== exp_up) begin
        failures++;
        if (failures < 10) $display("%t upstream bank bit %0d: %b expected %b", $time, i, q_up[i], exp_up);
      end
      if (q_dn[i] !== exp_dn) begin
        failures++;
        if (failures < 10) $display("%t downstream bank bit %0d: %b expected %b", $time, i, q_dn[i], exp_dn);
      end
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    // all held bits cleared by reset
    for (int i = 0; i < N; i++) begin
      checks++;
      if (((i % SPC) < SPC / 2 ? q_up[i] : q_dn[i]) !== 1'b0) failures++;
    end
    @(posedge clk);
    rst_n = 1'b1;
    repeat (200) begin
      #($urandom_range(50, T_PS / 3));
      d = N'({$urandom, $urandom});
      #1 check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(400 * T_PS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
