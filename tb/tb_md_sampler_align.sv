// tb_md_sampler_align: drives md_sampler_align the way the sampler core
// does and checks that it re-assembles whole words with the stated latency.
// For every clock edge e a random word W[e] plays the role of the N samples
// taken on that edge; bit i is put on q_core[i] at
// (edge e) + T_INS + i*Dc, i.e. stage by stage down the clock delay line,
// with several edges in flight. At rising edge e+SECTIONS the output word
// must equal W[e] and valid must be high once the pipeline has filled.
module tb_md_sampler_align;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 64, SECTIONS = 4, DT_PS = 100;
  localparam int unsigned T_PS = N * DT_PS;
  localparam int unsigned DCX = SECTIONS * DT_PS;  // clock delay per stage
  localparam int unsigned T_INS = DCX / 2;
  localparam int unsigned NCYC = 300;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] q_core = '0, word;
  logic valid;
  logic [N-1:0] w [NCYC + SECTIONS + 8];
  int checks = 0, failures = 0, latency_seen = -1;
  int unsigned cyc = 0;

  md_sampler_align dut (.clk, .rst_n, .q_core, .word, .valid);

  always #(T_PS / 2) clk = ~clk;  // rising edge e at T/2 + e*T

  initial for (int e = 0; e < NCYC + SECTIONS + 8; e++) w[e] = N'({$urandom, $urandom});

  // stage i of the core: output changes at edge + T_INS + i*Dc
  for (genvar i = 0; i < N; i++) begin : g_stage
    initial begin
      #(T_PS / 2 + T_INS + i * DCX);
      for (int e = 0; e < NCYC + SECTIONS + 4; e++) begin
        q_core[i] = w[e][i];
        #(T_PS);
      end
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    #(T_PS) rst_n = 1'b1;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // after rising edge m (cyc == m+1 at the falling edge) word must be W[m-SECTIONS]
  always @(negedge clk) begin
    if (cyc >= SECTIONS + 3 && cyc < NCYC) begin
      checks++;
      if (word !== w[cyc - 1 - SECTIONS] || !valid) begin
        failures++;
        if (failures < 10) $display("edge %0d: word %h expected %h valid %b", cyc - 1, word, w[cyc - 1 - SECTIONS], valid);
      end
    end
    if (cyc == NCYC) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    #((NCYC + 50) * T_PS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
