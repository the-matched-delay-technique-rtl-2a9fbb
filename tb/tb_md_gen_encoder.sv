// tb_md_gen_encoder: random words go into the encoder one per clock; the
// testbench rebuilds the serial bit stream bit by bit and marks every bit
// that differs from the bit before it (the first bit of a word against the
// last bit of the previous word, a 0 before the first word after reset).
// The registered output must equal those marks one clock later. Runs of
// equal and alternating words are mixed in so that both all-zero and
// all-one encodings occur.
module tb_md_gen_encoder;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 64, T_PS = 6400, NCYC = 300;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] d = '0, e;
  logic prev_serial;
  int checks = 0, failures = 0;

  md_gen_encoder dut (.clk, .rst_n, .d, .e);

  always #(T_PS / 2) clk = ~clk;

  initial begin
    #1 rst_n = 1'b0;
    @(negedge clk);
    checks++;
    if (e !== '0) failures++;
    rst_n = 1'b1;
    prev_serial = 1'b0;
    for (int c = 0; c < NCYC; c++) begin
      logic [N-1:0] expected;
      case (c % 10)
        3:       d = '1;
        4:       d = '1;
        5:       d = {(N/2){2'b01}};
        default: d = N'({$urandom, $urandom});
      endcase
      for (int i = 0; i < N; i++) begin
        expected[i] = d[i] ^ prev_serial;
        prev_serial = d[i];
      end
      @(negedge clk);
      checks++;
      if (e !== expected) begin
        failures++;
        if (failures < 10) $display("word %0d (%h): e=%h expected %h", c, d, e, expected);
      end
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
