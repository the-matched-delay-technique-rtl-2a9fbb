// md_top: a continuous matched delay sampler and a continuous matched delay
// generator, side by side on one clock.
//
// Matched delays give a timing resolution equal to the difference of two
// propagation delays, dt = |Dc - Dd|, instead of one gate delay, while the
// clock runs only at 1/N of the sample rate. Here:
//   * Sampler (deserializer): md_sampler_core takes N samples of smp_din,
//     dt apart, on every clock edge; md_sampler_align (deskew latches,
//     synchronization FIFOs, output register) turns them into smp_word, N
//     consecutive samples per clock, bit 0 earliest.
//   * Generator (serializer): each clock a word of N samples, taken from
//     gen_word or, with gen_src_mem high, from the sample memory
//     md_pattern_mem, is XOR-encoded into edge marks (md_gen_encoder),
//     aligned to the clock edges in flight (md_gen_align: FIFOs and
//     out-of-phase latches) and turned into edges dt apart on gen_dout by
//     the toggle latches and XOR chain of md_generator_core.
// The two delay-line cores are behavioural timing models; everything else is
// synthesizable. The source multiplexer in front of the encoder is this
// design's choice.
//
// Clock: period T = N*DT_PS ps (6.4 ns, 156.25 MHz at the defaults: 64
// stages, 100 ps resolution), with SECTIONS clock edges in flight in each
// delay line: Dc = T/(N/SECTIONS) = SECTIONS*dt (400 ps), Dd = Dc - dt
// (300 ps).
// Latency: smp_word holds the samples taken on clock edge e (the input from
// e*T + T_INS_PS onward) at rising edge e+SECTIONS. A word accepted on
// rising edge c (gen_word, or the memory word shown at c) starts on gen_dout
// at c*T + (SECTIONS-1)*T + T_INS_PS, bit i at +i*dt.
module md_top #(
  parameter int unsigned N        = 64,
  parameter int unsigned SECTIONS = 4,
  parameter int unsigned DT_PS    = 100,
  parameter int unsigned T_INS_PS = (SECTIONS * DT_PS) / 2,
  parameter int unsigned SAMPLES  = 512,
  localparam int unsigned AW      = (SAMPLES / N > 1) ? $clog2(SAMPLES / N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // sampler
  input  logic          smp_din,
  output logic [N-1:0]  smp_word,
  output logic          smp_valid,
  // generator
  input  logic          gen_src_mem,    // 1: play the sample memory, 0: gen_word
  input  logic [N-1:0]  gen_word,
  input  logic          mem_we,
  input  logic [AW-1:0] mem_waddr,
  input  logic [N-1:0]  mem_wdata,
  input  logic          mem_play,
  input  logic [AW-1:0] mem_last_addr,
  output logic          mem_wrap,
  output logic          gen_dout
);
  timeunit 1ps;
  timeprecision 1ps;

  // ---------------- sampler ----------------
  logic [N-1:0] smp_q;

  md_sampler_core #(.N(N), .SECTIONS(SECTIONS), .DT_PS(DT_PS), .T_INS_PS(T_INS_PS)) u_smp_core (
    .clk, .din(smp_din), .q(smp_q)
  );

  md_sampler_align #(.N(N), .SECTIONS(SECTIONS)) u_smp_align (
    .clk, .rst_n, .q_core(smp_q), .word(smp_word), .valid(smp_valid)
  );

  // ---------------- generator ----------------
  logic [N-1:0] mem_word;
  logic [N-1:0] gen_src;
  logic [N-1:0] gen_e;
  logic [N-1:0] gen_t;

  md_pattern_mem #(.N(N), .SAMPLES(SAMPLES)) u_mem (
    .clk, .rst_n,
    .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .play(mem_play), .last_addr(mem_last_addr),
    .word(mem_word), .wrap(mem_wrap)
  );

  assign gen_src = gen_src_mem ? mem_word : gen_word;

  md_gen_encoder #(.N(N)) u_enc (
    .clk, .rst_n, .d(gen_src), .e(gen_e)
  );

  md_gen_align #(.N(N), .SECTIONS(SECTIONS)) u_gen_align (
    .clk, .rst_n, .e(gen_e), .t(gen_t)
  );

  md_generator_core #(.N(N), .SECTIONS(SECTIONS), .DT_PS(DT_PS), .T_INS_PS(T_INS_PS)) u_gen_core (
    .clk, .rst_n, .t(gen_t), .dout(gen_dout)
  );
endmodule
