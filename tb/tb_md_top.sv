// tb_md_top: end-to-end test of md_top at its default parameters.
//
// The generator's serial output is looped back to the sampler's input
// through a wire model with a transport delay of T - dt/2, which puts every
// sampling instant in the middle of a generated bit. Two independent checks
// run on every word after reset:
//   * gen_dout is sampled by the testbench in the middle of each bit period,
//     at (edge c) + (SECTIONS-1)*T + T_INS + i*dt + dt/2, and compared with
//     bit i of the word the generator accepted on edge c;
//   * smp_word at rising edge m must equal the word accepted on edge m-2*SECTIONS
//     (SECTIONS-1 clocks through the generator, one through the wire, SECTIONS
//     through the sampler) -- this also checks the sampler's latency.
// The test runs random words from gen_word, loads the 512-sample memory,
// plays a short and the full pattern from it, and switches the source back
// and forth. It counts the mechanisms of the design and fails if one never
// happened: edges at word boundaries (bit 0 against the previous word's last
// bit), edges inside words, memory wrap-arounds, source switches, deskewed
// sampler bits and out-of-phase generator bits carrying a one.
module tb_md_top;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N        = 64;
  localparam int unsigned SECTIONS = 4;
  localparam int unsigned DT_PS    = 100;
  localparam int unsigned T_INS_PS = (SECTIONS * DT_PS) / 2;
  localparam int unsigned SAMPLES  = 512;
  localparam int unsigned WORDS    = SAMPLES / N;
  localparam int unsigned AW       = $clog2(WORDS);
  localparam int unsigned T_PS     = N * DT_PS;
  localparam int unsigned MAXC     = 600;   // clock cycles of the test
  localparam int unsigned FIRST    = 6;     // first checked word
  localparam int unsigned SHORT    = WORDS / 2 - 1;  // last word of the short pattern
  localparam int unsigned FULLPLAY = 4 * WORDS + 20;  // cycles of full-memory playback

  logic          clk = 1'b0;
  logic          rst_n = 1'b1;
  logic          smp_din = 1'b0;
  logic [N-1:0]  smp_word;
  logic          smp_valid;
  logic          gen_src_mem = 1'b0;
  logic [N-1:0]  gen_word = '0;
  logic          mem_we = 1'b0;
  logic [AW-1:0] mem_waddr = '0;
  logic [N-1:0]  mem_wdata = '0;
  logic          mem_play = 1'b0;
  logic [AW-1:0] mem_last_addr = '0;
  logic          mem_wrap;
  logic          gen_dout;

  md_top dut (.*);

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_boundary_edges = 0, n_inner_edges = 0, n_wraps = 0, n_switches = 0;
  int n_deskew_ones = 0, n_oop_ones = 0, n_full_pattern = 0;

  always #(T_PS / 2) clk = ~clk;  // rising edges at (c + 1/2) * T

  // loop-back wire: transport delay T - dt/2
  task automatic wire_delay(input logic v);
    fork
      begin
        #(T_PS - DT_PS / 2);
        smp_din = v;
      end
    join_none
  endtask
  always @(gen_dout) wire_delay(gen_dout);

  // ---------------- reference model of the word source ----------------
  logic [N-1:0] pattern [WORDS];
  logic [N-1:0] exp_mem_word = '0;
  int unsigned  exp_ptr = 0;
  logic [N-1:0] hist [MAXC + 8];  // word accepted by the generator on edge c
  int unsigned  cyc = 0;          // number of rising edges so far
  logic         prev_src = 1'b0;

  always @(posedge clk) begin
    logic [N-1:0] acc;
    acc = gen_src_mem ? exp_mem_word : gen_word;
    hist[cyc] = acc;
    if (cyc > FIRST) begin
      if (acc[0] != hist[cyc-1][N-1]) n_boundary_edges++;
      if (((acc ^ (acc >> 1)) & {1'b0, {(N-1){1'b1}}}) != '0) n_inner_edges++;
    end
    if (gen_src_mem != prev_src) n_switches++;
    prev_src = gen_src_mem;
    if (!rst_n || !mem_play) begin
      exp_mem_word <= '0;
      exp_ptr      <= 0;
    end else begin
      exp_mem_word <= pattern[exp_ptr];
      exp_ptr      <= (exp_ptr == int'(mem_last_addr)) ? 0 : exp_ptr + 1;
    end
    if (mem_wrap) begin
      n_wraps++;
      if (mem_last_addr == AW'(WORDS - 1)) n_full_pattern++;
    end
    cyc <= cyc + 1;
  end

  // ---------------- serial output check ----------------
  initial begin
    #(T_PS / 2 + (SECTIONS - 1) * T_PS + T_INS_PS + DT_PS / 2);
    for (int c = 0; c < MAXC - SECTIONS - 2; c++) begin
      for (int i = 0; i < N; i++) begin
        if (c >= FIRST) begin
          checks++;
          if (gen_dout !== hist[c][i]) begin
            failures++;
            if (failures < 10)
              $display("gen_dout word %0d bit %0d: got %0b expected %0b", c, i, gen_dout, hist[c][i]);
          end
        end
        #(DT_PS);
      end
    end
  end

  // ---------------- sampler word check (loop-back) ----------------
  always @(negedge clk) begin
    if (cyc >= FIRST + 2 * SECTIONS + 1) begin
      checks++;
      if (smp_word !== hist[cyc - 1 - 2 * SECTIONS] || !smp_valid) begin
        failures++;
        if (failures < 10)
          $display("smp_word at edge %0d: got %h expected %h", cyc - 1, smp_word,
                   hist[cyc - 1 - 2 * SECTIONS]);
      end
    end
    // internal activity of the alignment parts
    for (int i = 0; i < N; i++) begin
      if (md_pkg::in_half(i, N, SECTIONS, md_pkg::HALF_UPSTREAM) && dut.u_smp_align.deskewed[i])
        n_deskew_ones++;
      if (md_pkg::in_half(i, N, SECTIONS, md_pkg::HALF_DOWNSTREAM) && dut.u_gen_align.t[i])
        n_oop_ones++;
    end
  end

  // ---------------- stimulus ----------------
  task automatic cycles(input int n, input bit random_words);
    repeat (n) begin
      @(negedge clk);
      if (random_words) gen_word = N'({$urandom, $urandom});
    end
  endtask

  initial begin
    for (int w = 0; w < WORDS; w++) pattern[w] = N'({$urandom, $urandom});
    #(1) rst_n = 1'b0;  // asynchronous reset acts on its falling edge
    cycles(3, 1'b1);
    rst_n = 1'b1;
    // 1. random words straight into the generator
    cycles(120, 1'b1);
    // 2. load the sample memory while random words keep flowing
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      gen_word  = N'({$urandom, $urandom});
      mem_we    = 1'b1;
      mem_waddr = AW'(w);
      mem_wdata = pattern[w];
    end
    @(negedge clk);
    mem_we = 1'b0;
    // 3. play a short pattern (the first SHORT+1 words) from the memory
    mem_last_addr = AW'(SHORT);
    mem_play      = 1'b1;
    @(negedge clk);
    gen_src_mem = 1'b1;
    cycles(60, 1'b0);
    // 4. back to gen_word
    gen_src_mem = 1'b0;
    mem_play    = 1'b0;
    cycles(60, 1'b1);
    // 5. play the whole 512-sample memory several times
    mem_last_addr = AW'(WORDS - 1);
    mem_play      = 1'b1;
    @(negedge clk);
    gen_src_mem = 1'b1;
    cycles(FULLPLAY, 1'b0);
    gen_src_mem = 1'b0;
    mem_play    = 1'b0;
    cycles(MAXC - 3 - 120 - WORDS - 3 - 60 - 60 - FULLPLAY - 2 - 10, 1'b1);
    // let the last checks finish
    wait (cyc >= MAXC - SECTIONS - 2);
    if (n_boundary_edges == 0) begin failures++; $display("no edge at a word boundary"); end
    if (n_inner_edges    == 0) begin failures++; $display("no edge inside a word"); end
    if (n_wraps          == 0) begin failures++; $display("memory never wrapped"); end
    if (n_full_pattern   == 0) begin failures++; $display("full 512-sample pattern never played"); end
    if (n_switches       <  2) begin failures++; $display("source never switched both ways"); end
    if (n_deskew_ones    == 0) begin failures++; $display("deskew latches never held a one"); end
    if (n_oop_ones       == 0) begin failures++; $display("out-of-phase latches never held a one"); end
    $display("mechanisms: boundary_edges=%0d inner_edges=%0d wraps=%0d full_patterns=%0d switches=%0d deskew_ones=%0d oop_ones=%0d",
             n_boundary_edges, n_inner_edges, n_wraps, n_full_pattern, n_switches, n_deskew_ones, n_oop_ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #((MAXC + 50) * T_PS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
