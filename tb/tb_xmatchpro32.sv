// tb_xmatchpro32: end-to-end test of the compression system at its default sizes.
//
// The compressor's code words are checked one by one against the reference model,
// then carried through a queue (the channel) into the decompressor, whose output must
// be the original stream. The test makes each mechanism of the design happen and
// counts it, failing if any count stays at zero:
//   input held before start (input FIFO fills, udata_ready low), the start sequence,
//   misses, partial matches, full matches with move-to-front, dictionary overflow
//   (the back entry dropped), one-tuple-per-clock bursts through the compressor,
//   decompressor back-pressure (cdata_ready low), and a restart after reset.
// A burst of back-to-back tuples must give back-to-back code words two clocks later.
module tb_xmatchpro32;
  import xm_pkg::*;
  `include "xm_ref_model.svh"
  localparam int D = 31;     // the top's default dictionary size
  localparam int FD = 16;    // the top's default FIFO depth
  localparam int N = 6000;   // tuples per run

  logic clk = 0, reset = 1, start = 0, busy;
  logic udata_valid = 0, udata_ready;
  logic [31:0] udata = '0;
  logic code_valid, matchhit;
  logic [3:0] matchtype;
  logic [4:0] addrout;
  logic [31:0] dataout;
  logic cdata_valid = 0, cmatchhit = 0, cdata_ready;
  logic [3:0] cmatchtype = '0;
  logic [4:0] caddrin = '0;
  logic [31:0] cdatain = '0;
  logic ddata_valid, ddata_ready = 1;
  logic [31:0] ddataout;

  xmatchpro32 dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_hold = 0, n_start = 0, n_miss = 0, n_part = 0, n_full = 0, n_evict = 0;
  int n_burst = 0, n_bp = 0, n_restart = 0;
  xm_ref_model ref_m = new(D);
  ref_code_t exp_q[$];     // expected code words
  ref_code_t chan[$];      // channel from compressor to decompressor
  bit [31:0] orig_q[$];    // tuples the decompressor must give back
  int        acc_q[$];     // cycle each tuple was accepted
  int        run_len = 0, last_code = -10;
  bit        burst_mode = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Input acceptance: the model compresses each tuple the moment it is accepted.
  always @(posedge clk) begin
    if (!reset && udata_valid && udata_ready) begin
      if (ref_m.dict.size() == D && !ref_m_has(udata)) n_evict++;
      exp_q.push_back(ref_m.compress(udata));
      orig_q.push_back(udata);
      acc_q.push_back(cycle);
    end
  end

  function automatic bit ref_m_has(bit [31:0] t);
    foreach (ref_m.dict[i]) if (ref_m.dict[i] == t) return 1;
    return 0;
  endfunction

  // Compressor output: compare, then hand to the channel.
  always @(posedge clk) begin
    if (!reset && code_valid) begin
      ref_code_t e;
      int a;
      if (exp_q.size() == 0) check(0, "unexpected code word");
      else begin
        e = exp_q.pop_front();
        a = acc_q.pop_front();
        check(matchhit == e.full && matchtype == e.mtype, "match hit and type");
        check(addrout == e.loc, "address out");
        check(dataout == e.data, "data out");
        if (burst_mode) check(cycle - a == 2, "two-clock compressor latency in a burst");
        if (cycle - last_code == 1) begin
          run_len++;
          if (run_len == 32) n_burst++;
        end else run_len = 1;
        last_code = cycle;
        if (e.full) n_full++; else if (e.mtype != 0) n_part++; else n_miss++;
        chan.push_back(e);
      end
    end
  end

  // Decompressor input: take from the channel.
  always @(posedge clk) begin
    if (!reset && cdata_valid && cdata_ready) void'(chan.pop_front());
    if (!reset && cdata_valid && !cdata_ready && busy) n_bp++;
  end
  always @(negedge clk) begin
    cdata_valid = !reset && chan.size() > 0 && $urandom_range(0, 7) != 0;
    if (chan.size() > 0) begin
      cmatchhit = chan[0].full; cmatchtype = chan[0].mtype;
      caddrin = chan[0].loc; cdatain = chan[0].data;
    end
  end

  // Decompressor output: must be the original stream.
  always @(posedge clk) begin
    if (!reset && ddata_valid && ddata_ready) begin
      if (orig_q.size() == 0) check(0, "unexpected decompressed word");
      else check(ddataout == orig_q.pop_front(), "round trip");
    end
  end

  function automatic bit [31:0] rnd_tuple();
    bit [31:0] t;
    for (int b = 0; b < 4; b++) t[8*b +: 8] = 8'($urandom_range(0, 3) * 17);
    if ($urandom_range(0, 3) == 0) t = $urandom;
    return t;
  endfunction

  // Drive one tuple from a falling edge until the rising edge that accepts it.
  task automatic put(bit [31:0] t);
    @(negedge clk);
    udata_valid = 1; udata = t;
    #1;
    while (!udata_ready) begin @(negedge clk); #1; end
    @(posedge clk);
  endtask

  task automatic drain();
    @(negedge clk); udata_valid = 0; ddata_ready = 1;
    while (exp_q.size() != 0 || chan.size() != 0 || orig_q.size() != 0) @(negedge clk);
  endtask

  task automatic one_run();
    // held before start: the input FIFO fills up
    repeat (2) @(negedge clk);
    reset = 0;
    for (int i = 0; i < FD; i++) put(rnd_tuple());
    @(negedge clk); udata_valid = 1; udata = rnd_tuple();
    #1 check(!udata_ready && !busy, "input held before start");
    if (!udata_ready) n_hold++;
    udata_valid = 0;
    check(exp_q.size() == FD && !code_valid, "nothing compressed before start");
    start = 1; @(negedge clk); start = 0;
    check(busy, "control unit started");
    n_start++;
    // a back-to-back burst
    burst_mode = 0;
    for (int i = 0; i < 64; i++) put(rnd_tuple());
    drain();
    burst_mode = 1;
    for (int i = 0; i < 64; i++) put(rnd_tuple());
    drain();
    burst_mode = 0;
    // random traffic with gaps and decompressor back-pressure
    for (int n = 0; n < N; n++) begin
      ddata_ready = ((n / 200) % 3 == 2) ? 1'b0 : ($urandom_range(0, 3) != 0);
      if ($urandom_range(0, 5) == 0) begin @(negedge clk); udata_valid = 0; end
      put(rnd_tuple());
      // keep the channel bounded: the design has no output back-pressure
      while (chan.size() > 64) begin @(negedge clk); udata_valid = 0; ddata_ready = 1; end
    end
    drain();
  endtask

  initial begin
    one_run();
    // restart: reset both halves and run again from empty dictionaries
    @(negedge clk); reset = 1; ref_m.reset_dict();
    n_restart++;
    one_run();
    check(n_hold > 0, "input hold seen");
    check(n_start == 2, "start sequence seen");
    check(n_miss > 0, "misses seen");
    check(n_part > 0, "partial matches seen");
    check(n_full > 0, "full matches seen");
    check(n_evict > 0, "dictionary overflow seen");
    check(n_burst > 0, "one-per-clock bursts seen");
    check(n_bp > 0, "decompressor back-pressure seen");
    check(n_restart > 0, "restart seen");
    $display("hold=%0d start=%0d miss=%0d partial=%0d full=%0d overflow=%0d bursts=%0d backpressure=%0d restart=%0d",
             n_hold, n_start, n_miss, n_part, n_full, n_evict, n_burst, n_bp, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
