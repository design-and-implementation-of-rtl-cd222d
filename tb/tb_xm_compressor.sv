// tb_xm_compressor: self-checking test of the X-Match compressor.
//
// 1. The tuple sequence of the published compressor simulation (1 2 3 4 5 14 15 4 6 5)
//    is sent to a second instance built for full matches only (MIN_MATCH = 4), which
//    must give the locations and literal data printed there (addresses
//    1 2 3 4 5 6 7 4 8 5; data 1 2 3 4 5 14 15 6, held on the two full matches). The
//    main instance (MIN_MATCH = 2) sees the same tuples and is held to the model.
// 2. With the engine held, the input FIFO fills and in_ready drops; when released,
//    the queued tuples come out one per clock.
// 3. A long random stream over a small byte alphabet (misses, partial and full
//    matches, dictionary overflow, a clear) is compared code word by code word with the
//    queue-based reference model, and each code word must appear exactly two clocks
//    after its tuple was accepted.
module tb_xm_compressor;
  import xm_pkg::*;
  `include "xm_ref_model.svh"
  localparam int D = 31, FD = 8;
  logic clk = 0, reset = 1, en = 0, clear = 0;
  logic in_valid = 0, in_ready;
  tuple_t in_data = '0, data_out;
  logic out_valid, match_hit;
  mtype_t match_type;
  loc_t addr_out;
  int checks = 0, failures = 0;
  int cycle = 0;
  int n_miss = 0, n_part = 0, n_full = 0, n_stall = 0, n_burst = 0;
  xm_ref_model ref_m = new(D);
  ref_code_t exp_q[$];
  int        acc_q[$];
  bit        check_latency = 0;
  int        last_out_cycle = -10;

  xm_compressor #(.DEPTH(D), .FIFO_DEPTH(FD)) dut (.*);

  logic f_valid, f_hit, f_ready;
  mtype_t f_type;
  loc_t f_addr;
  tuple_t f_data;
  int f_n = 0;
  int fig_addr[10] = '{1, 2, 3, 4, 5, 6, 7, 4, 8, 5};
  int fig_data[10] = '{1, 2, 3, 4, 5, 14, 15, 15, 6, 6};
  int fig_in[10]   = '{1, 2, 3, 4, 5, 14, 15, 4, 6, 5};
  bit fig_hit[10]  = '{0, 0, 0, 0, 0, 0, 0, 1, 0, 1};
  bit fig_phase = 1;

  xm_compressor #(.DEPTH(D), .FIFO_DEPTH(FD), .MIN_MATCH(4)) dut_fig (
    .clk, .reset, .en, .clear, .in_valid(in_valid && fig_phase), .in_data, .in_ready(f_ready),
    .out_valid(f_valid), .match_hit(f_hit), .match_type(f_type), .addr_out(f_addr),
    .data_out(f_data));

  always @(posedge clk) begin
    if (!reset && f_valid) begin
      if (f_n < 10) begin
        check(int'(f_addr) == fig_addr[f_n], "published address sequence");
        check(int'(f_data) == fig_data[f_n], "published data sequence");
        check(f_hit == fig_hit[f_n], "published match hits");
        check(f_type == (fig_hit[f_n] ? 4'hF : 4'h0), "full-or-miss match type");
      end else check(0, "extra code word from full-match instance");
      f_n++;
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor: compare each code word with the model's prediction.
  always @(posedge clk) begin
    if (!reset && out_valid) begin
      ref_code_t e;
      int a;
      if (exp_q.size() == 0) check(0, "unexpected code word");
      else begin
        e = exp_q.pop_front();
        a = acc_q.pop_front();
        check(match_hit == e.full, "match hit");
        check(match_type == e.mtype, "match type");
        check(addr_out == e.loc, "address");
        check(data_out == e.data, "literal data");
        if (check_latency) check(cycle - a == 2, "two-cycle latency");
        if (cycle - last_out_cycle == 1) n_burst++;
        last_out_cycle = cycle;
        if (e.full) n_full++; else if (e.mtype != 0) n_part++; else n_miss++;
      end
    end
  end

  // Drive one tuple; waits while in_ready is low. in_valid stays high afterwards.
  task automatic send(bit [31:0] t);
    in_valid <= 1; in_data <= t;
    @(posedge clk);
    while (!in_ready) begin n_stall++; @(posedge clk); end
    exp_q.push_back(ref_m.compress(t));
    acc_q.push_back(cycle);
  endtask

  function automatic bit [31:0] rnd_tuple();
    bit [31:0] t;
    for (int b = 0; b < 4; b++) t[8*b +: 8] = 8'($urandom_range(0, 3) * 17);
    if ($urandom_range(0, 3) == 0) t = $urandom;
    return t;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    reset <= 0; en <= 1;
    @(posedge clk);
    // 1. published sequence
    for (int i = 0; i < 10; i++) send(32'(fig_in[i]));
    in_valid <= 0;
    repeat (4) @(posedge clk);
    check(exp_q.size() == 0, "published sequence drained");
    check(f_n == 10, "published sequence complete");
    fig_phase = 0;
    // 2. hold the engine: FIFO fills, in_ready falls
    clear <= 1; en <= 0; @(posedge clk); clear <= 0; ref_m.reset_dict();
    for (int i = 0; i < FD; i++) begin
      in_valid <= 1; in_data <= rnd_tuple();
      @(posedge clk);
      exp_q.push_back(ref_m.compress(in_data)); acc_q.push_back(cycle);
    end
    in_valid <= 0;
    @(posedge clk); #1;
    check(!in_ready, "in_ready low when FIFO full");
    check(exp_q.size() == FD, "nothing leaves while held");
    n_stall++;
    en <= 1;
    repeat (FD + 3) @(posedge clk);
    check(exp_q.size() == 0, "queued tuples drained");
    // 3. random stream, exact latency
    check_latency = 1;
    for (int n = 0; n < 3000; n++) begin
      if (n == 1500) begin
        in_valid <= 0;
        repeat (3) @(posedge clk);
        clear <= 1; @(posedge clk); clear <= 0; ref_m.reset_dict();
      end
      if ($urandom_range(0, 3) == 0) begin in_valid <= 0; @(posedge clk); end
      send(rnd_tuple());
    end
    in_valid <= 0;
    repeat (4) @(posedge clk);
    check(exp_q.size() == 0, "all code words seen");
    check(n_miss > 0 && n_part > 0 && n_full > 0, "miss, partial and full matches seen");
    check(n_stall > 0 && n_burst > 100, "stall and one-per-clock bursts seen");
    $display("misses=%0d partial=%0d full=%0d stalls=%0d", n_miss, n_part, n_full, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
