// tb_xm_decompressor: self-checking test of the X-Match decompressor.
//
// Code words are produced by the reference model's compressor from random tuples
// (misses, partial and full matches, dictionary overflow) and fed to the decompressor,
// whose output must give back the original tuples in order. Checks also that nothing
// is accepted before start, that back-pressure on the output fills the FIFO and drops
// in_ready, that a clear restarts the dictionary, and that a tuple is readable one
// clock after its code word was accepted.
module tb_xm_decompressor;
  import xm_pkg::*;
  `include "xm_ref_model.svh"
  localparam int D = 31, FD = 8;
  logic clk = 0, reset = 1, start = 0, clear = 0;
  logic in_valid = 0, match_hit = 0, in_ready;
  mtype_t match_type = '0;
  loc_t addr_in = '0;
  tuple_t data_in = '0, out_data;
  logic out_valid, out_ready = 0;
  int checks = 0, failures = 0, cycle = 0;
  int n_miss = 0, n_part = 0, n_full = 0, n_full_stall = 0;
  xm_ref_model enc = new(D);
  bit [31:0] exp_q[$];

  xm_decompressor #(.DEPTH(D), .FIFO_DEPTH(FD)) dut (.*);

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

  // Output side: every popped word must be the next original tuple.
  always @(posedge clk) begin
    if (!reset && out_valid && out_ready) begin
      if (exp_q.size() == 0) check(0, "unexpected output");
      else check(out_data == exp_q.pop_front(), "rebuilt tuple");
    end
  end

  function automatic bit [31:0] rnd_tuple();
    bit [31:0] t;
    for (int b = 0; b < 4; b++) t[8*b +: 8] = 8'($urandom_range(0, 3) * 17);
    if ($urandom_range(0, 3) == 0) t = $urandom;
    return t;
  endfunction

  // Present one code word at a falling edge and hold it until the rising edge that
  // accepts it.
  task automatic send(bit [31:0] t);
    ref_code_t c = enc.compress(t);
    if (c.full) n_full++; else if (c.mtype != 0) n_part++; else n_miss++;
    @(negedge clk);
    in_valid = 1; match_hit = c.full; match_type = c.mtype;
    addr_in = c.loc; data_in = c.data;
    #1;
    while (!in_ready) begin
      n_full_stall++;
      @(negedge clk);
      out_ready = 1;  // let the consumer catch up
      #1;
    end
    @(posedge clk);
    exp_q.push_back(t);
  endtask

  task automatic idle(int n);
    @(negedge clk); in_valid = 0;
    repeat (n) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    // before start nothing is accepted
    in_valid = 1; data_in = 32'h1234_5678;
    repeat (3) begin @(negedge clk); check(!in_ready && !out_valid, "held before start"); end
    in_valid = 0;
    start = 1; clear = 1; @(negedge clk); clear = 0;
    // latency: one code word, readable right after the accepting edge
    out_ready = 0;
    send(32'hCAFE_0001);
    #1 check(out_valid && out_data == 32'hCAFE_0001, "one-cycle latency");
    @(negedge clk); in_valid = 0; out_ready = 1;
    @(negedge clk); out_ready = 0;
    check(!out_valid, "FIFO empty again");
    // back-pressure: fill the FIFO, then in_ready must stay low
    for (int i = 0; i < FD; i++) send(rnd_tuple());
    @(negedge clk); in_valid = 0;
    check(!in_ready, "in_ready low with a full FIFO");
    out_ready = 1;
    idle(FD + 2);
    // random traffic with random output back-pressure and one clear
    for (int n = 0; n < 4000; n++) begin
      if (n == 2000) begin
        idle(1); out_ready = 1;
        while (exp_q.size() != 0) @(negedge clk);
        clear = 1; @(negedge clk); clear = 0;
        enc.reset_dict();
      end
      out_ready = $urandom_range(0, 3) != 0;
      if ($urandom_range(0, 4) == 0) idle(1);
      send(rnd_tuple());
    end
    idle(1); out_ready = 1;
    idle(FD + 4);
    check(exp_q.size() == 0, "all tuples rebuilt");
    check(n_miss > 0 && n_part > 0 && n_full > 0, "all code types seen");
    check(n_full_stall > 0, "stalls on a full output FIFO seen");
    $display("misses=%0d partial=%0d full=%0d stalls=%0d", n_miss, n_part, n_full, n_full_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
