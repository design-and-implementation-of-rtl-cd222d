// tb_xmatchpro32_fig: the two published simulation runs, replayed on the whole system.
//
// The system is built to send full matches only (MIN_MATCH = 4), which is what the
// published waveforms show, and its compressor output is wired straight into its
// decompressor input. Run 1 is the compressor run (tuples 1 2 3 4 5 14 15 4 6 5:
// addresses 1 2 3 4 5 6 7 4 8 5, literal data 1 2 3 4 5 14 15 6, full matches on the
// repeated 4 and 5). Run 2 is the compressor/decompressor run (tuples 0 1 2 3 4 5 6 26
// 27 28 5 6: addresses 1 to 9 for the first nine, 5 for the repeated 5, literal data
// 0 1 2 3 4 5 6 26 27 28, full matches on the repeated 5 and 6). In both runs the
// decompressor must give back the input tuples. The run is back to back, one tuple per
// clock.
module tb_xmatchpro32_fig;
  logic clk = 0, reset = 1, start = 0, busy;
  logic udata_valid = 0, udata_ready;
  logic [31:0] udata = '0;
  logic code_valid, matchhit;
  logic [3:0] matchtype;
  logic [4:0] addrout;
  logic [31:0] dataout;
  logic cdata_ready;
  logic ddata_valid;
  logic [31:0] ddataout;

  xmatchpro32 #(.MIN_MATCH(4)) dut (
    .clk, .reset, .start, .busy,
    .udata_valid, .udata, .udata_ready,
    .code_valid, .matchhit, .matchtype, .addrout, .dataout,
    .cdata_valid(code_valid), .cmatchhit(matchhit), .cmatchtype(matchtype),
    .caddrin(addrout), .cdatain(dataout), .cdata_ready,
    .ddata_valid, .ddataout, .ddata_ready(1'b1)
  );

  int checks = 0, failures = 0;
  int ins[$], addrs[$], datas[$], hits[$];
  int n_code = 0, n_out = 0;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (index %0d)", what, n_code); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!reset && code_valid) begin
      if (addrs[n_code] >= 0) check(int'(addrout) == addrs[n_code], "published address");
      check(int'(dataout) == datas[n_code], "published data");
      check(matchhit == hits[n_code][0], "published match hit");
      check(cdata_ready, "decompressor keeps up");
      n_code++;
    end
    if (!reset && ddata_valid) begin
      check(int'(ddataout) == ins[n_out], "round trip");
      n_out++;
    end
  end

  task automatic run(int in_t[], int a_t[], int d_t[], int h_t[]);
    ins = in_t; addrs = a_t; datas = d_t; hits = h_t;
    n_code = 0; n_out = 0;
    @(negedge clk); reset = 1;
    repeat (2) @(negedge clk);
    reset = 0; start = 1;
    @(negedge clk); start = 0;
    @(negedge clk);
    foreach (in_t[i]) begin
      udata_valid = 1; udata = 32'(in_t[i]);
      @(negedge clk);
    end
    udata_valid = 0;
    repeat (6) @(negedge clk);
    check(n_code == in_t.size() && n_out == in_t.size(), "all words through");
  endtask

  initial begin
    // -1: the address is not legible in the published waveform and is not checked
    run('{1, 2, 3, 4, 5, 14, 15, 4, 6, 5},
        '{1, 2, 3, 4, 5, 6, 7, 4, 8, 5},
        '{1, 2, 3, 4, 5, 14, 15, 15, 6, 6},
        '{0, 0, 0, 0, 0, 0, 0, 1, 0, 1});
    run('{0, 1, 2, 3, 4, 5, 6, 26, 27, 28, 5, 6},
        '{1, 2, 3, 4, 5, 6, 7, 8, 9, -1, 5, -1},
        '{0, 1, 2, 3, 4, 5, 6, 26, 27, 28, 28, 28},
        '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 1});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
