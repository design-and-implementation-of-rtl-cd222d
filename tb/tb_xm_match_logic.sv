// tb_xm_match_logic: self-checking test of the match decision.
//
// Drives random hit matrices (sparse and dense) and compares found, full, location and
// match type with a plain front-to-back search for the entry with the most matching
// bytes, where an entry only replaces the current best if it has strictly more.
module tb_xm_match_logic;
  localparam int D = 31;
  logic [3:0] hit [D];
  logic found, full;
  logic [4:0] loc;
  logic [3:0] mtype;
  int checks = 0, failures = 0;
  int n_miss = 0, n_part = 0, n_full = 0;

  xm_match_logic #(.DEPTH(D)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      automatic int best = 0, bi = -1;
      automatic int density = $urandom_range(0, 3);
      for (int i = 0; i < D; i++)
        for (int b = 0; b < 4; b++)
          hit[i][b] = ($urandom_range(0, 7) < density);
      // occasionally plant a full match
      if ($urandom_range(0, 4) == 0) hit[$urandom_range(0, D-1)] = 4'hF;
      #1;
      for (int i = 0; i < D; i++)
        if ($countones(hit[i]) > best) begin best = $countones(hit[i]); bi = i; end
      if (best < 2) begin
        n_miss++;
        check(!found && !full && mtype == 4'h0, "miss");
      end else begin
        if (best == 4) n_full++; else n_part++;
        check(found && full == (best == 4), "found/full");
        check(loc == 5'(bi + 1), "location");
        check(mtype == hit[bi], "match type");
      end
    end
    check(n_miss > 0 && n_part > 0 && n_full > 0, "all outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
