// tb_xm_control: self-checking test of the control unit's start sequence.
//
// Checks that the engines stay held after reset, that a start request gives exactly
// one clear cycle followed by the run state two edges after start, that later start
// requests change nothing, and that reset returns the unit to idle.
module tb_xm_control;
  logic clk = 0, reset = 1, start = 0;
  logic dict_clear, comp_en, decomp_start, busy;
  int checks = 0, failures = 0;

  xm_control dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run = 0; run < 3; run++) begin
      reset <= 1; start <= 0;
      repeat (2) @(posedge clk);
      reset <= 0;
      repeat (run + 2) begin
        @(posedge clk); #1;
        check(!dict_clear && !comp_en && !decomp_start && !busy, "idle holds engines");
      end
      start <= 1;
      @(posedge clk); start <= 0; #1;
      check(dict_clear && !comp_en && !decomp_start && busy, "clear cycle");
      @(posedge clk); #1;
      check(!dict_clear && comp_en && decomp_start && busy, "run after clear");
      repeat (5) begin
        start <= $urandom_range(0, 1);
        @(posedge clk); #1;
        check(!dict_clear && comp_en && decomp_start, "run holds, start ignored");
      end
      start <= 0;
    end
    reset <= 1; @(posedge clk); #1;
    check(!busy && !comp_en, "reset returns to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
