// tb_xm_fifo: self-checking test of the synchronous FIFO.
//
// Random pushes and pops, including pushes while full and pops while empty being
// avoided by the driver, are compared against a queue. Checks data order, the full,
// empty and count outputs, and that a word pushed at one edge is readable after it.
module tb_xm_fifo;
  localparam int W = 32, D = 8;
  logic clk = 0, reset = 1;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  int saw_full = 0, saw_empty = 0;
  bit [W-1:0] model[$];

  xm_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    // latency: a single word is readable right after the edge that pushed it
    wr_en <= 1; wr_data <= 32'hA5A5_0001;
    @(posedge clk); wr_en <= 0;
    #1 check(!empty && rd_data == 32'hA5A5_0001 && count == 1, "one-cycle latency");
    rd_en <= 1; @(posedge clk); rd_en <= 0;
    #1 check(empty && count == 0, "empty after pop");
    for (int n = 0; n < 1500; n++) begin
      bit do_w, do_r;
      automatic bit [W-1:0] d = $urandom;
      // bias phases so the FIFO both fills and drains
      do_w = ((n / 100) % 2 == 0) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      do_r = ((n / 100) % 2 == 0) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      do_w = do_w && !full;
      do_r = do_r && !empty;
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      check(int'(count) == model.size(), "count");
      if (!empty) check(rd_data == model[0], "head data");
      if (full) saw_full++;
      if (empty) saw_empty++;
      wr_en <= do_w; wr_data <= d; rd_en <= do_r;
      @(posedge clk);
      if (do_r) void'(model.pop_front());
      if (do_w) model.push_back(d);
      #1;
    end
    check(saw_full > 0 && saw_empty > 0, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
