// tb_xm_cam: self-checking test of the move-to-front dictionary and its comparators.
//
// Random updates (inserts and move-to-front of a random valid location) are applied to
// the dictionary and to a queue model. After each edge every location is read back
// through the read port, the byte hit matrix is checked for a random search tuple and
// for one taken from the dictionary, and the occupancy is compared. Tuples are built
// from a small byte alphabet so that byte matches are common.
module tb_xm_cam;
  import xm_pkg::*;
  localparam int D = 31;
  logic clk = 0, reset = 1, clear = 0;
  tuple_t search_data = '0, rd_data, upd_data = '0;
  logic [3:0] hit [D];
  loc_t rd_loc = '0, upd_loc = '0, occupancy;
  logic upd_en = 0, upd_full = 0;
  int checks = 0, failures = 0, n_evict = 0, n_mtf = 0;
  bit [31:0] model[$];

  xm_cam #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic bit [31:0] rnd_tuple();
    bit [31:0] t;
    for (int b = 0; b < 4; b++) t[8*b +: 8] = 8'($urandom_range(0, 3));
    return t;
  endfunction

  task automatic check_all();
    bit [31:0] s;
    check(int'(occupancy) == model.size(), "occupancy");
    foreach (model[i]) begin
      rd_loc = 5'(i + 1); #0.1;
      check(rd_data == model[i], "read by location");
    end
    for (int k = 0; k < 2; k++) begin
      s = (k == 0 || model.size() == 0) ? rnd_tuple() : model[$urandom_range(0, model.size()-1)];
      search_data = s; #0.1;
      for (int i = 0; i < D; i++)
        for (int b = 0; b < 4; b++)
          check(hit[i][b] == (i < model.size() && model[i][8*b +: 8] == s[8*b +: 8]), "hit matrix");
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    reset <= 0;
    @(posedge clk); #1;
    check(occupancy == 0, "empty after reset");
    for (int n = 0; n < 600; n++) begin
      automatic bit [31:0] t = rnd_tuple();
      automatic bit f = model.size() > 0 && $urandom_range(0, 2) == 0;
      automatic int p = f ? $urandom_range(0, model.size() - 1) : 0;
      if (n == 400) begin
        clear <= 1; @(posedge clk); clear <= 0; #1;
        model.delete();
        check(occupancy == 0, "empty after clear");
      end
      upd_en <= $urandom_range(0, 5) != 0;
      upd_full <= f;
      upd_loc <= 5'(p + 1);
      upd_data <= f ? model[p] : t;
      @(posedge clk); #1;
      if (upd_en) begin
        if (f) begin
          automatic bit [31:0] m = model[p];
          model.delete(p); model.push_front(m); n_mtf++;
        end else begin
          model.push_front(t);
          if (model.size() > D) begin void'(model.pop_back()); n_evict++; end
        end
      end
      upd_en <= 0;
      check_all();
    end
    check(n_evict > 0 && n_mtf > 0, "eviction and move-to-front both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
