// xm_ref_model.svh: reference model of the X-Match code, included by the testbenches.
//
// The dictionary is a SystemVerilog queue, front at index 0, so the model shares no
// structure with the shift-register RTL. compress() returns the code word the
// compressor must produce for a tuple, decompress() the tuple a code word stands for;
// both update the model's dictionary with the move-to-front rule.

  typedef struct {
    bit        full;
    bit [3:0]  mtype;
    bit [4:0]  loc;
    bit [31:0] data;
  } ref_code_t;

  class xm_ref_model;
    int unsigned depth;
    int          min_match;
    bit [31:0]   dict[$];
    bit [31:0]   last_literal;

    function new(int unsigned depth, int min_match = 2);
      this.depth = depth;
      this.min_match = min_match;
      this.last_literal = '0;
    endfunction

    function void reset_dict();
      dict.delete();
      last_literal = '0;
    endfunction

    static function int count_eq(bit [31:0] a, bit [31:0] b, output bit [3:0] m);
      int n = 0;
      for (int k = 0; k < 4; k++) begin
        m[k] = (a[8*k +: 8] == b[8*k +: 8]);
        n += int'(m[k]);
      end
      return n;
    endfunction

    // Insert or move to front, as the algorithm states it.
    function void update(bit [31:0] t, bit full, int idx);
      if (full) dict.delete(idx);
      dict.push_front(t);
      if (dict.size() > depth) void'(dict.pop_back());
    endfunction

    function ref_code_t compress(bit [31:0] t);
      ref_code_t c;
      int best = 0, bi = -1;
      bit [3:0] m, bm = '0;
      bit [31:0] keep;
      foreach (dict[i]) begin
        int n = count_eq(dict[i], t, m);
        if (n > best) begin best = n; bi = i; bm = m; end
      end
      if (best < min_match) begin bi = -1; bm = '0; end
      c.full  = (best == 4);
      c.mtype = bm;
      for (int k = 0; k < 4; k++) keep[8*k +: 8] = bm[k] ? 8'h00 : 8'hFF;
      if (!c.full) last_literal = t & keep;
      c.data = last_literal;
      update(t, c.full, bi);
      c.loc = (bi >= 0) ? 5'(bi + 1) : 5'(dict.size());
      return c;
    endfunction

    function bit [31:0] decompress(ref_code_t c);
      bit [31:0] t;
      bit [31:0] e = (c.full || c.mtype != 0) ? dict[c.loc - 1] : '0;
      for (int k = 0; k < 4; k++)
        t[8*k +: 8] = (c.full || c.mtype[k]) ? e[8*k +: 8] : c.data[8*k +: 8];
      update(t, c.full, int'(c.loc) - 1);
      return t;
    endfunction
  endclass
