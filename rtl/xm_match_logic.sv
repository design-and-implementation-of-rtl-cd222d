// xm_match_logic: match decision of the X-Match compressor.
//
// Takes the CAM hit matrix and decides what is sent for the tuple: the location of the
// best entry and the match type (which bytes matched). The best entry is the one with
// the most matching bytes; between equals, the one nearest the front wins, so the most
// recently used tuple is preferred. Fewer than two matching bytes is a miss, four a
// full match, two or three a partial match. The two-byte threshold and the three
// outcomes follow the X-Match algorithm; the front-most tie break and allowing every
// mask with two or more bytes are this design's choices.
//
// MIN_MATCH sets the threshold: 2 as the algorithm states it, or 4 to send full matches
// only, which is what the published simulation waveforms show.
//
// Purely combinational. loc is 1-based (front = 1) and valid only when found is high.
module xm_match_logic
  import xm_pkg::*;
#(
  parameter int unsigned DEPTH     = MAX_DEPTH,
  parameter int unsigned MIN_MATCH = MIN_MATCH_DEF  // bytes needed for a partial match
) (
  input  logic [BYTES-1:0] hit [DEPTH],
  output logic   found,   // at least two bytes matched somewhere
  output logic   full,    // all four bytes matched
  output loc_t   loc,
  output mtype_t mtype    // MTYPE_MISS when !found
);
  localparam int unsigned CW = $clog2(BYTES + 1);

  function automatic logic [CW-1:0] ones(logic [BYTES-1:0] v);
    logic [CW-1:0] n = '0;
    for (int b = 0; b < BYTES; b++) n += CW'(v[b]);
    return n;
  endfunction

  logic [CW-1:0] best_cnt;
  loc_t          best_loc;
  mtype_t        best_mask;

  if (MIN_MATCH < 2 || MIN_MATCH > BYTES) begin : g_bad_min
    $error("xm_match_logic: MIN_MATCH must lie between 2 and 4");
  end

  always_comb begin
    best_cnt  = '0;
    best_loc  = '0;
    best_mask = '0;
    // scan from the back so that the front-most entry wins a tie
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (ones(hit[i]) >= best_cnt && ones(hit[i]) != '0) begin
        best_cnt  = ones(hit[i]);
        best_loc  = loc_t'(i + 1);
        best_mask = hit[i];
      end
    end
    found = (best_cnt >= CW'(MIN_MATCH));
    full  = (best_cnt == CW'(BYTES));
    loc   = found ? best_loc : '0;
    mtype = found ? best_mask : MTYPE_MISS;
  end
endmodule
