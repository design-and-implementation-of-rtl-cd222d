// xm_pkg: constants and types shared by the X-Match compressor and decompressor.
//
// The design works on 32-bit tuples of four bytes, matched byte by byte against a
// move-to-front dictionary. A dictionary location is sent as a 5-bit number, as the
// system block diagram gives it; location 0 is never used, so the dictionary holds at
// most 31 tuples and locations run from 1 (front) to 31 (back). The match type is a
// 4-bit mask with one bit per byte lane: bit b set means byte b (bits 8b+7..8b) was
// taken from the dictionary entry. A mask of 0 means a miss (the whole tuple is sent
// as a literal), 4'hF a full match.
package xm_pkg;

  localparam int unsigned DATA_W   = 32;  // tuple width, four bytes
  localparam int unsigned BYTES    = DATA_W / 8;
  localparam int unsigned ADDR_W   = 5;   // width of a dictionary location
  localparam int unsigned MAX_DEPTH = (1 << ADDR_W) - 1;  // locations 1..31
  localparam int unsigned MIN_MATCH_DEF = 2;  // fewer matching bytes than this is a miss

  typedef logic [DATA_W-1:0] tuple_t;
  typedef logic [BYTES-1:0]  mtype_t;
  typedef logic [ADDR_W-1:0] loc_t;

  localparam mtype_t MTYPE_MISS = '0;
  localparam mtype_t MTYPE_FULL = '1;

  // One compressed code word as it leaves the compressor.
  typedef struct packed {
    logic   full;   // all four bytes matched
    mtype_t mtype;  // per-byte match mask, 0 = miss
    loc_t   loc;    // matched location (1-based), or dictionary occupancy on a miss
    tuple_t data;   // literal bytes; matched lanes are zero
  } code_t;

  // Expand a byte mask into a bit mask over the tuple.
  function automatic tuple_t byte_mask(mtype_t m);
    tuple_t r;
    for (int b = 0; b < BYTES; b++) r[8*b +: 8] = {8{m[b]}};
    return r;
  endfunction

endpackage
