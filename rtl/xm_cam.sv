// xm_cam: move-to-front tuple dictionary with byte-wise CAM comparators.
//
// The dictionary holds up to DEPTH 32-bit tuples, front first. Every entry compares each
// of its four bytes with the search tuple at once, and the comparators' outputs, gated
// by the entry's valid bit, form the hit matrix handed to the match logic. That is the
// CAM comparator of the compressor. The same storage, read by location instead of by
// content, serves as the decompressor's dictionary.
//
// Update rule (one update per clock, when upd_en is high):
//   * upd_full = 0 (miss or partial match): every entry moves one place back, the last
//     one drops out, and upd_data enters at the front. Occupancy grows by one up to DEPTH.
//   * upd_full = 1 (full match at location upd_loc): the entries in front of the matched
//     one move one place back, the matched tuple leaves its place and enters at the
//     front. Occupancy is unchanged.
// The dictionary starts empty after reset or clear and grows as tuples arrive. This
// rule follows the description of the X-Match algorithm; building it as a shift
// register, with locations counted from 1 at the front, is this design's choice.
//
// Interface: hit[i][b] is combinational on search_data; rd_data is combinational on
// rd_loc (1-based; location 0 or beyond the occupancy reads an undefined entry). The
// update takes effect at the clock edge, so a search in the next cycle sees it.
module xm_cam
  import xm_pkg::*;
#(
  parameter int unsigned DEPTH = MAX_DEPTH
) (
  input  logic   clk,
  input  logic   reset,
  input  logic   clear,                  // empty the dictionary (synchronous)
  // search port
  input  tuple_t search_data,
  output logic [BYTES-1:0] hit [DEPTH],  // hit[i][b]: entry i valid and byte b equal
  // read port
  input  loc_t   rd_loc,
  output tuple_t rd_data,
  // update port
  input  logic   upd_en,
  input  logic   upd_full,
  input  loc_t   upd_loc,
  input  tuple_t upd_data,
  output loc_t   occupancy               // number of valid entries
);
  tuple_t entry [DEPTH];
  logic [DEPTH-1:0] valid;

  if (DEPTH < 2 || DEPTH > MAX_DEPTH) begin : g_bad_depth
    $error("xm_cam: DEPTH must lie between 2 and 2**ADDR_W-1");
  end

  // Comparators
  always_comb begin
    for (int i = 0; i < DEPTH; i++)
      for (int b = 0; b < BYTES; b++)
        hit[i][b] = valid[i] && (entry[i][8*b +: 8] == search_data[8*b +: 8]);
  end

  // Read by location
  always_comb begin
    rd_data = '0;
    for (int i = 0; i < DEPTH; i++)
      if (rd_loc == loc_t'(i + 1)) rd_data = entry[i];
  end

  // Storage and move-to-front update
  always_ff @(posedge clk) begin
    if (reset || clear) begin
      valid     <= '0;
      occupancy <= '0;
      for (int i = 0; i < DEPTH; i++) entry[i] <= '0;
    end else if (upd_en) begin
      entry[0] <= upd_data;
      valid[0] <= 1'b1;
      for (int i = 1; i < DEPTH; i++) begin
        // entry i is at location i+1; it takes its predecessor's tuple unless it lies
        // behind the fully matched location
        if (!upd_full || loc_t'(i) < upd_loc) begin
          entry[i] <= entry[i-1];
          valid[i] <= valid[i-1];
        end
      end
      if (!upd_full && occupancy != loc_t'(DEPTH)) occupancy <= occupancy + 1'b1;
    end
  end

  a_full_loc_valid: assert property (@(posedge clk) disable iff (reset || clear)
      upd_en && upd_full |-> (upd_loc != '0 && upd_loc <= occupancy))
    else $error("xm_cam: full-match update names an empty location");
endmodule
