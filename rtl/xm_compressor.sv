// xm_compressor: X-Match compressor for a serial stream of 32-bit tuples.
//
// Tuples enter an input FIFO. While the control unit holds en high, one tuple per clock
// leaves the FIFO and is searched in the CAM dictionary; the match logic picks the best
// entry; the dictionary is updated in the same clock (move-to-front on a full match,
// insert at the front otherwise), so the next tuple is searched against the updated
// dictionary with no bubble. The result is registered into one code word:
//   miss     match_hit=0, match_type=0,    addr_out = dictionary occupancy after the
//            insert, data_out = the whole tuple
//   partial  match_hit=0, match_type=mask, addr_out = matched location,
//            data_out = the unmatched bytes in their lanes, matched lanes zero
//   full     match_hit=1, match_type=4'hF, addr_out = matched location,
//            data_out keeps its previous value (no literal is sent)
// The unit structure (FIFO, CAM comparator, match logic) and the 5-bit address,
// 1-bit match hit and 32-bit data outputs follow the system block diagram; the
// address and data values on misses and full matches follow the published simulation
// waveforms. The partial-match code and the handshake are this design's choices.
//
// Timing: a tuple accepted at clock edge k (in_valid && in_ready) appears at the
// outputs with out_valid after edge k+1 when en is high: two cycles of latency and one
// tuple per clock. There is no back-pressure on the output.
module xm_compressor
  import xm_pkg::*;
#(
  parameter int unsigned DEPTH      = MAX_DEPTH,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned MIN_MATCH  = MIN_MATCH_DEF
) (
  input  logic   clk,
  input  logic   reset,
  input  logic   en,         // from the control unit: process tuples
  input  logic   clear,      // from the control unit: empty the dictionary
  // uncompressed input
  input  logic   in_valid,
  input  tuple_t in_data,
  output logic   in_ready,
  // compressed output
  output logic   out_valid,
  output logic   match_hit,
  output mtype_t match_type,
  output loc_t   addr_out,
  output tuple_t data_out
);
  tuple_t fifo_q;
  logic   fifo_full, fifo_empty;
  logic   take;

  assign in_ready = !fifo_full;
  assign take     = en && !clear && !fifo_empty;

  xm_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .reset,
    .wr_en  (in_valid && in_ready),
    .wr_data(in_data),
    .rd_en  (take),
    .rd_data(fifo_q),
    .full   (fifo_full),
    .empty  (fifo_empty),
    .count  ()
  );

  logic [BYTES-1:0] hit [DEPTH];
  loc_t   occ;
  logic   found, full;
  loc_t   loc;
  mtype_t mtype;

  xm_cam #(.DEPTH(DEPTH)) u_cam (
    .clk, .reset, .clear,
    .search_data(fifo_q),
    .hit,
    .rd_loc     ('0),
    .rd_data    (),
    .upd_en     (take),
    .upd_full   (full),
    .upd_loc    (loc),
    .upd_data   (fifo_q),
    .occupancy  (occ)
  );

  xm_match_logic #(.DEPTH(DEPTH), .MIN_MATCH(MIN_MATCH)) u_match (
    .hit, .found, .full, .loc, .mtype
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      out_valid  <= 1'b0;
      match_hit  <= 1'b0;
      match_type <= MTYPE_MISS;
      addr_out   <= '0;
      data_out   <= '0;
    end else begin
      out_valid <= take;
      if (take) begin
        match_hit  <= full;
        match_type <= mtype;
        addr_out   <= found ? loc
                    : (occ == loc_t'(DEPTH) ? occ : occ + 1'b1);
        if (!full) data_out <= fifo_q & ~byte_mask(mtype);
      end
    end
  end
endmodule
