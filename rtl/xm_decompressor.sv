// xm_decompressor: rebuilds 32-bit tuples from X-Match code words.
//
// Keeps a dictionary identical to the compressor's (same move-to-front rule, same
// size) and updates it with every tuple it rebuilds, so both stay in step without any
// side information. For each code word:
//   miss     the tuple is data_in
//   partial  bytes whose match_type bit is set come from the entry at addr_in, the
//            others from the same lanes of data_in
//   full     the tuple is the entry at addr_in (data_in is ignored)
// The rebuilt tuple goes into the output FIFO of the block diagram. The match hit,
// compressed address and start inputs follow the diagram; the handshake, the output
// FIFO depth and the partial-match rule are this design's choices, chosen to invert
// the compressor exactly.
//
// Timing: a code word accepted at clock edge k (in_valid && in_ready) is readable from
// the FIFO after edge k: one cycle of latency and one tuple per clock. in_ready is low
// until start is high and while the output FIFO is full.
module xm_decompressor
  import xm_pkg::*;
#(
  parameter int unsigned DEPTH      = MAX_DEPTH,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic   clk,
  input  logic   reset,
  input  logic   start,      // from the control unit: accept code words
  input  logic   clear,      // from the control unit: empty the dictionary
  // compressed input
  input  logic   in_valid,
  input  logic   match_hit,
  input  mtype_t match_type,
  input  loc_t   addr_in,
  input  tuple_t data_in,
  output logic   in_ready,
  // decompressed output
  output logic   out_valid,
  output tuple_t out_data,
  input  logic   out_ready
);
  logic   fifo_full, fifo_empty;
  logic   take;
  tuple_t entry, rebuilt;
  mtype_t mask;

  assign in_ready = start && !clear && !fifo_full;
  assign take     = in_valid && in_ready;
  assign mask     = match_hit ? MTYPE_FULL : match_type;
  assign rebuilt  = (entry & byte_mask(mask)) | (data_in & ~byte_mask(mask));

  xm_cam #(.DEPTH(DEPTH)) u_dict (
    .clk, .reset, .clear,
    .search_data('0),
    .hit        (),
    .rd_loc     (addr_in),
    .rd_data    (entry),
    .upd_en     (take),
    .upd_full   (match_hit),
    .upd_loc    (addr_in),
    .upd_data   (rebuilt),
    .occupancy  ()
  );

  xm_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .reset,
    .wr_en  (take),
    .wr_data(rebuilt),
    .rd_en  (out_ready && !fifo_empty),
    .rd_data(out_data),
    .full   (fifo_full),
    .empty  (fifo_empty),
    .count  ()
  );

  assign out_valid = !fifo_empty;

  a_full_type: assert property (@(posedge clk) disable iff (reset)
      take && match_hit |-> match_type == MTYPE_FULL)
    else $error("xm_decompressor: full match with a partial match type");
endmodule
