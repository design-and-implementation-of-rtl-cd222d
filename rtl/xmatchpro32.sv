// xmatchpro32: serial lossless compression / decompression system (X-Match).
//
// Three units side by side, as in the system block diagram: an X-Match compressor
// (input FIFO, CAM comparator, match logic), a decompressor unit (dictionary and output
// FIFO) and a control unit that starts both. The compressor turns a stream of 32-bit
// tuples into code words (match hit, match type, 5-bit location, 32-bit literal data);
// the decompressor takes code words from its own inputs and gives back the tuples.
// Connecting the compressor outputs to the decompressor inputs, directly or through a
// channel or store, gives back the original stream. Both dictionaries are emptied by
// the same start request, which is what keeps them in step.
//
// Port names follow the published simulation (clk, reset, start, udata, dataout,
// addrout, matchhit); the valid/ready signals and the separate match-type ports are
// this design's choices. Throughput is one tuple per clock on each side. Latency is two
// clocks through the compressor and one through the decompressor.
module xmatchpro32
  import xm_pkg::*;
#(
  parameter int unsigned DEPTH      = MAX_DEPTH,  // dictionary entries
  parameter int unsigned FIFO_DEPTH = 16,         // depth of each FIFO
  parameter int unsigned MIN_MATCH  = MIN_MATCH_DEF  // bytes for a partial match
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        start,
  output logic        busy,
  // uncompressed data in
  input  logic        udata_valid,
  input  logic [31:0] udata,
  output logic        udata_ready,
  // compressed data out
  output logic        code_valid,
  output logic        matchhit,
  output logic [3:0]  matchtype,
  output logic [4:0]  addrout,
  output logic [31:0] dataout,
  // compressed data in
  input  logic        cdata_valid,
  input  logic        cmatchhit,
  input  logic [3:0]  cmatchtype,
  input  logic [4:0]  caddrin,
  input  logic [31:0] cdatain,
  output logic        cdata_ready,
  // decompressed data out
  output logic        ddata_valid,
  output logic [31:0] ddataout,
  input  logic        ddata_ready
);
  logic dict_clear, comp_en, decomp_start;

  xm_control u_ctrl (
    .clk, .reset, .start,
    .dict_clear, .comp_en, .decomp_start, .busy
  );

  xm_compressor #(.DEPTH(DEPTH), .FIFO_DEPTH(FIFO_DEPTH), .MIN_MATCH(MIN_MATCH)) u_comp (
    .clk, .reset,
    .en        (comp_en),
    .clear     (dict_clear),
    .in_valid  (udata_valid),
    .in_data   (udata),
    .in_ready  (udata_ready),
    .out_valid (code_valid),
    .match_hit (matchhit),
    .match_type(matchtype),
    .addr_out  (addrout),
    .data_out  (dataout)
  );

  xm_decompressor #(.DEPTH(DEPTH), .FIFO_DEPTH(FIFO_DEPTH)) u_decomp (
    .clk, .reset,
    .start     (decomp_start),
    .clear     (dict_clear),
    .in_valid  (cdata_valid),
    .match_hit (cmatchhit),
    .match_type(cmatchtype),
    .addr_in   (caddrin),
    .data_in   (cdatain),
    .in_ready  (cdata_ready),
    .out_valid (ddata_valid),
    .out_data  (ddataout),
    .out_ready (ddata_ready)
  );
endmodule
