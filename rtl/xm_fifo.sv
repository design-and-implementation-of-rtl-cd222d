// xm_fifo: synchronous first-word-fall-through FIFO.
//
// Used twice in the system: in front of the compressor, where it holds incoming tuples
// until the control unit starts the compressor, and behind the decompressor, where it
// holds rebuilt tuples until the consumer takes them. The buffers themselves are named
// in the block diagram; their depth, width handling and handshake are this design's
// choices. Storage is a register array indexed by read and write pointers one bit
// wider than the address, so full and empty are told apart by the extra bit.
//
// Interface: push when wr_en and !full; pop when rd_en and !empty. rd_data always shows
// the oldest word while !empty. A word written at one clock edge can be read after
// that edge (one cycle of latency). Pushing into a full FIFO or popping an empty one
// is ignored and flagged by an assertion. Reset is synchronous and active high.
module xm_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16   // must be a power of two
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wr_ptr, rd_ptr;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  assign count   = wr_ptr - rd_ptr;
  assign empty   = (wr_ptr == rd_ptr);
  assign full    = (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]) && (wr_ptr[AW] != rd_ptr[AW]);
  assign rd_data = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (reset) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  if (DEPTH < 2 || (1 << AW) != DEPTH) begin : g_bad_depth
    $error("xm_fifo: DEPTH must be a power of two of at least 2");
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (reset) !(wr_en && full))
    else $error("xm_fifo: push while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (reset) !(rd_en && empty))
    else $error("xm_fifo: pop while empty");
endmodule
