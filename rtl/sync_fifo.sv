// sync_fifo: synchronous first-in first-out buffer.
//
// Every buffer of the accelerator is one of these: the Long FIFOs of the
// Input Buffers, the Output Buffer and the Result Buffer (512 or 128 bits
// wide, deep), and the short FIFOs between the cells of the merge sorter tree.
// The document names these FIFOs but not their depths or handshake; here a
// write happens when wr_en is high and the FIFO is not full, a read when
// rd_en is high and it is not empty, both in the same cycle if wanted. The
// head entry is always visible on rd_data (first-word fall-through), so the
// tree cells can compare the heads of their input FIFOs before dequeuing.
// A synchronous clear empties the FIFO in one cycle and takes priority over a
// write in the same cycle; it is how the tree FIFOs are reset between
// Iterations.
// rst_n also disables the handshake assertions, so lint sees it used both
// synchronously and asynchronously; the flops use it only asynchronously.
module sync_fifo #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  output logic                       full,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty   = (count == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] ptr);
    return (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr && !clear) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else if (clear) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= next_ptr(wptr);
      if (do_rd) rptr <= next_ptr(rptr);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  // A write to a full FIFO or a read from an empty one is dropped by design,
  // but the surrounding logic never asks for either.
  assert property (@(posedge clk) disable iff (!rst_n || clear) !(wr_en && full))
    else $error("sync_fifo: write while full");
  assert property (@(posedge clk) disable iff (!rst_n || clear) !(rd_en && empty))
    else $error("sync_fifo: read while empty");
endmodule
