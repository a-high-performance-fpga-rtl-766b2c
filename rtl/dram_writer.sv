// dram_writer: writes the tree's output into the Write Area of the external
// memory, one region per way of the next Phase, with Throttling.
//
// The Write Area is split into WAYS regions of region_words 512-bit words
// each (room for N/WAYS uncompressed elements). Output words are written
// sequentially from the head of region 0. Once a region has received its
// N/WAYS elements the writer records how many words it used (end_ptr, read
// back as the length of that way's data in the next Phase) and jumps to the
// head of the next region. With compression a stored word holds 16 or 32
// elements, so the number of words per region is not known in advance and a
// fixed-size burst could run into the next region's data. Throttling avoids
// this: writes go out in bursts (the grain) of GRAIN words, but once fewer
// than GRAIN*32 elements of the region remain (the Threshold) the grain
// shrinks to floor(remaining/32) words, at least one, so a burst can never
// hold more elements than the region still needs. The mechanism follows the
// document; measuring the Threshold in elements and the exact shrinking rule
// are this design's choices.
//
// Interface: words come from the Output Buffer FIFO (in_count words present,
// in_data at its head, in_rd dequeues). A burst starts only when the FIFO
// holds a whole grain, then one word per cycle goes out on wr_* while
// wr_ready is high; wr_last marks the burst's last word. phase_start (one
// cycle) restarts at region 0; all_done is high once every region is full.
module dram_writer
  import face_pkg::*;
#(
  parameter int unsigned WAYS   = 16,
  parameter int unsigned GRAIN  = 16,    // words per burst before Throttling
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned CNT_W  = 32,
  parameter int unsigned FCNT_W = 7      // width of in_count
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              phase_start,
  input  logic [ADDR_W-1:0] area_base,
  input  logic [ADDR_W-1:0] region_words,
  input  logic [CNT_W-1:0]  region_elems,
  // Output Buffer
  input  logic [FCNT_W-1:0] in_count,
  input  word_t             in_data,
  output logic              in_rd,
  // memory write port
  output logic              wr_valid,
  input  logic              wr_ready,
  output logic [ADDR_W-1:0] wr_addr,
  output word_t             wr_data,
  output logic              wr_last,
  // status
  output logic [ADDR_W-1:0] end_ptr [WAYS],
  output logic              all_done,
  output logic              throttling
);
  localparam int unsigned RW = $clog2(WAYS + 1);

  logic [RW-1:0]     region;
  logic [ADDR_W-1:0] offset;
  logic [CNT_W-1:0]  remaining;
  logic [CNT_W-1:0]  grain;
  logic [CNT_W-1:0]  burst_left;
  logic [CNT_W-1:0]  w_elems;
  logic [ADDR_W-1:0] region_base;
  logic              start_burst, fire, region_end;

  assign all_done   = (region == RW'(WAYS));
  assign throttling = !all_done && (remaining < CNT_W'(GRAIN * 2 * WORD_ELEMS));
  always_comb begin
    grain = CNT_W'(GRAIN);
    if (throttling) begin
      grain = remaining >> $clog2(2 * WORD_ELEMS);
      if (grain == '0) grain = CNT_W'(1);
    end
  end

  always_comb begin
    region_base = area_base;
    for (int unsigned j = 0; j < WAYS; j++)
      if (RW'(j) < region) region_base = region_base + region_words;
  end

  assign start_burst = !all_done && (burst_left == '0) && (CNT_W'(in_count) >= grain);
  assign wr_valid    = (burst_left != '0) && (in_count != '0);
  assign wr_addr     = region_base + offset;
  assign wr_data     = in_data;
  assign wr_last     = (burst_left == CNT_W'(1)) || region_end;
  assign fire        = wr_valid && wr_ready;
  assign in_rd       = fire;
  assign w_elems     = CNT_W'(word_elem_count(in_data));
  assign region_end  = (remaining <= w_elems);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      region     <= RW'(WAYS);
      offset     <= '0;
      remaining  <= '0;
      burst_left <= '0;
      for (int unsigned j = 0; j < WAYS; j++) end_ptr[j] <= '0;
    end else if (phase_start) begin
      region     <= '0;
      offset     <= '0;
      remaining  <= region_elems;
      burst_left <= '0;
    end else if (start_burst) begin
      burst_left <= grain;
    end else if (fire) begin
      if (region_end) begin
        end_ptr[region[$clog2(WAYS)-1:0]] <= offset + 1'b1;
        region     <= region + 1'b1;
        offset     <= '0;
        remaining  <= region_elems;
        burst_left <= '0;
      end else begin
        offset     <= offset + 1'b1;
        remaining  <= remaining - w_elems;
        burst_left <= burst_left - 1'b1;
      end
    end
  end

  // A burst never carries data beyond the end of its region.
  assert property (@(posedge clk) disable iff (!rst_n) fire |-> (remaining >= w_elems))
    else $error("dram_writer: word crosses a region end");
endmodule
