// dram_reader: reads the Read Area of the external memory back into the
// Input Buffers in every Phase after the first.
//
// Way j reads its own region j, from the region head up to the end pointer
// that the writer preserved in the previous Phase. Reads go out as bursts of
// up to RD_GRAIN consecutive word addresses for one way, the way being chosen
// round-robin among those that still have data and whose Input Buffer has
// room. Room is kept by credits: a burst of b words reserves 2*b Input Buffer
// entries (a compressed word expands into two), and the reservation is
// returned two entries at a time as each stored word has been delivered
// (ret_valid/ret_way). The document gives what each way reads; the burst
// scheduling and the credit scheme are this design's choices.
//
// Interface: rd_* issues one word address per cycle while rd_ready is high,
// with the way number as tag; the memory answers in order (not handled here).
// phase_start loads the end pointers; done is high when every region is read.
module dram_reader
  import face_pkg::*;
#(
  parameter int unsigned WAYS     = 16,
  parameter int unsigned RD_GRAIN = 8,
  parameter int unsigned IB_DEPTH = 32,
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned TAG_W    = $clog2(WAYS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              phase_start,
  input  logic [ADDR_W-1:0] area_base,
  input  logic [ADDR_W-1:0] region_words,
  input  logic [ADDR_W-1:0] end_ptr   [WAYS],
  input  logic [$clog2(IB_DEPTH+1)-1:0] ib_count [WAYS],
  input  logic              ret_valid,
  input  logic [TAG_W-1:0]  ret_way,
  output logic              rd_valid,
  input  logic              rd_ready,
  output logic [ADDR_W-1:0] rd_addr,
  output logic [TAG_W-1:0]  rd_tag,
  output logic              done
);
  localparam int unsigned CRW = $clog2(2 * IB_DEPTH + 1) + 1;

  logic [ADDR_W-1:0] ptr  [WAYS];
  logic [ADDR_W-1:0] last [WAYS];
  logic [CRW-1:0]    infl [WAYS];
  logic [TAG_W-1:0]  cur, rr;
  logic [ADDR_W-1:0] left;             // words left in the current burst
  logic              found;
  logic [TAG_W-1:0]  pick;
  logic [ADDR_W-1:0] pick_len;
  logic [ADDR_W-1:0] base_cur;
  logic [CRW-1:0]    infl_next [WAYS];

  function automatic logic [ADDR_W-1:0] burst_len(input logic [ADDR_W-1:0] p,
                                                  input logic [ADDR_W-1:0] e);
    return (e - p > ADDR_W'(RD_GRAIN)) ? ADDR_W'(RD_GRAIN) : e - p;
  endfunction

  // Round-robin search for a way with data left and room for a whole burst.
  always_comb begin
    found    = 1'b0;
    pick     = '0;
    pick_len = '0;
    for (int unsigned i = 0; i < WAYS; i++) begin
      logic [TAG_W-1:0]  w;
      logic [ADDR_W-1:0] b;
      w = TAG_W'((int'(rr) + i) % WAYS);
      b = burst_len(ptr[w], last[w]);
      if (!found && ptr[w] != last[w] &&
          (CRW'(ib_count[w]) + infl[w] + CRW'(2 * b) <= CRW'(IB_DEPTH))) begin
        found    = 1'b1;
        pick     = w;
        pick_len = b;
      end
    end
  end

  always_comb begin
    base_cur = area_base;
    for (int unsigned j = 0; j < WAYS; j++)
      if (TAG_W'(j) < cur) base_cur = base_cur + region_words;
  end

  assign rd_valid = (left != '0);
  assign rd_addr  = base_cur + ptr[cur];
  assign rd_tag   = cur;

  // Credits: reserve two entries per word of a new burst, return two per
  // delivered stored word.
  always_comb begin
    for (int unsigned j = 0; j < WAYS; j++) begin
      infl_next[j] = infl[j];
      if (left == '0 && found && pick == TAG_W'(j)) infl_next[j] = infl_next[j] + CRW'(2 * pick_len);
      if (ret_valid && ret_way == TAG_W'(j))        infl_next[j] = infl_next[j] - CRW'(2);
    end
  end

  always_comb begin
    done = 1'b1;
    for (int unsigned j = 0; j < WAYS; j++) if (ptr[j] != last[j]) done = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur  <= '0;
      rr   <= '0;
      left <= '0;
      for (int unsigned j = 0; j < WAYS; j++) begin
        ptr[j]  <= '0;
        last[j] <= '0;
        infl[j] <= '0;
      end
    end else if (phase_start) begin
      left <= '0;
      rr   <= '0;
      for (int unsigned j = 0; j < WAYS; j++) begin
        ptr[j]  <= '0;
        last[j] <= end_ptr[j];
        infl[j] <= '0;
      end
    end else begin
      for (int unsigned j = 0; j < WAYS; j++) infl[j] <= infl_next[j];
      if (left == '0) begin
        if (found) begin
          cur  <= pick;
          left <= pick_len;
          rr   <= TAG_W'((int'(pick) + 1) % WAYS);
        end
      end else if (rd_ready) begin
        ptr[cur] <= ptr[cur] + 1'b1;
        left     <= left - 1'b1;
      end
    end
  end
endmodule
