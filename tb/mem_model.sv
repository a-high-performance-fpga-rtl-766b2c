// mem_model: behavioural model of the external memory and its controller,
// for simulation only.
//
// An array of 512-bit words with a word-address write port and a read port
// that answers each request, in order and with its tag, LAT cycles later.
// STALL_PCT makes the model refuse requests and hold responses at random in
// that share of cycles, to exercise the accelerator's back-pressure.
module mem_model
  import face_pkg::*;
#(
  parameter int unsigned WORDS     = 1024,
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned TAG_W     = 4,
  parameter int unsigned LAT       = 8,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic              clk,
  input  logic              rst_n,    // requests are ignored in reset
  input  logic              wr_valid,
  output logic              wr_ready,
  input  logic [ADDR_W-1:0] wr_addr,
  input  word_t             wr_data,
  input  logic              rd_valid,
  output logic              rd_ready,
  input  logic [ADDR_W-1:0] rd_addr,
  input  logic [TAG_W-1:0]  rd_tag,
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output word_t             rsp_data,
  output logic [TAG_W-1:0]  rsp_tag
);
  typedef struct {
    word_t            data;
    logic [TAG_W-1:0] tag;
    longint           due;
  } rsp_t;

  word_t  mem [WORDS];
  rsp_t   q [$];
  longint cyc = 0;
  logic   stall_w = 1'b0, stall_r = 1'b0, stall_s = 1'b0;
  int     bad_addr = 0;

  assign wr_ready  = !stall_w;
  assign rd_ready  = !stall_r && (q.size() < 64);
  assign rsp_valid = !stall_s && (q.size() != 0) && (q[0].due <= cyc);
  assign rsp_data  = (q.size() != 0) ? q[0].data : '0;
  assign rsp_tag   = (q.size() != 0) ? q[0].tag : '0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      q.delete();
    end else begin
      if (wr_valid && wr_ready) begin
        if (wr_addr < WORDS) mem[wr_addr] <= wr_data;
        else bad_addr++;
      end
      if (rsp_valid && rsp_ready) void'(q.pop_front());
      if (rd_valid && rd_ready) begin
        rsp_t r;
        r.data = (rd_addr < WORDS) ? mem[rd_addr] : '0;
        r.tag  = rd_tag;
        r.due  = cyc + LAT;
        if (rd_addr >= WORDS) bad_addr++;
        q.push_back(r);
      end
    end
    stall_w <= ($urandom_range(99) < STALL_PCT);
    stall_r <= ($urandom_range(99) < STALL_PCT);
    stall_s <= ($urandom_range(99) < STALL_PCT);
  end
endmodule
