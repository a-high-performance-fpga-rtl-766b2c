// tb_sync_fifo: random writes, reads and clears against a queue model;
// checks the head data, full, empty and count every cycle.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int W = 16, D = 5;
  logic clear = 0, wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int n_full = 0, n_clear = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      #1;
      chk(count == $bits(count)'(model.size()), "count");
      chk(empty == (model.size() == 0), "empty");
      chk(full == (model.size() == D), "full");
      if (model.size() != 0) chk(rd_data == model[0], "head data");
      if (full) n_full++;
      clear   = ($urandom_range(99) == 0);
      wr_en   = !full && ($urandom_range(99) < ((n / 500) % 2 ? 70 : 40));
      rd_en   = !empty && ($urandom_range(99) < ((n / 500) % 2 ? 40 : 70));
      wr_data = W'($urandom);
      @(posedge clk);
      if (clear) begin model.delete(); n_clear++; end
      else begin
        if (rd_en) void'(model.pop_front());
        if (wr_en) model.push_back(wr_data);
      end
    end
    chk(n_full > 0 && n_clear > 0, "full and clear both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
