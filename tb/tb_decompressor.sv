// tb_decompressor: stored words are either 2x-packed pairs (built here from
// two compressible sorted words) or plain sorted words, each with a way tag,
// sent with random gaps while the output stalls at random. The output must be
// the original words in order: both words of a packed pair (out_end on the
// second), a plain word once (out_end set), each with its tag.
module tb_decompressor;
  import face_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_end;
  word_t in_data = '0, out_data;
  logic [3:0] in_tag = 0, out_tag;
  int checks = 0, failures = 0;
  word_t exp_w [$];
  logic [4:0] exp_c [$];
  int n_packed = 0;

  decompressor #(.TAG_W(4), .DEPTH(8)) dut (.*);

  function automatic word_t sorted_word(input int gap);
    word_t w;
    logic [31:0] v;
    v = $urandom_range(32'h7fff_0000);
    for (int i = 0; i < 16; i++) begin w[32*i +: 32] = v; v = v + $urandom_range(gap); end
    return w;
  endfunction

  function automatic logic [226:0] half(input word_t w);
    logic [226:0] h;
    h[31:0] = w[31:0];
    for (int i = 1; i < 16; i++) h[32 + 13*(i-1) +: 13] = 13'(w[32*i +: 32] - w[32*(i-1) +: 32]);
    return h;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      begin
        for (int n = 0; n < 400; n++) begin
          word_t a, b, s;
          logic [3:0] tg;
          tg = 4'($urandom);
          if (n % 3 != 0) begin
            a = sorted_word(32'h1fff);
            b = sorted_word(32'h1fff);
            s = {33'h1, 25'h0, half(b), half(a)};
            exp_w.push_back(a); exp_c.push_back({tg, 1'b0});
            exp_w.push_back(b); exp_c.push_back({tg, 1'b1});
            n_packed++;
          end else begin
            s = (n % 9 == 0) ? '0 : sorted_word(32'h100_0000);
            exp_w.push_back(s); exp_c.push_back({tg, 1'b1});
          end
          @(negedge clk);
          while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1; in_data = s; in_tag = tg;
          #1;
          while (!in_ready) begin @(negedge clk); #1; end
        end
        @(negedge clk);
        in_valid = 0;
      end
      begin
        int k;
        k = 0;
        while (k < 5000 && (k < 10 || exp_w.size() != 0)) begin
          @(negedge clk);
          out_ready = ($urandom_range(3) != 0);
          #1;
          if (out_valid && out_ready) begin
            checks++;
            if (out_data != exp_w.pop_front() || {out_tag, out_end} != exp_c.pop_front()) begin
              failures++; $display("output mismatch");
            end
          end
          k++;
        end
      end
    join
    checks++;
    if (exp_w.size() != 0) begin failures++; $display("%0d words missing", exp_w.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
