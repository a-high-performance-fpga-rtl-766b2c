// tb_compressor: a stream of sorted words, some compressible and some not,
// some marked as the last word of a region, with random gaps and output
// stalls. The output must equal a reference model of the packing rule: two
// successive compressible words (the first not a region end) become one word
// with the 33-bit flag 0x0000_0000_1 on top, the first word's base and deltas
// in bits [226:0] and the second's in [453:227]; all other words pass
// unchanged and in order.
module tb_compressor;
  import face_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 0;
  word_t in_data = '0, out_data;
  int checks = 0, failures = 0;
  word_t exp_q [$];
  int n_packed = 0, n_raw = 0;

  compressor dut (.*);

  function automatic bit comp_ok(input word_t w);
    for (int i = 1; i < 16; i++)
      if (w[32*i +: 32] < w[32*(i-1) +: 32] || w[32*i +: 32] - w[32*(i-1) +: 32] > 32'h1fff) return 0;
    return 1;
  endfunction

  function automatic logic [226:0] half(input word_t w);
    logic [226:0] h;
    h[31:0] = w[31:0];
    for (int i = 1; i < 16; i++) h[32 + 13*(i-1) +: 13] = 13'(w[32*i +: 32] - w[32*(i-1) +: 32]);
    return h;
  endfunction

  initial begin
    word_t words [$];
    bit    lastf [$];
    bit    held;
    word_t hw;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Build the input stream and the expected output.
    for (int n = 0; n < 600; n++) begin
      word_t w;
      logic [31:0] v;
      int gap;
      gap = ((n / 3) % 4 == 0) ? 32'h4000 : 32'h800;
      v = $urandom_range(32'h7000_0000);
      for (int i = 0; i < 16; i++) begin w[32*i +: 32] = v; v = v + $urandom_range(gap); end
      if (n % 37 == 0) w = '0;                     // all-zero word
      words.push_back(w);
      lastf.push_back((n % 8 == 7) || ($urandom_range(9) == 0));
    end
    held = 0;
    for (int n = 0; n < words.size(); n++) begin
      bit c;
      c = comp_ok(words[n]);
      if (held && c) begin
        exp_q.push_back({33'h1, 25'h0, half(words[n]), half(hw)});
        held = 0;
        continue;
      end
      if (held) begin exp_q.push_back(hw); held = 0; end
      if (c && !lastf[n]) begin held = 1; hw = words[n]; end
      else exp_q.push_back(words[n]);
    end
    fork
      begin
        for (int n = 0; n < words.size(); n++) begin
          @(negedge clk);
          while ($urandom_range(4) == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1; in_data = words[n]; in_last = lastf[n];
          #1;
          while (!in_ready) begin @(negedge clk); #1; end
        end
        @(negedge clk);
        in_valid = 0;
      end
      begin
        int k;
        k = 0;
        while (k < 3000 && exp_q.size() != 0) begin
          @(negedge clk);
          out_ready = ($urandom_range(3) != 0);
          #1;
          if (out_valid && out_ready) begin
            checks++;
            if (is_packed(out_data)) n_packed++; else n_raw++;
            if (out_data != exp_q.pop_front()) begin failures++; $display("word mismatch"); end
          end
          k++;
        end
      end
    join
    checks++;
    if (n_packed < 20 || n_raw < 20) begin failures++; $display("packed=%0d raw=%0d", n_packed, n_raw); end
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
