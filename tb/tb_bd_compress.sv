// tb_bd_compress: sorted words with small, boundary (0x1fff / 0x2000) and
// large neighbour gaps, plus unsorted words. The compressible flag must match
// "every neighbour delta <= 0x1fff", and for compressible words the base and
// each 13-bit delta field must rebuild the word exactly.
module tb_bd_compress;
  import face_pkg::*;
  word_t  in_data;
  cpart_t out_part;
  logic   compressible;
  int checks = 0, failures = 0;
  int n_comp = 0, n_not = 0;

  bd_compress dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] v [16];
      logic [31:0] maxgap;
      bit exp_ok;
      word_t rebuilt;
      logic [31:0] acc;
      case (n % 5)
        0: maxgap = 32'h1fff;
        1: maxgap = 32'h2000;
        2: maxgap = 32'h100;
        3: maxgap = 32'h0fff_ffff;
        default: maxgap = 32'h10;
      endcase
      v[0] = (n % 7 == 0) ? 32'hffff_0000 : $urandom;
      for (int i = 1; i < 16; i++) begin
        logic [31:0] g;
        g = (i == 5 && n % 5 < 2) ? maxgap : $urandom_range(maxgap);
        v[i] = v[i-1] + g;
        if (v[i] < v[i-1]) v[i] = 32'hffff_ffff;   // saturate, stay sorted
      end
      if (n % 11 == 0) begin
        logic [31:0] t;
        t = v[3]; v[3] = v[9]; v[9] = t;            // unsorted word
      end
      exp_ok = 1;
      for (int i = 1; i < 16; i++) if (v[i] < v[i-1] || v[i] - v[i-1] > 32'h1fff) exp_ok = 0;
      for (int i = 0; i < 16; i++) in_data[32*i +: 32] = v[i];
      #1;
      checks++;
      if (compressible != exp_ok) begin failures++; $display("flag wrong for word %0d", n); end
      if (exp_ok) begin
        n_comp++;
        acc = out_part[31:0];
        rebuilt[31:0] = acc;
        for (int i = 1; i < 16; i++) begin
          acc = acc + 32'(out_part[32 + 13*(i-1) +: 13]);
          rebuilt[32*i +: 32] = acc;
        end
        checks++;
        if (rebuilt != in_data) begin failures++; $display("fields wrong for word %0d", n); end
      end else n_not++;
    end
    checks++;
    if (n_comp < 100 || n_not < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
